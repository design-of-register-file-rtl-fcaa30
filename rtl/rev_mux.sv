// rev_mux: 2**SEL_W : 1 multiplexer built as a tree of modified Fredkin
// (MFRG) cells, one register-file read port for one data bit.
//
// With the default SEL_W = 5 this is the 32:1 multiplexer: 31 cells in five
// stages of 16, 8, 4, 2 and 1. Stage 1 takes select bit sel[0] and pairs of
// data inputs; each cell passes its select line on to the next cell of the same
// stage through its first output, hands its multiplexed second output to the
// next stage, and leaves its third output unused. The single cell of the last
// stage, selected by sel[SEL_W-1], gives y. So y = d[sel].
//
// The stage structure is the published one; which select bit drives which
// stage is this design's choice.
//
// Internally the nodes are numbered as a heap: node 1 is the last-stage cell,
// node i has inputs node 2i (select 0) and node 2i+1 (select 1), and nodes
// 2**SEL_W .. 2**(SEL_W+1)-1 are the data inputs d[0] .. d[2**SEL_W-1].
// Purely combinational: y settles SEL_W cell delays after d or sel changes.
module rev_mux #(
  parameter int unsigned SEL_W = 5
) (
  input  logic [2**SEL_W-1:0] d,
  input  logic [SEL_W-1:0]    sel,
  output logic                y
);
  localparam int unsigned N = 2**SEL_W;

  logic [2*N-1:1] node;
  assign node[2*N-1:N] = d;

  for (genvar dd = 0; dd < SEL_W; dd++) begin : g_stage
    // Select line, threaded from cell to cell within the stage.
    logic [2**dd:0] sel_chain;
    assign sel_chain[0] = sel[SEL_W-1-dd];
    for (genvar k = 0; k < 2**dd; k++) begin : g_cell
      logic unused_r;
      mfrg_gate u_mfrg (
        .a (sel_chain[k]),
        .b (node[2*(2**dd + k) + 1]),
        .c (node[2*(2**dd + k)]),
        .p (sel_chain[k+1]),
        .q (node[2**dd + k]),
        .r (unused_r)
      );
    end
  end

  assign y = node[1];
endmodule
