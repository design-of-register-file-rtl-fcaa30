// rev_register: one register of the file, W reversible D latches sharing one
// enable.
//
// The default W = 8 is the one-byte register: 8 latches, each one Fredkin and
// one Feynman gate, 16 gates in all. While en is high the register is
// transparent (q follows d); when en falls it holds. No reset.
module rev_register #(
  parameter int unsigned W = 8
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  for (genvar b = 0; b < W; b++) begin : g_bit
    rev_dlatch u_latch (
      .en (en),
      .d  (d[b]),
      .q  (q[b])
    );
  end
endmodule
