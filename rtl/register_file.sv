// register_file: NREGS x DATA_W register file with one write port and two
// read ports, built from reversible gates and level-sensitive latches.
//
// Defaults are 32 registers of one byte, addressed by a 5-bit register
// number. A single control line chooses the operation (see rf_control):
//   ctrl = 1 (read):  rdata1 = reg[raddr1], rdata2 = reg[raddr2].
//   ctrl = 0 (write): reg[waddr] follows wdata; both read ports give 0.
// The write path is the 5:32 Fredkin decoder on waddr, followed by one
// Toffoli AND gate per register combining the write strobe with the decoder
// line; its output is the latch enable of that register. Each read port is a
// set of DATA_W MFRG 32:1 multiplexers, one per data bit, selected by the
// port's address. The port's read strobe is ANDed onto each multiplexed bit
// with a further Toffoli gate, so a port gives 0 while it is not enabled.
//
// The control gates, decoder, Toffoli write enables, latch registers and MFRG
// multiplexers follow the published reversible circuit; the Toffoli gating of
// the read outputs, the separate read addresses and the 8-bit width (the
// source also mentions 32-bit register data once) are this design's choices.
//
// Timing: there is no clock. A write takes effect while ctrl is low and is
// kept when ctrl rises again; waddr and wdata must be stable while ctrl is
// low and until it has risen, because a changing waddr would open other
// registers' latches. Reads are combinational. No reset: registers hold
// unknown values until written.
module register_file #(
  parameter int unsigned DATA_W = rf_pkg::RF_DATA_W,
  parameter int unsigned ADDR_W = rf_pkg::RF_ADDR_W
) (
  input  rf_pkg::rf_ctrl_e    ctrl,
  input  logic [ADDR_W-1:0]   waddr,
  input  logic [DATA_W-1:0]   wdata,
  input  logic [ADDR_W-1:0]   raddr1,
  input  logic [ADDR_W-1:0]   raddr2,
  output logic [DATA_W-1:0]   rdata1,
  output logic [DATA_W-1:0]   rdata2
);
  localparam int unsigned NREGS = 2**ADDR_W;

  logic read1, read2, write;
  logic [NREGS-1:0]  dec;
  logic [NREGS-1:0]  we;
  logic [DATA_W-1:0] q [NREGS];

  rf_control u_ctrl (
    .ctrl  (ctrl == rf_pkg::RF_READ),
    .read1 (read1),
    .read2 (read2),
    .write (write)
  );

  rev_decoder #(.N(ADDR_W)) u_dec (
    .a (waddr),
    .y (dec)
  );

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    logic unused_p, unused_q;
    toffoli_gate u_and (
      .a (write),
      .b (dec[i]),
      .c (1'b0),
      .p (unused_p),
      .q (unused_q),
      .r (we[i])
    );

    rev_register #(.W(DATA_W)) u_reg (
      .en (we[i]),
      .d  (wdata),
      .q  (q[i])
    );
  end

  for (genvar b = 0; b < DATA_W; b++) begin : g_bit
    logic [NREGS-1:0] column;
    logic m1, m2;
    logic unused_p1, unused_q1, unused_p2, unused_q2;

    for (genvar i = 0; i < NREGS; i++) begin : g_col
      assign column[i] = q[i][b];
    end

    rev_mux #(.SEL_W(ADDR_W)) u_mux1 (
      .d   (column),
      .sel (raddr1),
      .y   (m1)
    );

    rev_mux #(.SEL_W(ADDR_W)) u_mux2 (
      .d   (column),
      .sel (raddr2),
      .y   (m2)
    );

    toffoli_gate u_en1 (
      .a (read1), .b (m1), .c (1'b0),
      .p (unused_p1), .q (unused_q1), .r (rdata1[b])
    );

    toffoli_gate u_en2 (
      .a (read2), .b (m2), .c (1'b0),
      .p (unused_p2), .q (unused_q2), .r (rdata2[b])
    );
  end
endmodule
