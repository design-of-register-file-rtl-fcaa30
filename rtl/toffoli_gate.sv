// toffoli_gate: the 3x3 reversible controlled-controlled-NOT gate.
//
// Maps (a, b, c) to (p, q, r) = (a, b, (a & b) ^ c). With c tied to 0 the
// third output is a & b, which is how the register file builds its write
// enables and read-port enables; p and q are then garbage outputs.
// Purely combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
