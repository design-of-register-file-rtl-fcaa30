// fredkin_gate: the 3x3 reversible controlled-swap gate.
//
// Maps (a, b, c) to (p, q, r): p = a, and the last two bits are swapped when
// a is 1, so q = a ? c : b and r = a ? b : c. The number of ones is kept.
// With c tied to 0 it splits b into ~a&b (on q) and a&b (on r), which is how
// the decoders use it; with c fed back from r it is the storage node of a
// D latch. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
