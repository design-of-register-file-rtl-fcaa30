// feynman_gate: the 2x2 reversible CNOT gate.
//
// Maps (a, b) to (p, q) = (a, a ^ b). With b tied to 1 it yields a and its
// complement; with b tied to 0 it copies a (fan-out in a reversible circuit).
// Purely combinational, no timing of its own.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
