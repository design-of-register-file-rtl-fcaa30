// mfrg_gate: modified Fredkin gate, the 2:1 multiplexer cell of the read
// multiplexers.
//
// Maps (a, b, c) to (p, q, r): p = a passes the select line on to the next
// cell of the same stage, q = a ? b : c is the multiplexed output, and
// r = a ? c : b is the unused (garbage) half of the swap. It is a Fredkin gate
// whose swap happens when a is 0 instead of 1, so that select 1 picks input b.
// The exact output mapping is this design's choice: only the gate's name and
// its use as a 2:1 selector with a pass-through select are given.
// Purely combinational.
module mfrg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? b : c;
  assign r = a ? c : b;
endmodule
