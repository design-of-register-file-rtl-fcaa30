// rev_decoder: N-to-2**N decoder built from one Feynman gate and a tree of
// Fredkin gates.
//
// With the default N = 5 it is the 5:32 write-address decoder of the register
// file: one Feynman gate and 2+4+8+16 = 30 Fredkin gates. The Feynman gate
// takes the most significant address bit a with a constant 1 and gives a and
// ~a. Each later stage takes the next address bit x as the control of one
// Fredkin gate per line of the previous stage, with that line on the second
// input and a constant 0 on the third: the gate's second output is ~x & line
// and its third output x & line, so every stage doubles the number of lines.
// Line k of the last stage is high exactly when a == k (a[N-1] is the most
// significant bit). The first outputs of the Fredkin gates are garbage.
//
// Lines are numbered as a heap: stage j holds lines 2**j .. 2**(j+1)-1 of
// the vector t, and line i splits into lines 2i (bit 0) and 2i+1 (bit 1).
// The structure is the published one; the bit order is this design's reading
// of it. Purely combinational.
module rev_decoder #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]    a,
  output logic [2**N-1:0] y
);
  logic [2**(N+1)-1:2] t;

  feynman_gate u_fey (
    .a (a[N-1]),
    .b (1'b1),
    .p (t[3]),
    .q (t[2])
  );

  for (genvar j = 1; j < N; j++) begin : g_stage
    for (genvar m = 0; m < 2**j; m++) begin : g_gate
      logic unused_p;
      fredkin_gate u_fred (
        .a (a[N-1-j]),
        .b (t[2**j + m]),
        .c (1'b0),
        .p (unused_p),
        .q (t[2*(2**j + m)]),
        .r (t[2*(2**j + m) + 1])
      );
    end
  end

  assign y = t[2**(N+1)-1:2**N];
endmodule
