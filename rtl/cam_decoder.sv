// cam_decoder: 2:4 reversible decoder that turns the encoder's index back into
// a one-hot location, built from three gates.
//
// A Feynman gate with a constant 1 gives a and ~a for the high bit a = addr[1];
// two Fredkin gates, controlled by the low bit b = addr[0] with a constant 0 on
// their third inputs, split ~a into ~a~b and ~ab and a into a~b and ab. So
// loc[k] is high exactly when addr == k. Purely combinational. Only the gate
// count (three) is given for this decoder; the choice of gates, the first two
// stages of the register file's 5:32 decoder, is this design's.
module cam_decoder (
  input  logic [1:0] addr,
  output logic [3:0] loc
);
  logic na, pa;
  logic unused_p0, unused_p1;

  feynman_gate u_fey (
    .a (addr[1]),
    .b (1'b1),
    .p (pa),
    .q (na)
  );

  fredkin_gate u_fred0 (
    .a (addr[0]), .b (na), .c (1'b0),
    .p (unused_p0), .q (loc[0]), .r (loc[1])
  );

  fredkin_gate u_fred1 (
    .a (addr[0]), .b (pa), .c (1'b0),
    .p (unused_p1), .q (loc[2]), .r (loc[3])
  );
endmodule
