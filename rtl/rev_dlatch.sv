// rev_dlatch: level-sensitive D latch, the memory cell of the register file,
// made of one Fredkin gate and one Feynman gate.
//
// The Fredkin gate takes the enable en on its control input, the data d on
// its second input and the fed-back state on its third. Its third output is
// en ? d : state, which a Feynman gate with a constant 0 copies into the
// output q and the feedback line. While en is high q follows d; when en falls
// q keeps the last value. The latch has no reset: its content is undefined
// until written. Interface: en (write enable from the register file's AND
// gate), d (data bit), q (stored bit); no clock.
//
// In a reversible circuit the loop from the Fredkin gate's third output back
// to its third input is itself the storage. Here the loop is closed through an
// explicit level-sensitive latch element, so the state is a named variable.
// Lint and synthesis still report a combinational loop through that latch
// (latch -> Feynman -> Fredkin -> latch); the warning stands because the loop
// is the cell's feedback path. It is never transparent end to end: while the
// latch is open (en high) the Fredkin gate passes d, not the feedback, and
// while the Fredkin gate passes the feedback (en low) the latch is closed.
module rev_dlatch (
  input  logic en,
  input  logic d,
  output logic q
);
  logic state;
  logic next_state;
  logic fb;
  logic unused_p, unused_q;

  fredkin_gate u_fred (
    .a (en),
    .b (d),
    .c (fb),
    .p (unused_p),
    .q (unused_q),
    .r (next_state)
  );

  always_latch begin
    if (en) state = next_state;
  end

  feynman_gate u_fey (
    .a (state),
    .b (1'b0),
    .p (q),
    .q (fb)
  );
endmodule
