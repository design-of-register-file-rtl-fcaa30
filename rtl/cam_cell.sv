// cam_cell: one NOR-type CAM cell of the look-up table.
//
// It stores one bit, written level-sensitively (the bit follows d while we is
// high and is held when we falls), and compares it with the search bit s.
// mismatch is high when the stored bit differs from s; in a NOR match line
// it is the pull-down that discharges the line, so a row matches when none of
// its cells mismatches. No reset. Interface: we, d (write), s (search bit),
// mismatch (to the match line).
module cam_cell (
  input  logic we,
  input  logic d,
  input  logic s,
  output logic mismatch
);
  logic bit_q;

  always_latch begin
    if (we) bit_q = d;
  end

  assign mismatch = bit_q ^ s;
endmodule
