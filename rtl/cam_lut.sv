// cam_lut: the look-up table of the content-addressable memory, an array of
// WORDS x KEY_W conventional NOR-type CAM cells.
//
// Defaults are 4 words of 5 bits. Each cell (cam_cell) stores one bit and
// compares it with the search bit on its search lines; any mismatching cell
// of a row pulls that row's match line low (a wired NOR), so match[i] is high
// exactly when word i equals key. All rows are compared in parallel, combinationally.
//
// Writing: while we is high the word selected by waddr follows wword
// (level-sensitive, like the register file's latches); it is held when we
// falls. waddr must be stable while we is high. No reset: a word that has
// never been written holds an unknown value and may match.
module cam_lut #(
  parameter int unsigned WORDS = rf_pkg::CAM_WORDS,
  parameter int unsigned KEY_W = rf_pkg::CAM_KEY_W,
  parameter int unsigned IDX_W = $clog2(WORDS)
) (
  input  logic             we,
  input  logic [IDX_W-1:0] waddr,
  input  logic [KEY_W-1:0] wword,
  input  logic [KEY_W-1:0] key,
  output logic [WORDS-1:0] match
);
  for (genvar i = 0; i < WORDS; i++) begin : g_row
    logic             row_we;
    logic [KEY_W-1:0] mismatch;

    assign row_we = we && (waddr == IDX_W'(i));

    for (genvar b = 0; b < KEY_W; b++) begin : g_cell
      cam_cell u_cell (
        .we       (row_we),
        .d        (wword[b]),
        .s        (key[b]),
        .mismatch (mismatch[b])
      );
    end

    // Match line: NOR of the row's mismatch signals.
    assign match[i] = ~|mismatch;
  end
endmodule
