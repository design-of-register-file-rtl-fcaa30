// tb_cam_lut: self-checking test of the 4 x 5 CAM look-up table against a
// behavioural model. Four words are written, then every 5-bit key is
// searched and each match line must say whether its word equals the key.
// This is repeated for 30 random word sets, some with duplicate words, and a
// word is rewritten to check that the others are left unchanged.
module tb_cam_lut;
  localparam int unsigned WORDS = 4;
  localparam int unsigned KEY_W = 5;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we;
  logic [1:0]       waddr;
  logic [KEY_W-1:0] wword, key;
  logic [WORDS-1:0] match, exp_match;
  logic [KEY_W-1:0] model [WORDS];

  cam_lut #(.WORDS(WORDS), .KEY_W(KEY_W)) dut (
    .we(we), .waddr(waddr), .wword(wword), .key(key), .match(match)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input int i, input logic [KEY_W-1:0] w);
    waddr = 2'(i);
    wword = w;
    @(posedge clk);
    we = 1'b1;
    @(posedge clk);
    we = 1'b0;
    @(posedge clk);
    model[i] = w;
  endtask

  task automatic search_all();
    for (int k = 0; k < 2**KEY_W; k++) begin
      key = KEY_W'(k);
      @(posedge clk);
      for (int i = 0; i < WORDS; i++) exp_match[i] = (model[i] == key);
      checks++;
      if (match !== exp_match) begin
        failures++;
        $display("FAIL key=%h match=%b expected %b", key, match, exp_match);
      end
    end
  endtask

  initial begin
    we = 1'b0;
    waddr = '0;
    wword = '0;
    key = '0;
    for (int s = 0; s < 30; s++) begin
      for (int i = 0; i < WORDS; i++) write_word(i, KEY_W'($urandom));
      if (s % 3 == 0) write_word(3, model[1]);   // duplicate word
      search_all();
    end
    write_word(2, ~model[2]);
    search_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
