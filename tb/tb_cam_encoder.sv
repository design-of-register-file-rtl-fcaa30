// tb_cam_encoder: exhaustive self-checking test of cam_encoder. All sixteen
// match-line patterns are applied; hit must say whether any line matched and
// addr must be the lowest matching index.
module tb_cam_encoder;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] match;
  logic [1:0] addr;
  logic hit;
  int exp_addr;
  cam_encoder dut (.match(match), .addr(addr), .hit(hit));

  initial begin
    for (int v = 0; v < 16; v++) begin
      match = 4'(v);
      exp_addr = -1;
      for (int i = 3; i >= 0; i--) if (match[i]) exp_addr = i;
      @(posedge clk);
      checks++;
      if (hit !== (exp_addr >= 0) || (exp_addr >= 0 && int'(addr) != exp_addr)) begin
        failures++;
        $display("FAIL v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
