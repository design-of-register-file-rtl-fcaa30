// tb_rev_dlatch: self-checking test of the reversible D latch. With en high q
// must follow d (checked for both values and after a change of d); with en low
// q must keep the value present when en fell, whatever d does.
module tb_rev_dlatch;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en, d, q;
  logic held;

  rev_dlatch dut (.en(en), .d(d), .q(q));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic v, input string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, v);
    end
  endtask

  initial begin
    en = 1'b1;
    for (int k = 0; k < 200; k++) begin
      // transparent phase
      en = 1'b1;
      d = 1'($urandom);
      @(posedge clk);
      expect_q(d, "transparent");
      d = ~d;
      @(posedge clk);
      expect_q(d, "transparent after change");
      held = 1'($urandom);
      d = held;
      @(posedge clk);
      // hold phase: d toggles while en is low
      en = 1'b0;
      @(posedge clk);
      d = ~held;
      @(posedge clk);
      expect_q(held, "hold");
      d = held;
      @(posedge clk);
      d = ~held;
      @(posedge clk);
      expect_q(held, "hold after toggles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
