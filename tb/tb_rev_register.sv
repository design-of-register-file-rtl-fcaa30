// tb_rev_register: self-checking test of the 8-bit latch register. Random
// bytes are written with en high and must appear on q; with en low the byte
// must be held while d changes.
module tb_rev_register;
  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         en;
  logic [W-1:0] d, q, held;

  rev_register #(.W(W)) dut (.en(en), .d(d), .q(q));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      held = W'($urandom);
      en = 1'b1;
      d = held;
      @(posedge clk);
      checks++;
      if (q !== held) begin
        failures++;
        $display("FAIL write: q=%h expected %h", q, held);
      end
      en = 1'b0;
      @(posedge clk);
      d = ~held;
      @(posedge clk);
      d = W'($urandom);
      @(posedge clk);
      checks++;
      if (q !== held) begin
        failures++;
        $display("FAIL hold: q=%h expected %h", q, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
