// tb_rf_control: exhaustive self-checking test of rf_control. Both levels of the
// control line are applied and the strobes are compared with the read/write
// coding: high reads both ports, low writes.
module tb_rf_control;
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

  logic ctrl, read1, read2, write;
  rf_control dut (.ctrl(ctrl), .read1(read1), .read2(read2), .write(write));

  initial begin
    for (int v = 0; v < 2; v++) begin
      ctrl = 1'(v);
      @(posedge clk);
      checks++;
      if (read1 !== ctrl || read2 !== ctrl || write !== !ctrl) begin
        failures++;
        $display("FAIL v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
