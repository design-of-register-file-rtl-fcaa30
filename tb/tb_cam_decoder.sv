// tb_cam_decoder: exhaustive self-checking test of cam_decoder. Each of the four
// indices is applied and the location must be the one-hot code of the index.
module tb_cam_decoder;
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

  logic [1:0] addr;
  logic [3:0] loc;
  cam_decoder dut (.addr(addr), .loc(loc));

  initial begin
    for (int v = 0; v < 4; v++) begin
      addr = 2'(v);
      @(posedge clk);
      checks++;
      if (loc !== 4'(1 << v)) begin
        failures++;
        $display("FAIL v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
