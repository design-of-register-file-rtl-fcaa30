// tb_rev_decoder: self-checking test of the 5:32 reversible decoder at its
// default size. Every address is applied; exactly the addressed output line
// must be high.
module tb_rev_decoder;
  localparam int unsigned N = 5;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]    a;
  logic [2**N-1:0] y;

  rev_decoder #(.N(N)) dut (.a(a), .y(y));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**N; v++) begin
      logic [2**N-1:0] exp_y;
      a = N'(v);
      exp_y = '0;
      exp_y[v] = 1'b1;
      @(posedge clk);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL a=%0d y=%h", v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
