// tb_rev_mux: self-checking test of the 32:1 MFRG multiplexer at its default
// size. For 50 random data words every select value is applied and y must be
// the selected data bit; a one-hot and a one-cold data word are also swept so
// that each input is seen alone.
module tb_rev_mux;
  localparam int unsigned SEL_W = 5;
  localparam int unsigned N = 2**SEL_W;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]     d;
  logic [SEL_W-1:0] sel;
  logic             y;

  rev_mux #(.SEL_W(SEL_W)) dut (.d(d), .sel(sel), .y(y));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(input logic [N-1:0] data);
    d = data;
    for (int s = 0; s < N; s++) begin
      sel = SEL_W'(s);
      @(posedge clk);
      checks++;
      if (y !== data[s]) begin
        failures++;
        $display("FAIL d=%h sel=%0d y=%b", data, s, y);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      sweep(N'(1) << k);
      sweep(~(N'(1) << k));
    end
    for (int k = 0; k < 50; k++) sweep(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
