// tb_feynman_gate: exhaustive self-checking test of feynman_gate. Every input
// combination is applied and each output is compared with the gate's truth
// table, worked out here from the gate's definition.
module tb_feynman_gate;
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

  logic a, b, p, q;
  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
