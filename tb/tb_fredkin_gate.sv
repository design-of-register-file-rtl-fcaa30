// tb_fredkin_gate: exhaustive self-checking test of fredkin_gate. Every input
// combination is applied and each output is compared with the gate's truth
// table, worked out here from the gate's definition.
module tb_fredkin_gate;
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

  logic a, b, c, p, q, r;
  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      // b and c swap when a is 1; the number of ones is kept
      if (p !== a || q !== (a ? c : b) || r !== (a ? b : c) ||
          (int'(p) + int'(q) + int'(r)) != (int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
