// tb_register_file: self-checking test of the 32 x 8 register file at its
// default size against a behavioural array model.
//
// Writes follow the register file's protocol: waddr and wdata are set while
// the control line is high (read), the line is pulsed low for one clock
// period, and raised again before the address changes. Every register is
// written first, then 400 random operations mix writes with reads on both
// ports at independent random addresses. Checked: read data on both ports,
// both ports reading 0 while the line is low, and that a write leaves every
// other register unchanged (full sweep every 50 operations).
module tb_register_file;
  import rf_pkg::*;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 5;
  localparam int unsigned NREGS  = 2**ADDR_W;

  int checks = 0;
  int failures = 0;
  int writes = 0;
  int reads = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rf_ctrl_e          ctrl;
  logic [ADDR_W-1:0] waddr, raddr1, raddr2;
  logic [DATA_W-1:0] wdata, rdata1, rdata2;
  logic [DATA_W-1:0] model [NREGS];

  register_file dut (
    .ctrl(ctrl), .waddr(waddr), .wdata(wdata),
    .raddr1(raddr1), .raddr2(raddr2), .rdata1(rdata1), .rdata2(rdata2)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_eq(input logic [DATA_W-1:0] got, input logic [DATA_W-1:0] exp,
                          input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_write(input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] v);
    waddr = a;
    wdata = v;
    @(posedge clk);
    ctrl = RF_WRITE;
    @(posedge clk);
    // both read ports are disabled during a write
    check_eq(rdata1, '0, "read port 1 during write");
    check_eq(rdata2, '0, "read port 2 during write");
    ctrl = RF_READ;
    @(posedge clk);
    model[a] = v;
    writes++;
  endtask

  task automatic do_read(input logic [ADDR_W-1:0] a1, input logic [ADDR_W-1:0] a2);
    raddr1 = a1;
    raddr2 = a2;
    @(posedge clk);
    check_eq(rdata1, model[a1], $sformatf("read port 1 reg %0d", a1));
    check_eq(rdata2, model[a2], $sformatf("read port 2 reg %0d", a2));
    reads++;
  endtask

  task automatic sweep();
    for (int i = 0; i < NREGS; i++) do_read(ADDR_W'(i), ADDR_W'(NREGS - 1 - i));
  endtask

  initial begin
    ctrl   = RF_READ;
    waddr  = '0;
    wdata  = '0;
    raddr1 = '0;
    raddr2 = '0;
    @(posedge clk);
    for (int i = 0; i < NREGS; i++) do_write(ADDR_W'(i), DATA_W'($urandom));
    sweep();
    for (int k = 0; k < 400; k++) begin
      if ($urandom_range(0, 1) == 0) do_write(ADDR_W'($urandom), DATA_W'($urandom));
      else do_read(ADDR_W'($urandom), ADDR_W'($urandom));
      if (k % 50 == 49) sweep();
    end
    sweep();
    $display("writes=%0d reads=%0d", writes, reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
