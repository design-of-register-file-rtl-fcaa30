// tb_rev_cam: end-to-end self-checking test of the CAM with its register
// file, at the design's default sizes (no parameter is overridden).
//
// Each of 20 rounds loads the four look-up-table words (some rounds with a
// duplicate word) and writes fresh data into all 32 registers, then searches
// every 5-bit key. For each key a behavioural model gives whether a word
// matches, the lowest matching index, its one-hot location and the register
// data stored with it; read port 2 is checked at a random address alongside.
// Searches are also made while the register file is writing, when the data
// outputs must read 0. Each mechanism of the design is counted: look-up-table
// writes, register writes, hits, misses, multiple matches resolved by
// priority, reads through port 2 and reads blocked by a write. One that
// never happened counts as a failure.
module tb_rev_cam;
  import rf_pkg::*;

  localparam int unsigned DATA_W = RF_DATA_W;
  localparam int unsigned ADDR_W = RF_ADDR_W;
  localparam int unsigned NREGS  = RF_NREGS;
  localparam int unsigned KEY_W  = CAM_KEY_W;

  int checks = 0;
  int failures = 0;
  int n_lut_write = 0, n_rf_write = 0, n_hit = 0, n_miss = 0;
  int n_multi = 0, n_port2 = 0, n_blocked = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              lut_we;
  logic [1:0]        lut_waddr;
  logic [KEY_W-1:0]  lut_wword;
  rf_ctrl_e          rf_ctrl;
  logic [ADDR_W-1:0] rf_waddr, rf_raddr2;
  logic [DATA_W-1:0] rf_wdata, rf_rdata2;
  logic [KEY_W-1:0]  key;
  logic              found;
  logic [1:0]        match_addr;
  logic [3:0]        match_loc;
  logic [DATA_W-1:0] match_data;

  logic [KEY_W-1:0]  lut_model [4];
  logic [DATA_W-1:0] rf_model [NREGS];

  rev_cam dut (
    .lut_we(lut_we), .lut_waddr(lut_waddr), .lut_wword(lut_wword),
    .rf_ctrl(rf_ctrl), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .rf_raddr2(rf_raddr2), .rf_rdata2(rf_rdata2),
    .key(key), .found(found), .match_addr(match_addr),
    .match_loc(match_loc), .match_data(match_data)
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic lut_write(input int i, input logic [KEY_W-1:0] w);
    lut_waddr = 2'(i);
    lut_wword = w;
    @(posedge clk);
    lut_we = 1'b1;
    @(posedge clk);
    lut_we = 1'b0;
    @(posedge clk);
    lut_model[i] = w;
    n_lut_write++;
  endtask

  task automatic rf_write(input int a, input logic [DATA_W-1:0] v);
    rf_waddr = ADDR_W'(a);
    rf_wdata = v;
    @(posedge clk);
    rf_ctrl = RF_WRITE;
    @(posedge clk);
    // a search made during the write still finds the word, but no data
    check(match_data == '0 && rf_rdata2 == '0, "data outputs read 0 during a write");
    n_blocked++;
    rf_ctrl = RF_READ;
    @(posedge clk);
    rf_model[a] = v;
    n_rf_write++;
  endtask

  task automatic search(input logic [KEY_W-1:0] k);
    int first, count;
    key = k;
    rf_raddr2 = ADDR_W'($urandom);
    @(posedge clk);
    first = -1;
    count = 0;
    for (int i = 3; i >= 0; i--) begin
      if (lut_model[i] == k) begin
        first = i;
        count++;
      end
    end
    check(found == (first >= 0), $sformatf("found for key %h", k));
    if (first >= 0) begin
      check(int'(match_addr) == first, $sformatf("match_addr for key %h", k));
      check(match_loc == 4'(1 << first), $sformatf("match_loc for key %h", k));
      check(match_data == rf_model[first], $sformatf("match_data for key %h", k));
      n_hit++;
      if (count > 1) n_multi++;
    end else begin
      n_miss++;
    end
    check(rf_rdata2 == rf_model[rf_raddr2], "read port 2");
    n_port2++;
  endtask

  initial begin
    lut_we    = 1'b0;
    lut_waddr = '0;
    lut_wword = '0;
    rf_ctrl   = RF_READ;
    rf_waddr  = '0;
    rf_wdata  = '0;
    rf_raddr2 = '0;
    key       = '0;
    @(posedge clk);
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 4; i++) lut_write(i, KEY_W'($urandom));
      if (r % 4 == 1) lut_write(2, lut_model[0]);
      for (int a = 0; a < NREGS; a++) rf_write(a, DATA_W'($urandom));
      for (int k = 0; k < 2**KEY_W; k++) search(KEY_W'(k));
    end
    $display("lut_writes=%0d rf_writes=%0d hits=%0d misses=%0d multi=%0d port2=%0d blocked=%0d",
             n_lut_write, n_rf_write, n_hit, n_miss, n_multi, n_port2, n_blocked);
    if (n_lut_write == 0) begin failures++; $display("FAIL no look-up-table write"); end
    if (n_rf_write == 0)  begin failures++; $display("FAIL no register write"); end
    if (n_hit == 0)       begin failures++; $display("FAIL no hit"); end
    if (n_miss == 0)      begin failures++; $display("FAIL no miss"); end
    if (n_multi == 0)     begin failures++; $display("FAIL no multiple match"); end
    if (n_port2 == 0)     begin failures++; $display("FAIL no port-2 read"); end
    if (n_blocked == 0)   begin failures++; $display("FAIL no read blocked by a write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
