// tb_config_regs: self-checking test of the configuration registers.
//
// After reset the registers must hold the values for N = 64, L = 1:
// FD = 61, SC = 130, WS = 3, DB = 3968, EOF = 4095 (worked out by hand from
// the formulas).  Then each register is written through din/addr/en with the
// values for N = 32 and read back, a write with en = 0 must change nothing,
// and a write to an unused address must change nothing.
module tb_config_regs;
  import sm2d_pkg::*;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  logic                  en = 1'b0;
  logic [CFG_ADDR_W-1:0] addr = '0;
  logic [13:0]           din = '0;
  logic [5:0]            fd;
  logic [13:0]           sc;
  logic [3:0]            ws;
  logic [13:0]           db;
  logic [13:0]           eof;

  int checks = 0, failures = 0;

  config_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input int v, input bit e);
    @(negedge clk); addr = CFG_ADDR_W'(a); din = 14'(v); en = e;
    @(negedge clk); en = 1'b0;
  endtask

  initial begin
    #3;
    check(fd == 61 && sc == 130 && ws == 3 && db == 3968 && eof == 4095, "reset values");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wr(0, 29, 1);   check(fd == 29,   "FD write");
    wr(1, 66, 1);   check(sc == 66,   "SC write");
    wr(2, 3, 1);    check(ws == 3,    "WS write");
    wr(3, 960, 1);  check(db == 960,  "DB write");
    wr(4, 1023, 1); check(eof == 1023, "EOF write");
    wr(1, 5, 0);    check(sc == 66,   "no write with en = 0");
    wr(7, 77, 1);
    check(fd == 29 && sc == 66 && ws == 3 && db == 960 && eof == 1023, "unused address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
