// tb_fifo_delay: self-checking test of the programmable row delay.
//
// A random sample stream is written with random gaps between shift strobes.
// With delay D the output seen at strobe k must be the sample written at
// strobe k - D, and 0 before D samples have been written; start_out must
// rise after exactly D strobes.  The test runs D = 61 (frame size 64,
// 3x3 window), then clears and runs D = 29 and D = 1 in the same memory.
module tb_fifo_delay;

  localparam int unsigned W = 8, DEPTH = 64, AW = 6;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  logic          clear = 1'b0;
  logic          shift = 1'b0;
  logic [AW-1:0] delay = AW'(61);
  logic [W-1:0]  din = '0;
  logic [W-1:0]  dout;
  logic          start_out;

  int checks = 0, failures = 0;
  int hist [$];

  fifo_delay #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int d, input int n);
    int expect_v;
    @(negedge clk); delay = AW'(d); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    hist.delete();
    for (int k = 0; k < n; k++) begin
      repeat ($urandom % 3) @(negedge clk);
      din = W'($urandom);
      expect_v = (k >= d) ? hist[k - d] : 0;
      check(start_out == (k >= d), $sformatf("start_out at strobe %0d, delay %0d", k, d));
      check(int'(dout) == expect_v, $sformatf("dout %0d expected %0d at strobe %0d, delay %0d", dout, expect_v, k, d));
      hist.push_back(int'(din));
      shift = 1'b1;
      @(negedge clk); shift = 1'b0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(61, 300);
    run(29, 200);
    run(1, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
