// tb_clk_sync: self-checking test of the shift-strobe generator.
//
// Over 100 periods the strobe must be a single-cycle pulse every DIV = 8
// clocks, and shift_in_clk must be high for the first four cycles of each
// period and low for the last four (the strobe cycle is the last one).
module tb_clk_sync;

  localparam int DIV = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  logic shift_stb, shift_in_clk;

  int checks = 0, failures = 0;

  clk_sync #(.DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int last = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 100 * DIV; c++) begin
      @(negedge clk);
      // after c + 1 clock edges out of reset the divider is at phase (c + 1) % DIV
      checks++;
      if (shift_stb != (((c + 1) % DIV) == DIV - 1)) begin failures++; $display("FAIL strobe at %0d", c); end
      checks++;
      if (shift_in_clk != (((c + 1) % DIV) < DIV / 2)) begin failures++; $display("FAIL shift_in_clk at %0d", c); end
      if (shift_stb) begin
        if (last >= 0) begin
          checks++;
          if (c - last != DIV) begin failures++; $display("FAIL period %0d", c - last); end
        end
        last = c;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
