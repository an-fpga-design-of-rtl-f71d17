// tb_conv_window_regs: self-checking test of the 3x3 window register block.
//
// Random values are applied to the three row inputs with random shift
// strobes.  A model of three independent three-stage shift lines, kept in
// the test, gives the expected nine outputs and the two row outputs after
// every cycle; cycles without a strobe must leave everything unchanged.
module tb_conv_window_regs;
  import sm2d_pkg::*;

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  logic                          shift = 1'b0;
  logic [DATA_W-1:0]             stft_in = '0, row_in1 = '0, row_in2 = '0;
  logic [DATA_W-1:0]             row_out0, row_out1;
  logic [TAPS-1:0][DATA_W-1:0]   dout;

  int checks = 0, failures = 0;
  int model [3][3];

  conv_window_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int shifts = 0;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) model[r][c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      shift   = ($urandom % 3) != 0;
      stft_in = DATA_W'($urandom);
      row_in1 = DATA_W'($urandom);
      row_in2 = DATA_W'($urandom);
      if (shift) begin
        shifts++;
        for (int r = 0; r < 3; r++) begin
          model[r][2] = model[r][1];
          model[r][1] = model[r][0];
        end
        model[0][0] = int'(stft_in);
        model[1][0] = int'(row_in1);
        model[2][0] = int'(row_in2);
      end
      @(posedge clk); #1;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (int'(dout[3*r+c]) != model[r][c]) begin
            failures++;
            $display("FAIL t=%0d dout[%0d]=%0d expected %0d", t, 3*r+c, dout[3*r+c], model[r][c]);
          end
        end
      checks++;
      if (int'(row_out0) != model[0][2] || int'(row_out1) != model[1][2]) begin
        failures++;
        $display("FAIL row outputs");
      end
    end
    checks++;
    if (shifts < 500) begin failures++; $display("FAIL too few shifts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
