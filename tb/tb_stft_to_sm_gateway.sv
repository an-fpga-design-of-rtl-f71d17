// tb_stft_to_sm_gateway: self-checking test of the STFT-to-SM gateway.
//
// Each trial presents sixteen random 8-bit inputs, pulses ext_reset for one
// cycle and then holds step_en high for seven cycles, as the system does
// between two sample loads.  The stored result must equal
//   s4^2 + 2(s3 s5 + s0 s8 + s1 s7 + s2 s6)   (S-method)  or  s4^2 (spectrogram),
// computed here in plain integer arithmetic; sm_store must pulse exactly once,
// visible right after the CN-th enabled clock edge (5th and 1st).  Further trials check that
// cumadd_clear gives a stored zero, that the all-255 input gives the largest
// sum (585225) without overflow, and that inputs 9..15 do not matter.
module tb_stft_to_sm_gateway;
  import sm2d_pkg::*;

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  logic                          step_en = 1'b0;
  logic                          ext_reset = 1'b0;
  logic                          cumadd_clear = 1'b0;
  tfd_mode_e                     mode = MODE_SM;
  logic [MUX_IN-1:0][DATA_W-1:0] stft = '0;
  logic [SM_W-1:0]               sm;
  logic                          sm_store;
  logic [SM_W-1:0]               cum_sm;
  logic [LUT_W-1:0]              sel_stft;
  logic                          shl_or_no;
  logic                          int_reset;
  logic [STEP_W-1:0]             step;

  int checks = 0, failures = 0;

  stft_to_sm_gateway dut (.*);

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

  function automatic int ref_sm(input logic [MUX_IN-1:0][DATA_W-1:0] s, input tfd_mode_e m);
    int v;
    v = int'(s[4]) * int'(s[4]);
    if (m == MODE_SM)
      v += 2 * (int'(s[3]) * int'(s[5]) + int'(s[0]) * int'(s[8])
              + int'(s[1]) * int'(s[7]) + int'(s[2]) * int'(s[6]));
    return v;
  endfunction

  task automatic trial(input tfd_mode_e m, input bit clr, input int expect_v);
    int stores, at;
    mode = m;
    cumadd_clear = clr;
    @(negedge clk); ext_reset = 1'b1; step_en = 1'b0;
    @(negedge clk); ext_reset = 1'b0; step_en = 1'b1;
    stores = 0; at = -1;
    for (int c = 1; c <= 7; c++) begin
      @(posedge clk); #1;
      if (sm_store) begin stores++; at = c; end
      if (sm_store) check(int'(sm) == expect_v, $sformatf("result %0d expected %0d", sm, expect_v));
    end
    check(stores == 1, $sformatf("one store per position (got %0d)", stores));
    check(at == ((m == MODE_SM) ? CN_SM : 1), $sformatf("store latency %0d", at));
    @(negedge clk); step_en = 1'b0; cumadd_clear = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < MUX_IN; i++) stft[i] = DATA_W'($urandom);
      trial(MODE_SM, 1'b0, ref_sm(stft, MODE_SM));
      for (int i = 9; i < MUX_IN; i++) stft[i] = DATA_W'($urandom);
      trial(MODE_SPEC, 1'b0, ref_sm(stft, MODE_SPEC));
    end
    stft = '1;
    trial(MODE_SM, 1'b0, 585225);
    trial(MODE_SM, 1'b1, 0);
    trial(MODE_SPEC, 1'b1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
