// tb_gateway_ctrl: self-checking test of the gateway step sequencer.
//
// For both modes the test resets the counter with ext_reset, enables steps
// and compares each table word with an independently written list of the
// eq. (2) terms (tap pairs, doubling, store on the last step).  It checks
// that the sequencer takes exactly CN steps (5 for the S-method, 1 for the
// spectrogram) and then stops on an idle word, that step_en = 0 holds the
// step, and that ext_reset restarts it.
module tb_gateway_ctrl;
  import sm2d_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  logic              step_en = 1'b0;
  logic              ext_reset = 1'b0;
  tfd_mode_e         mode = MODE_SM;
  lut_word_t         word;
  logic [STEP_W-1:0] step;

  int checks = 0, failures = 0;

  gateway_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected pairs for the S-method, in step order
  int exp_a [5] = '{4, 3, 0, 1, 2};
  int exp_b [5] = '{4, 5, 8, 7, 6};
  int exp_s [5] = '{0, 1, 1, 1, 1};

  task automatic run_mode(input tfd_mode_e m, input int cn);
    int n_active;
    mode = m;
    @(negedge clk); ext_reset = 1'b1;
    @(negedge clk); ext_reset = 1'b0;
    check(step == 0, "ext_reset returns to step 0");
    step_en = 1'b1;
    n_active = 0;
    for (int c = 0; c < 8; c++) begin
      #1;
      if (word.acc) begin
        n_active++;
        if (m == MODE_SM) begin
          check(int'(word.sel1) == exp_a[c] && int'(word.sel2) == exp_b[c], $sformatf("SM step %0d taps", c));
          check(int'(word.shl) == exp_s[c], $sformatf("SM step %0d shift", c));
          check(word.store == (c == 4) && word.int_reset == (c == 4), $sformatf("SM step %0d store", c));
        end else begin
          check(word.sel1 == 4 && word.sel2 == 4 && !word.shl && word.store, "SPEC step 0");
        end
      end else begin
        check(word.store == 1'b0, "idle word never stores");
      end
      @(negedge clk);
    end
    check(n_active == cn, $sformatf("mode %0d takes %0d steps (got %0d)", m, cn, n_active));
    check(int'(step) == cn, "counter stops on the first idle word");
    // hold while disabled
    step_en = 1'b0;
    @(negedge clk); ext_reset = 1'b1;
    @(negedge clk); ext_reset = 1'b0;
    step_en = 1'b0;
    repeat (3) @(negedge clk);
    check(step == 0, "no advance while step_en = 0");
    step_en = 1'b1;
    @(negedge clk);
    check(step == 1, "advance by one with step_en = 1");
    step_en = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_mode(MODE_SM, 5);
    run_mode(MODE_SPEC, 1);
    run_mode(MODE_SM, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
