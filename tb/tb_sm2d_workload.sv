// tb_sm2d_workload: the 64 x 64 test-signal workload at default parameters.
//
// The test image is the sum of
//   f(x,y)   = cos(20 pi (x-0.75)^2 + 22 pi (y-0.75)^2)
//              + 0.5 exp(j[-100 cos(pi x/2) + 100 cos(pi y/2)]),  |x|,|y| < 0.75
//   f_s(x,y) = cos(1000 pi [(x+0.5)^2 + (y-0.5)^2]),
//              on |x+y| < 0.1 and |y-x-1| < 0.1,
// and zero elsewhere.  The bench computes its 2-D STFT at the space point
// (x,y) = (-0.25,-0.25) with a separable Hanning window of width 1 along each
// axis sampled at N = 64 points (spacing 1/64), as a 64 x 64 DFT done row by
// row and column by column.  The real and the imaginary parts are each
// normalised to 0..255 and rounded to 8 bits.  Both 64 x 64 frames are then
// streamed through the processor (the imaginary line is an identical copy of
// the real one, so one instance serves both, one frame after the other).
// Every result is compared with the S-method computed here in integer
// arithmetic from the same 8-bit samples, with the output alignment of the
// design (output (r,c) = SM at (r+1,c+1), zero in the last two rows and
// columns).  The bench also reports where the combined (real + imaginary)
// S-method peaks.
module tb_sm2d_workload;
  import sm2d_pkg::*;

  localparam int N   = 64;
  localparam int DIV = 8;
  localparam int CW  = 14;
  localparam real PI = 3.14159265358979;

  logic                        clk = 1'b0;
  logic                        rst_n = 1'b1;
  logic                        clear = 1'b0;
  logic                        cfg_en = 1'b0;
  logic [CFG_ADDR_W-1:0]       cfg_addr = '0;
  logic [CW-1:0]               cfg_din = '0;
  tfd_mode_e                   tfd_mode = MODE_SM;
  logic [DATA_W-1:0]           stft_in;
  logic                        shift_in_stb, shift_in_clk;
  logic [TAPS-1:0][DATA_W-1:0] dout;
  logic [SM_W-1:0]             sm_out, cum_sm;
  logic                        sm_valid;
  logic [LUT_W-1:0]            sel_stft;
  logic                        shl_or_no, int_reset;
  logic [STEP_W-1:0]           sm_step;
  logic                        fifo_ready;
  logic                        sm_start, sm_clk_en, left_border, down_border, end_proc_frame;
  logic [CW-1:0]               position;

  sm2d_system dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 1'b0;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // 2-D STFT of the test image at one space point
  real sig_re [N][N], sig_im [N][N];
  real tmp_re [N][N], tmp_im [N][N];
  real st_re  [N][N], st_im  [N][N];
  real ctab [N], stab [N], win [N];

  int  samp [N*N];
  int  k_in = 0;
  int  q_out = 0;
  bit  running = 0;
  int  sm_sum [N*N];

  assign stft_in = (k_in < N * N) ? DATA_W'(samp[k_in]) : '0;

  function automatic int s(input int r, input int c);
    return samp[r * N + c];
  endfunction

  function automatic int expected(input int q);
    int r, c;
    r = q / N;
    c = q % N;
    if (r > N - 3 || c > N - 3) return 0;
    return s(r+1, c+1) * s(r+1, c+1)
         + 2 * (s(r+1, c+2) * s(r+1, c) + s(r+2, c+2) * s(r, c)
              + s(r+2, c+1) * s(r, c+1) + s(r+2, c) * s(r, c+2));
  endfunction

  always @(posedge clk) begin
    if (running) begin
      if (shift_in_stb) k_in <= k_in + 1;
      if (sm_valid) begin
        check(int'(sm_out) == expected(q_out),
              $sformatf("out %0d = %0d expected %0d", q_out, sm_out, expected(q_out)));
        sm_sum[q_out] += int'(sm_out);
        q_out <= q_out + 1;
      end
    end
  end

  task automatic build_image();
    real x, y, x0, y0, ph;
    x0 = -0.25; y0 = -0.25;
    for (int m = 0; m < N; m++) begin
      win[m]  = 0.5 - 0.5 * $cos(2.0 * PI * m / N);
      ctab[m] = $cos(2.0 * PI * m / N);
      stab[m] = $sin(2.0 * PI * m / N);
    end
    for (int m = 0; m < N; m++)
      for (int n = 0; n < N; n++) begin
        x = x0 + real'(m - N / 2) / N;
        y = y0 + real'(n - N / 2) / N;
        sig_re[m][n] = 0.0;
        sig_im[m][n] = 0.0;
        if (x > -0.75 && x < 0.75 && y > -0.75 && y < 0.75) begin
          ph = -100.0 * $cos(PI * x / 2.0) + 100.0 * $cos(PI * y / 2.0);
          sig_re[m][n] = $cos(20.0 * PI * (x - 0.75) ** 2 + 22.0 * PI * (y - 0.75) ** 2)
                       + 0.5 * $cos(ph);
          sig_im[m][n] = 0.5 * $sin(ph);
        end
        if ((x + y) > -0.1 && (x + y) < 0.1 && (y - x - 1.0) > -0.1 && (y - x - 1.0) < 0.1)
          sig_re[m][n] += $cos(1000.0 * PI * ((x + 0.5) ** 2 + (y - 0.5) ** 2));
        sig_re[m][n] *= win[m] * win[n];
        sig_im[m][n] *= win[m] * win[n];
      end
    // DFT along n, then along m
    for (int m = 0; m < N; m++)
      for (int k = 0; k < N; k++) begin
        tmp_re[m][k] = 0.0; tmp_im[m][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          int i;
          i = (k * n) % N;
          tmp_re[m][k] += sig_re[m][n] * ctab[i] + sig_im[m][n] * stab[i];
          tmp_im[m][k] += sig_im[m][n] * ctab[i] - sig_re[m][n] * stab[i];
        end
      end
    for (int k1 = 0; k1 < N; k1++)
      for (int k2 = 0; k2 < N; k2++) begin
        st_re[k1][k2] = 0.0; st_im[k1][k2] = 0.0;
        for (int m = 0; m < N; m++) begin
          int i;
          i = (k1 * m) % N;
          st_re[k1][k2] += tmp_re[m][k2] * ctab[i] + tmp_im[m][k2] * stab[i];
          st_im[k1][k2] += tmp_im[m][k2] * ctab[i] - tmp_re[m][k2] * stab[i];
        end
      end
  endtask

  // normalise one part to 0..255 and round to 8 bits
  task automatic quantise(input bit imag);
    real lo, hi, v;
    lo = 1.0e30; hi = -1.0e30;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        v = imag ? st_im[a][b] : st_re[a][b];
        if (v < lo) lo = v;
        if (v > hi) hi = v;
      end
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        v = imag ? st_im[a][b] : st_re[a][b];
        samp[a * N + b] = int'((v - lo) / (hi - lo) * 255.0);
      end
  endtask

  task automatic run_frame();
    running = 1'b0;
    @(negedge clk); clear = 1'b1;
    k_in = 0; q_out = 0;
    running = 1'b1;
    @(negedge clk); clear = 1'b0;
    wait (end_proc_frame);
    repeat (3 * DIV) @(negedge clk);
    check(q_out == N * N, $sformatf("results per frame %0d", q_out));
  endtask

  initial begin
    int best, best_q;
    for (int i = 0; i < N * N; i++) sm_sum[i] = 0;
    build_image();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    quantise(1'b0);
    run_frame();
    quantise(1'b1);
    run_frame();
    best = -1; best_q = 0;
    for (int i = 0; i < N * N; i++)
      if (sm_sum[i] > best) begin best = sm_sum[i]; best_q = i; end
    $display("combined S-method peak %0d at output (%0d,%0d)", best, best_q / N, best_q % N);
    check(best > 0, "non-zero distribution");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
