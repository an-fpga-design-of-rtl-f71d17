// tb_sm2d_system: end-to-end test of the 2-D S-method processor at its
// default size (64 x 64 frame, shift strobe every 8 clocks).
//
// Three frames are streamed in raster order:
//   1. S-method, reset configuration (N = 64), a deterministic test image
//      made of a 2-D chirp plus a sinusoidally modulated component, scaled
//      to 0..255;
//   2. spectrogram, registers reprogrammed for a 32 x 32 frame through the
//      configuration port, random samples;
//   3. S-method, registers reprogrammed back to 64 x 64, random samples.
// For every frame the test keeps the samples and computes, independently of
// the design, the expected output frame: output (r,c) is
//   s(r+1,c+1)^2 + 2[s(r+1,c+2)s(r+1,c) + s(r+2,c+2)s(r,c)
//                   + s(r+2,c+1)s(r,c+1) + s(r+2,c)s(r,c+2)]
// (only the square term for the spectrogram) for r, c <= n - 3, and 0 in the
// last two rows and columns.  It checks every result, the number of results,
// the latency from the loading edge (5 clock edges for the S-method, 1 for
// the spectrogram), the rate (one result per 8 clocks), the position index
// and END_PROC_FRAME.  It counts how often each mechanism occurred (start of
// convolution, left border, down border, end of frame, configuration write,
// spectrogram and S-method frames, FIFO fill) and fails if one never did.
module tb_sm2d_system;
  import sm2d_pkg::*;

  localparam int N   = 64;
  localparam int DIV = 8;
  localparam int CW  = 14;

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

  // mechanism counters
  int n_start = 0, n_left = 0, n_down = 0, n_eof = 0, n_cfg = 0;
  int n_spec = 0, n_sm = 0, n_fifo = 0;

  initial begin
    repeat (400000) @(posedge clk);
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

  // frame storage
  int          nf;              // current frame size
  tfd_mode_e   fmode;
  int          samp [N*N];
  int          k_in;            // samples taken since clear
  int          q_out;           // results seen since clear
  longint      cyc = 0, last_shift = 0, last_valid = -1;
  bit          running = 0;

  assign stft_in = (k_in < nf * nf) ? DATA_W'(samp[k_in]) : '0;

  function automatic int s(input int r, input int c);
    return samp[r * nf + c];
  endfunction

  function automatic int expected(input int q);
    int r, c, v;
    r = q / nf;
    c = q % nf;
    if (r > nf - 3 || c > nf - 3) return 0;
    v = s(r+1, c+1) * s(r+1, c+1);
    if (fmode == MODE_SM)
      v += 2 * (s(r+1, c+2) * s(r+1, c) + s(r+2, c+2) * s(r, c)
              + s(r+2, c+1) * s(r, c+1) + s(r+2, c) * s(r, c+2));
    return v;
  endfunction

  // monitor
  bit prev_start = 0, prev_eof = 0, prev_fifo = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (running) begin
      if (shift_in_stb) begin
        k_in <= k_in + 1;
        last_shift <= cyc;
      end
      if (left_border && sm_clk_en && sm_step == 0) n_left++;
      if (down_border && sm_clk_en && sm_step == 0) n_down++;
      if (sm_start && !prev_start) n_start++;
      if (end_proc_frame && !prev_eof) n_eof++;
      if (fifo_ready && !prev_fifo) n_fifo++;
      if (sm_valid) begin
        check(!end_proc_frame, "no result after END_PROC_FRAME");
        check(q_out < nf * nf, "result count within frame");
        check(int'(sm_out) == expected(q_out),
              $sformatf("n=%0d mode=%0d out %0d = %0d expected %0d", nf, fmode, q_out, sm_out, expected(q_out)));
        check(int'(position) == q_out, "position index");
        // sm_valid rises after the CN-th edge following the loading edge and
        // is therefore sampled on edge CN + 1.
        check(cyc - last_shift == ((fmode == MODE_SM) ? longint'(CN_SM) + 1 : 2),
              $sformatf("latency %0d", cyc - last_shift));
        if (last_valid >= 0) check(cyc - last_valid == longint'(DIV), $sformatf("rate %0d", cyc - last_valid));
        last_valid <= cyc;
        q_out <= q_out + 1;
      end
    end
    prev_start <= sm_start;
    prev_eof   <= end_proc_frame;
    prev_fifo  <= fifo_ready;
  end

  task automatic cfg_write(input cfg_addr_e a, input int v);
    @(negedge clk); cfg_en = 1'b1; cfg_addr = a; cfg_din = CW'(v);
    @(negedge clk); cfg_en = 1'b0;
    n_cfg++;
  endtask

  task automatic program_size(input int n);
    cfg_write(CFG_FD,  n - 3);
    cfg_write(CFG_SC,  2 * n + 2);
    cfg_write(CFG_WS,  3);
    cfg_write(CFG_DB,  (n - 2) * n);
    cfg_write(CFG_EOF, n * n - 1);
  endtask

  task automatic run_frame(input int n, input tfd_mode_e m);
    running = 1'b0;
    nf = n;
    fmode = m;
    tfd_mode = m;
    @(negedge clk); clear = 1'b1;
    k_in = 0; q_out = 0; last_valid = -1;
    running = 1'b1;
    @(negedge clk); clear = 1'b0;
    wait (end_proc_frame);
    #1;
    // the frame ends on the shift after the last position: SC + 1 + N*N loads
    check(k_in == n * n + 2 * n + 3, $sformatf("samples taken %0d", k_in));
    repeat (3 * DIV) @(negedge clk);
    check(q_out == n * n, $sformatf("results per frame %0d", q_out));
    if (m == MODE_SM) n_sm++; else n_spec++;
  endtask

  initial begin
    real x, y, v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // frame 1: test image, S-method, reset configuration
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        x = -0.75 + 1.5 * r / N;
        y = -0.75 + 1.5 * c / N;
        v = $cos(20.0 * 3.14159265 * (x - 0.75) ** 2 + 22.0 * 3.14159265 * (y - 0.75) ** 2)
          + 0.5 * $cos(-100.0 * $cos(3.14159265 * x / 2.0) + 100.0 * $cos(3.14159265 * y / 2.0));
        samp[r * N + c] = int'((v + 1.5) / 3.0 * 255.0);
        if (samp[r * N + c] > 255) samp[r * N + c] = 255;
        if (samp[r * N + c] < 0) samp[r * N + c] = 0;
      end
    run_frame(N, MODE_SM);

    // frame 2: 32 x 32, spectrogram
    program_size(32);
    for (int i = 0; i < N * N; i++) samp[i] = $urandom % 256;
    run_frame(32, MODE_SPEC);

    // frame 3: back to 64 x 64, S-method, random data
    program_size(N);
    for (int i = 0; i < N * N; i++) samp[i] = $urandom % 256;
    run_frame(N, MODE_SM);

    $display("mechanisms: start=%0d left_border=%0d down_border=%0d end_of_frame=%0d cfg_writes=%0d spec_frames=%0d sm_frames=%0d fifo_fill=%0d",
             n_start, n_left, n_down, n_eof, n_cfg, n_spec, n_sm, n_fifo);
    check(n_start == 3, "SM_START once per frame");
    check(n_eof == 3, "END_PROC_FRAME once per frame");
    check(n_left == 2 * (2 * 64) + 2 * 32, "left-border positions");
    check(n_down == 2 * (2 * 64) + 2 * 32, "down-border positions");
    check(n_cfg > 0 && n_spec > 0 && n_sm > 0 && n_fifo > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
