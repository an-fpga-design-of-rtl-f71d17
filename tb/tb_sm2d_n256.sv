// tb_sm2d_n256: the 256 x 256 workload.  The processor is built with
// N = 256 (FIFO delays of 256 words, 18-bit frame counters) and runs one
// S-method frame of random 8-bit samples from its reset configuration
// (FD = 253, SC = 514, WS = 3, DB = 65024, EOF = 65535).  Every result is
// compared with the S-method computed in the test (same formula and output
// alignment as in tb_sm2d_system), and the number of results, the position
// index, the border padding and END_PROC_FRAME are checked.
module tb_sm2d_n256;
  import sm2d_pkg::*;

  localparam int N   = 256;
  localparam int DIV = 8;
  localparam int CW  = 18;

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

  sm2d_system #(.N(N), .DIV(DIV)) dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int n_left = 0, n_down = 0, n_zero = 0;

  initial begin
    repeat (700000) @(posedge clk);
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

  int  samp [N*N];
  int  k_in = 0;
  int  q_out = 0;
  bit  running = 0;

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
      if (left_border && sm_clk_en && sm_step == 0) n_left++;
      if (down_border && sm_clk_en && sm_step == 0) n_down++;
      if (sm_valid) begin
        check(int'(sm_out) == expected(q_out),
              $sformatf("out %0d = %0d expected %0d", q_out, sm_out, expected(q_out)));
        check(int'(position) == q_out, "position index");
        if (sm_out == 0) n_zero++;
        q_out <= q_out + 1;
      end
    end
  end

  initial begin
    for (int i = 0; i < N * N; i++) samp[i] = 1 + $urandom % 255;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); clear = 1'b1;
    running = 1'b1;
    @(negedge clk); clear = 1'b0;
    wait (end_proc_frame);
    #1;
    check(k_in == N * N + 2 * N + 3, $sformatf("samples taken %0d", k_in));
    repeat (3 * DIV) @(negedge clk);
    check(q_out == N * N, $sformatf("results %0d", q_out));
    check(n_left == 2 * N && n_down == 2 * N, $sformatf("border positions %0d %0d", n_left, n_down));
    check(n_zero == 4 * N - 4, $sformatf("padded results %0d", n_zero));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
