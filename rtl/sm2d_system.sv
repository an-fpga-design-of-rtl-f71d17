// sm2d_system: multiple-clock-cycle processor for the 2-D S-method.
//
// The 2-D S-method sharpens a 2-D short-time Fourier transform (STFT) by
// adding, for every point (k1,k2) of the frequency plane, products of STFT
// samples placed symmetrically around it.  With a 3x3 window (L = 1) the real
// part is
//   SM = S(k1,k2)^2 + 2[S(k1,k2+1)S(k1,k2-1) + S(k1+1,k2+1)S(k1-1,k2-1)
//                     + S(k1+1,k2)S(k1-1,k2) + S(k1+1,k2-1)S(k1-1,k2+1)],
// five products.  Instead of five multipliers, one multiplier and one
// cumulative adder (the STFT-to-SM gateway) are reused over five system
// clocks per point; the spectrogram (one product) uses the same kernel for
// one clock.  This module is one computational line (real part); the
// imaginary part uses a second identical instance and the two results are
// added outside.
//
// Structure:
//   config_regs       FD, SC, WS, DB, EOF, written through cfg_din/addr/en
//   clk_sync          shift strobe every DIV system clocks
//   conv_window_regs  3x3 window registers ...
//   fifo_delay x2     ... with N - 3 sample delays between the rows
//   frame_ctrl        SM_START, SM_CLK_EN, LEFT_BORDER, DOWN_BORDER,
//                     END_PROC_FRAME
//   stft_to_sm_gateway  MUX1/MUX2, MULT, ShLEFT, CumADD, OutREG + sequencer
// Glue: EXT_RESET = NOT SM_CLK_EN; CumADD_Clear = LEFT_BORDER OR DOWN_BORDER.
//
// Interface and timing: the data source presents stft_in (8-bit unsigned
// STFT sample, raster order, row index k1 slow, column index k2 fast) and
// holds it until shift_in_stb, a one-cycle pulse every DIV clocks on whose
// rising edge the sample is taken; it then presents the next one.  After
// the N*N samples of a frame it keeps shifting for SC more strobes (zeros or
// the next frame).  Every window position produces one result: sm_valid
// pulses for one cycle with sm_out in the cycle after the CN(L)-th clock
// edge following the loading edge (5 edges for the S-method, 1 for the
// spectrogram); one result is produced per DIV clocks.  Results form an N x N frame in raster order: output (r,c)
// is the S-method at input point (r+1, c+1); the last two rows and columns
// are zero (border padding).  end_proc_frame rises after the last result.
// clear (one cycle) restarts the frame counters and the FIFO delays; no
// sample is taken during it.
// tfd_mode selects the spectrogram (0) or the S-method (1); change it only
// between frames.  rst_n is an asynchronous active-low reset.
//
// The block structure, the window geometry, the parameter formulas, the
// 8-bit input and 20-bit output widths, N = 64 and the glue logic follow the
// design description; the single clock with enables, DIV = 8 and the output
// frame alignment are this design's choices.
module sm2d_system
  import sm2d_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned DIV = 8,
  parameter int unsigned FDW = $clog2(N),
  parameter int unsigned CW  = 2 * $clog2(N) + 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  // configuration registers
  input  logic                        cfg_en,
  input  logic [CFG_ADDR_W-1:0]       cfg_addr,
  input  logic [CW-1:0]               cfg_din,
  // distribution select
  input  tfd_mode_e                   tfd_mode,
  // STFT input
  input  logic [DATA_W-1:0]           stft_in,
  output logic                        shift_in_stb,
  output logic                        shift_in_clk,
  // window taps
  output logic [TAPS-1:0][DATA_W-1:0] dout,     // window taps DOUT0..DOUT8
  // S-method output
  output logic [SM_W-1:0]             sm_out,
  output logic                        sm_valid,
  output logic [SM_W-1:0]             cum_sm,
  output logic [LUT_W-1:0]            sel_stft,
  output logic                        shl_or_no,
  output logic                        int_reset,
  output logic [STEP_W-1:0]           sm_step,
  output logic                        fifo_ready,
  // frame control
  output logic                        sm_start,
  output logic                        sm_clk_en,
  output logic                        left_border,
  output logic                        down_border,
  output logic                        end_proc_frame,
  output logic [CW-1:0]               position
);

  localparam int unsigned WSW = 4;

  logic [FDW-1:0]    fd;
  logic [CW-1:0]     sc, db, eof;
  logic [WSW-1:0]    ws;
  logic              shift_raw, shift;
  logic [DATA_W-1:0] row_out0, row_out1, ddel1, ddel2;
  logic              fifo1_started, fifo2_started;
  logic              ext_reset, cumadd_clear;
  logic [MUX_IN-1:0][DATA_W-1:0] gw_in;

  config_regs #(.N(N), .L(L_WIN), .FDW(FDW), .CW(CW), .WSW(WSW)) u_cfg (
    .clk (clk), .rst_n (rst_n),
    .en (cfg_en), .addr (cfg_addr), .din (cfg_din),
    .fd (fd), .sc (sc), .ws (ws), .db (db), .eof (eof)
  );

  clk_sync #(.DIV(DIV)) u_clk (
    .clk (clk), .rst_n (rst_n),
    .shift_stb (shift_raw), .shift_in_clk (shift_in_clk)
  );

  // No sample is taken in a clear cycle, so the window and the FIFO delays
  // stay in step with the frame counters.
  assign shift        = shift_raw && !clear;
  assign shift_in_stb = shift;

  conv_window_regs #(.W(DATA_W)) u_win (
    .clk (clk), .rst_n (rst_n), .shift (shift),
    .stft_in (stft_in), .row_in1 (ddel1), .row_in2 (ddel2),
    .row_out0 (row_out0), .row_out1 (row_out1), .dout (dout)
  );

  fifo_delay #(.W(DATA_W), .DEPTH(N), .AW(FDW)) u_fifo1 (
    .clk (clk), .rst_n (rst_n), .clear (clear), .shift (shift),
    .delay (fd), .din (row_out0), .dout (ddel1), .start_out (fifo1_started)
  );

  fifo_delay #(.W(DATA_W), .DEPTH(N), .AW(FDW)) u_fifo2 (
    .clk (clk), .rst_n (rst_n), .clear (clear), .shift (shift),
    .delay (fd), .din (row_out1), .dout (ddel2), .start_out (fifo2_started)
  );

  frame_ctrl #(.FDW(FDW), .CW(CW), .WSW(WSW)) u_frame (
    .clk (clk), .rst_n (rst_n), .clear (clear), .shift (shift),
    .fd (fd), .sc (sc), .ws (ws), .db (db), .eof (eof),
    .sm_start (sm_start), .sm_clk_en (sm_clk_en),
    .left_border (left_border), .down_border (down_border),
    .end_proc_frame (end_proc_frame), .position (position)
  );

  assign ext_reset    = !sm_clk_en;
  assign cumadd_clear = left_border || down_border;

  always_comb begin
    gw_in = '0;
    for (int t = 0; t < TAPS; t++) gw_in[t] = dout[t];
  end

  stft_to_sm_gateway u_gw (
    .clk (clk), .rst_n (rst_n),
    .step_en (sm_clk_en), .ext_reset (ext_reset), .cumadd_clear (cumadd_clear),
    .mode (tfd_mode), .stft (gw_in),
    .sm (sm_out), .sm_store (sm_valid), .cum_sm (cum_sm),
    .sel_stft (sel_stft), .shl_or_no (shl_or_no), .int_reset (int_reset),
    .step (sm_step)
  );

  assign fifo_ready = fifo1_started && fifo2_started;

  // A shift must leave the gateway CN(1) enabled cycles plus the reset cycle.
  initial assert (DIV >= CN_SM + 1) else $error("DIV must be at least CN + 1");

endmodule
