// sm2d_pkg: shared types and constants of the 2-D S-method (SM) processor.
//
// The processor evaluates the real (or, with a second identical line, the
// imaginary) part of the 2-D S-method for a 3x3 frequency-domain window
// (L = 1).  Eq. (2) of the method splits each output point into
// CN(L) = 2L^2 + 2L + 1 products of 2-D STFT samples that lie symmetrically
// around the point; one product is formed per clock step.
//
// The window register block exposes nine taps, numbered as follows
// (k1 = row index of the frequency plane, k2 = column index):
//
//     tap 0 (k1+1,k2+1)   tap 1 (k1+1,k2)   tap 2 (k1+1,k2-1)
//     tap 3 (k1  ,k2+1)   tap 4 (k1  ,k2)   tap 5 (k1  ,k2-1)
//     tap 6 (k1-1,k2+1)   tap 7 (k1-1,k2)   tap 8 (k1-1,k2-1)
//
// The gateway's step sequencer is a 16-word x 12-bit look-up table
// (16 x 12 = 192 bits, the size that the quoted memory budget of the design
// leaves for it).  The bit layout of one word is this design's own choice
// and is given by lut_word_t below.  The table content is computed by
// lut_entry(); no data file is needed.
package sm2d_pkg;

  localparam int unsigned DATA_W    = 8;   // STFT sample width
  localparam int unsigned TAPS      = 9;   // (2L+1)^2 window elements, L = 1
  localparam int unsigned MUX_IN    = 16;  // multiplexer inputs (taps 9..15 tied to 0)
  localparam int unsigned SEL_W     = 4;   // multiplexer select width
  localparam int unsigned STEP_W    = 3;   // step counter width
  localparam int unsigned LUT_DEPTH = 16;
  localparam int unsigned LUT_W     = 12;
  localparam int unsigned PROD_W    = 2 * DATA_W;   // 16-bit product
  localparam int unsigned SM_W      = 20;  // cumulative adder / output width
  localparam int unsigned L_WIN     = 1;   // half-width of the window built here
  localparam int unsigned CN_SM     = 2 * L_WIN * L_WIN + 2 * L_WIN + 1;  // 5
  localparam int unsigned CFG_ADDR_W = 3;

  // Distribution selected through the gateway's configuration input
  // (the "TFDcode" part of the control logic).
  typedef enum logic {
    MODE_SPEC = 1'b0,   // L = 0: 2-D spectrogram, one step
    MODE_SM   = 1'b1    // L = 1: 2-D S-method, CN(1) = 5 steps
  } tfd_mode_e;

  // One word of the gateway look-up table (bit 11 down to bit 0).
  typedef struct packed {
    logic             acc;        // [11]  add this step's product to the sum
    logic             int_reset;  // [10]  clear the sum after this step
    logic             store;      // [9]   load the sum into the output register
    logic             shl;        // [8]   product is doubled (shift left by 1)
    logic [SEL_W-1:0] sel1;       // [7:4] MUX1 select (tap number)
    logic [SEL_W-1:0] sel2;       // [3:0] MUX2 select (tap number)
  } lut_word_t;

  // Addresses of the configuration registers.
  typedef enum logic [CFG_ADDR_W-1:0] {
    CFG_FD  = 3'd0,   // FIFO delay           N - (2L+1)
    CFG_SC  = 3'd1,   // start convolution    2LN + (2L+1) - 1
    CFG_WS  = 3'd2,   // window size          2L + 1
    CFG_DB  = 3'd3,   // down border          (N - 2L) * N
    CFG_EOF = 3'd4    // end of frame         N * N - 1
  } cfg_addr_e;

  // Content of the look-up table, addressed by {mode, step}.
  // S-method steps follow the order of the terms in eq. (2):
  //   step 0: tap4*tap4                 centre term, not doubled
  //   step 1: tap3*tap5  (i1=0,i2=1)    first double sum
  //   step 2: tap0*tap8  (i1=1,i2=1)
  //   step 3: tap1*tap7  (i1=1,i2=0)    second double sum
  //   step 4: tap2*tap6  (i1=1,i2=1)    last term: store and clear
  // Spectrogram: step 0 only (tap4*tap4, store and clear).
  // Every other word is idle (acc = 0): the step counter stops on it.
  function automatic lut_word_t lut_entry(input logic [STEP_W:0] addr);
    lut_word_t w;
    w = '0;
    unique case (addr)
      {MODE_SM,   3'd0}: begin w.acc = 1'b1; w.sel1 = 4'd4; w.sel2 = 4'd4; end
      {MODE_SM,   3'd1}: begin w.acc = 1'b1; w.shl = 1'b1; w.sel1 = 4'd3; w.sel2 = 4'd5; end
      {MODE_SM,   3'd2}: begin w.acc = 1'b1; w.shl = 1'b1; w.sel1 = 4'd0; w.sel2 = 4'd8; end
      {MODE_SM,   3'd3}: begin w.acc = 1'b1; w.shl = 1'b1; w.sel1 = 4'd1; w.sel2 = 4'd7; end
      {MODE_SM,   3'd4}: begin
        w.acc = 1'b1; w.shl = 1'b1; w.store = 1'b1; w.int_reset = 1'b1;
        w.sel1 = 4'd2; w.sel2 = 4'd6;
      end
      {MODE_SPEC, 3'd0}: begin
        w.acc = 1'b1; w.store = 1'b1; w.int_reset = 1'b1; w.sel1 = 4'd4; w.sel2 = 4'd4;
      end
      default: w = '0;
    endcase
    return w;
  endfunction

endpackage
