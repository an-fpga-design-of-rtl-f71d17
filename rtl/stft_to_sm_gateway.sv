// stft_to_sm_gateway: the shared functional kernel that turns a 3x3
// neighbourhood of 2-D STFT samples into one 2-D S-method sample.
//
// Datapath, one step per enabled clock (SM_CLK):
//   MUX1, MUX2  pick two of the sixteen inputs (taps 0..8 of the window
//               register block; inputs 9..15 are tied to zero outside);
//   MULT        8 x 8 unsigned product, 16 bits;
//   ShLEFT      doubles the product for the symmetric terms of eq. (2);
//   CumADD      20-bit cumulative adder;
//   OutREG      20-bit output register, loaded on the table's store step.
// The step sequencer (gateway_ctrl) supplies the selects and strobes.
//
// For the S-method the five steps add
//   s4^2 + 2(s3 s5 + s0 s8 + s1 s7 + s2 s6)
// and the sum is stored after the fifth enabled cycle; for the spectrogram
// one step stores s4^2.  The largest possible result, 9 * 255^2 = 585225,
// fits the 20-bit adder, so no overflow can occur.
//
// Control inputs:
//   step_en       SM_CLK enable: one step per clock while high;
//   ext_reset     returns the sequencer to step 0 and clears the adder;
//   cumadd_clear  holds the adder at zero, so that the stored result is 0
//                 (padding at the frame borders).
// Outputs: sm (OutREG) with sm_store, a one-cycle pulse in the cycle after
// OutREG was loaded; cum_sm, the running sum; sel_stft, the 12-bit table
// word; shl_or_no and int_reset, two of its bits; step, the step counter.
// All registers have an asynchronous active-low reset.
//
// The datapath blocks, their widths (8-bit samples, 20-bit sum) and the
// control names follow the design description; the single synchronous clock
// with enables in place of the inverted and gated clocks, and the unsigned
// arithmetic (samples normalised to 0..255), are this design's choices.
module stft_to_sm_gateway
  import sm2d_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          step_en,
  input  logic                          ext_reset,
  input  logic                          cumadd_clear,
  input  tfd_mode_e                     mode,
  input  logic [MUX_IN-1:0][DATA_W-1:0] stft,
  output logic [SM_W-1:0]               sm,
  output logic                          sm_store,
  output logic [SM_W-1:0]               cum_sm,
  output logic [LUT_W-1:0]              sel_stft,
  output logic                          shl_or_no,
  output logic                          int_reset,
  output logic [STEP_W-1:0]             step
);

  lut_word_t         word;

  gateway_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .step_en   (step_en),
    .ext_reset (ext_reset),
    .mode      (mode),
    .word      (word),
    .step      (step)
  );

  logic [DATA_W-1:0] mux1, mux2;
  logic [PROD_W-1:0] prod;
  logic [PROD_W:0]   term;
  logic [SM_W-1:0]   sum;
  logic [SM_W-1:0]   acc;

  assign mux1 = stft[word.sel1];
  assign mux2 = stft[word.sel2];
  assign prod = mux1 * mux2;
  assign term = word.shl ? {prod, 1'b0} : {1'b0, prod};
  assign sum  = cumadd_clear ? '0 : acc + SM_W'(term);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      sm       <= '0;
      sm_store <= 1'b0;
    end else begin
      sm_store <= 1'b0;
      if (ext_reset || cumadd_clear) begin
        acc <= '0;
      end else if (step_en && word.acc) begin
        acc <= word.int_reset ? '0 : sum;
      end
      if (!ext_reset && step_en && word.acc && word.store) begin
        sm       <= sum;
        sm_store <= 1'b1;
      end
    end
  end

  // One result per window position: a store is never followed by another
  // store before the sequencer has been reset.
  a_single_store: assert property (@(posedge clk) disable iff (!rst_n)
    sm_store |=> !sm_store);

  assign cum_sm    = acc;
  assign sel_stft  = word;
  assign shl_or_no = word.shl;
  assign int_reset = word.int_reset;

endmodule
