// gateway_ctrl: step sequencer of the STFT-to-SM gateway.
//
// A binary step counter and a 16 x 12 look-up table.  The table address is
// {mode, step}: the mode bit plays the role of the configuration decoder that
// picks the distribution (spectrogram, L = 0, or S-method, L = 1), the step
// is the count of SM_CLK steps taken at the current window position.  Each
// table word (sm2d_pkg::lut_word_t) gives the two multiplexer selects, the
// doubling shift, the store strobe of the output register and the internal
// reset of the cumulative adder for that step.
//
// Timing: the word for step s is presented combinationally while the counter
// holds s.  On a clock edge with step_en = 1 the counter advances if the
// current word is active (acc = 1) and stops on the first idle word, so one
// window position costs exactly CN(L) enabled cycles and the counter then
// waits.  ext_reset (driven low-active from SM_CLK_EN in the system) returns
// the counter to step 0 and has priority over step_en.  rst_n is an
// asynchronous reset.
//
// The counter-plus-table structure, the 16 x 12 size and the signal names
// follow the design description; the word layout, the table content order and
// the stop-on-idle behaviour are this design's own choices.
module gateway_ctrl
  import sm2d_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step_en,    // SM_CLK enable
  input  logic              ext_reset,  // EXT_RESET: back to step 0
  input  tfd_mode_e         mode,       // configuration: distribution to compute
  output lut_word_t         word,       // controls for the current step
  output logic [STEP_W-1:0] step        // current step number
);

  // Table held as a constant array, filled from the package function.
  lut_word_t lut [LUT_DEPTH];
  logic      busy;   // current word is an active step

  always_comb begin
    for (int a = 0; a < LUT_DEPTH; a++) lut[a] = lut_entry((STEP_W+1)'(a));
  end

  assign word = lut[{mode, step}];
  assign busy = word.acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                step <= '0;
    else if (ext_reset)        step <= '0;
    else if (step_en && busy)  step <= step + 1'b1;
  end

endmodule
