// conv_window_regs: the 3x3 convolution window register block.
//
// Nine DATA_W-bit registers in three rows of three.  On every shift strobe
// (SHIFT_IN_CLK) each row moves one place: row 0 takes the new sample
// stft_in, row 1 and row 2 take the outputs of the two FIFO delays (row_in1,
// row_in2).  The last register of rows 0 and 1 feeds the FIFO delay of the
// next row (row_out0, row_out1).  With delays of N - 3 samples each, a row
// of registers holds the samples exactly N positions (one frame row) behind
// the row above, so for a frame streamed in raster order the nine outputs
// form the 3x3 neighbourhood of one point:
//
//   dout[0] (k1+1,k2+1)  dout[1] (k1+1,k2)  dout[2] (k1+1,k2-1)
//   dout[3] (k1  ,k2+1)  dout[4] (k1  ,k2)  dout[5] (k1  ,k2-1)
//   dout[6] (k1-1,k2+1)  dout[7] (k1-1,k2)  dout[8] (k1-1,k2-1)
//
// Timing: the outputs change one clock edge after a cycle with shift = 1 and
// are stable otherwise.  rst_n (asynchronous) clears all registers.
//
// The register arrangement, the tap numbering and the chaining through the
// FIFO delays follow the design description; the synchronous shift enable in
// place of a separate shift clock is this design's choice.
module conv_window_regs
  import sm2d_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic [W-1:0]        stft_in,
  input  logic [W-1:0]        row_in1,
  input  logic [W-1:0]        row_in2,
  output logic [W-1:0]        row_out0,
  output logic [W-1:0]        row_out1,
  output logic [TAPS-1:0][W-1:0] dout
);

  logic [2:0][W-1:0] row_in;
  assign row_in = {row_in2, row_in1, stft_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
    end else if (shift) begin
      for (int r = 0; r < 3; r++) begin
        dout[3*r]     <= row_in[r];
        dout[3*r + 1] <= dout[3*r];
        dout[3*r + 2] <= dout[3*r + 1];
      end
    end
  end

  assign row_out0 = dout[2];
  assign row_out1 = dout[5];

endmodule
