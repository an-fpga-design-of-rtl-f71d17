// fifo_delay: programmable delay line between two rows of the window
// register block (one instance per row, delay FD = N - (2L+1)).
//
// A DEPTH x W memory used as a circular buffer of length `delay`.  On each
// shift strobe the word at the pointer is read out (it was written `delay`
// shifts earlier), the new sample is written in its place and the pointer
// advances modulo `delay`.  dout is the combinational read of the current
// pointer, so a register that loads dout on the same strobe receives the
// sample written exactly `delay` strobes before.
//
// After reset or clear the memory is not erased; instead dout is forced to 0
// until the buffer has been filled once.  start_out goes high at that point
// (the fill threshold).  delay must lie in 1..DEPTH and should be changed only
// together with clear.
//
// The function and its size (N words of 8 bits per delay, 2 x N x 8 bits for
// both) follow the design description; the circular-buffer implementation
// and the zero output before the first fill are this design's choices.
module fifo_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          shift,
  input  logic [AW-1:0] delay,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout,
  output logic          start_out
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          filled;
  logic          wrap;

  assign wrap = (ptr == delay - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else if (clear) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else if (shift) begin
      ptr <= wrap ? '0 : ptr + 1'b1;
      if (wrap) filled <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (shift && !clear) mem[ptr] <= din;
  end

  // A delay of zero words is not supported.
  a_delay_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    shift |-> delay != '0);

  assign dout      = filled ? mem[ptr] : '0;
  assign start_out = filled;

endmodule
