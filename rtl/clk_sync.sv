// clk_sync: clocks and synchronisation.
//
// Derives the sample-loading timing from the system clock.  A free-running
// counter divides clk by DIV; shift_stb is a one-cycle pulse in the last
// cycle of every period and marks the clock edge on which a new STFT sample
// is loaded.  shift_in_clk is the same period as a square wave (high in the
// first half) for the data source.  DIV must be at least CN + 1 so that the
// CN gateway steps of one window position fit between two loads.
//
// The division of the system clock into a slower shift clock follows the
// design description (a loaded sample must last at least CN(1) = 5 system
// clocks); DIV = 8, a power of two as from a chain of divide-by-two stages,
// is this design's choice.
module clk_sync #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic shift_stb,
  output logic shift_in_clk
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cnt <= '0;
    else if (cnt == CW'(DIV - 1))     cnt <= '0;
    else                              cnt <= cnt + 1'b1;
  end

  assign shift_stb    = (cnt == CW'(DIV - 1));
  assign shift_in_clk = (cnt < CW'(DIV / 2));

endmodule
