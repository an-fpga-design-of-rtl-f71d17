// frame_ctrl: control logic for windowed convolution and padding of the
// frame borders.
//
// The N x N frame of STFT samples enters in raster order, one sample per
// shift strobe, and the window register block then holds the 3x3
// neighbourhood of the point N + 1 samples behind the newest one.  Three
// counters with comparators run the frame:
//   * a load counter counts shifts after clear; on the shift that loads
//     sample number SC the first complete window (centre at (L,L)) is in
//     place and SM_START rises (it stays high until clear);
//   * from then on every shift starts a new window position.  A position
//     counter q (0, 1, ...) and a column counter (0 .. N-1, where
//     N = FD + WS) follow the positions;
//   * DOWN_BORDER is high for q >= DB, LEFT_BORDER for column > FD, i.e.
//     the last 2L columns, where the window would straddle two frame rows;
//   * after position q = EOF the next shift ends the frame: END_PROC_FRAME
//     rises and stays high until clear, and no further positions start.
// Position q therefore produces output sample q of an N x N frame in raster
// order: output (r, c) is the S-method at centre (r+L, c+L) of the input
// frame, and the last 2L rows and columns, whose windows leave the frame,
// are padded with zeros.  The data source keeps shifting (zeros or the next
// frame) for SC shifts after the last sample of the frame.
//
// SM_CLK_EN is high, during an active frame, in every cycle except the shift
// cycle; its low cycle resets the gateway (EXT_RESET) for the new position.
// SM_START, END_PROC_FRAME and position are registers; the border flags
// are decoded from the counters and SM_CLK_EN from the shift strobe.  rst_n is asynchronous.
//
// The output signals, the configuration parameters and their formulas follow
// the design description; the counting conventions (what each counter counts
// and when each comparison is made) are this design's own reading of them.
module frame_ctrl #(
  parameter int unsigned FDW = 6,
  parameter int unsigned CW  = 14,
  parameter int unsigned WSW = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           shift,
  input  logic [FDW-1:0] fd,
  input  logic [CW-1:0]  sc,
  input  logic [WSW-1:0] ws,
  input  logic [CW-1:0]  db,
  input  logic [CW-1:0]  eof,
  output logic           sm_start,
  output logic           sm_clk_en,
  output logic           left_border,
  output logic           down_border,
  output logic           end_proc_frame,
  output logic [CW-1:0]  position
);

  logic [CW-1:0] load_cnt;
  logic [CW-1:0] col;
  logic [CW-1:0] row_last;
  logic          active;

  assign row_last = CW'(fd) + CW'(ws) - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_cnt       <= '0;
      sm_start       <= 1'b0;
      active         <= 1'b0;
      end_proc_frame <= 1'b0;
      position       <= '0;
      col            <= '0;
    end else if (clear) begin
      load_cnt       <= '0;
      sm_start       <= 1'b0;
      active         <= 1'b0;
      end_proc_frame <= 1'b0;
      position       <= '0;
      col            <= '0;
    end else if (shift) begin
      if (!sm_start) begin
        load_cnt <= load_cnt + 1'b1;
        if (load_cnt == sc) begin
          sm_start <= 1'b1;
          active   <= 1'b1;
          position <= '0;
          col      <= '0;
        end
      end else if (active) begin
        if (position == eof) begin
          active         <= 1'b0;
          end_proc_frame <= 1'b1;
        end else begin
          position <= position + 1'b1;
          col      <= (col == row_last) ? '0 : col + 1'b1;
        end
      end
    end
  end

  assign left_border = active && (col > CW'(fd));
  assign down_border = active && (position >= db);
  assign sm_clk_en   = active && !shift;

  // Once the frame has ended no window position may run, and the border
  // flags only exist while positions run.
  a_idle_after_end: assert property (@(posedge clk) disable iff (!rst_n)
    end_proc_frame |-> !sm_clk_en && !left_border && !down_border);

endmodule
