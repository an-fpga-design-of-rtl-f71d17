// tb_frame_ctrl: self-checking test of the frame and border controller.
//
// The controller is programmed for a 16 x 16 frame (FD = 13, SC = 34,
// WS = 3, DB = 224, EOF = 255) and given one shift strobe every 8 clocks.
// The expected behaviour, worked out in the test from the shift count:
// no activity before the shift that loads sample SC; then window position
// q = k - SC for shift k, with LEFT_BORDER for columns q mod 16 >= 14 and
// DOWN_BORDER for q >= DB; SM_CLK_EN high in the seven cycles after each
// shift and low in the shift cycle; END_PROC_FRAME after EOF + 1 positions
// and nothing active afterwards.  A clear then restarts a second frame.
module tb_frame_ctrl;

  localparam int NF = 16, FDW = 6, CW = 14, WSW = 4, DIV = 8;
  localparam int FD = NF - 3, SC = 2 * NF + 2, DB = (NF - 2) * NF, EOF = NF * NF - 1;

  logic           clk = 1'b0;
  logic           rst_n = 1'b1;
  initial #2 rst_n = 1'b0;
  logic           clear = 1'b0;
  logic           shift = 1'b0;
  logic [FDW-1:0] fd = FDW'(FD);
  logic [CW-1:0]  sc = CW'(SC);
  logic [WSW-1:0] ws = WSW'(3);
  logic [CW-1:0]  db = CW'(DB);
  logic [CW-1:0]  eof = CW'(EOF);
  logic           sm_start, sm_clk_en, left_border, down_border, end_proc_frame;
  logic [CW-1:0]  position;

  int checks = 0, failures = 0;
  int n_left = 0, n_down = 0, n_pos = 0;

  frame_ctrl #(.FDW(FDW), .CW(CW), .WSW(WSW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_frame();
    int q;
    bit act, lb, dbr, fin;
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    for (int k = 0; k < SC + EOF + 6; k++) begin
      // shift cycle
      shift = 1'b1;
      #1 check(!sm_clk_en, "SM_CLK_EN low in the shift cycle");
      @(negedge clk); shift = 1'b0;
      q   = k - SC;
      act = (q >= 0) && (q <= EOF);
      fin = q > EOF;
      lb  = act && ((q % NF) >= NF - 2);
      dbr = act && (q >= DB);
      for (int c = 1; c < DIV; c++) begin
        #1;
        check(sm_start == (k >= SC), $sformatf("SM_START at shift %0d", k));
        check(sm_clk_en == act, $sformatf("SM_CLK_EN at shift %0d", k));
        check(left_border == lb, $sformatf("LEFT_BORDER at position %0d", q));
        check(down_border == dbr, $sformatf("DOWN_BORDER at position %0d", q));
        check(end_proc_frame == fin, $sformatf("END_PROC_FRAME at shift %0d", k));
        if (act) check(int'(position) == q, "position counter");
        @(negedge clk);
      end
      if (act) n_pos++;
      if (lb) n_left++;
      if (dbr) n_down++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_frame();
    run_frame();
    check(n_pos == 2 * NF * NF, "positions per frame");
    check(n_left == 2 * 2 * NF && n_down == 2 * 2 * NF, "border position counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
