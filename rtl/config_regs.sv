// config_regs: the configuration registers of the border/window controller.
//
// Five registers hold the frame parameters, all derived from the frame size
// N and the window half-width L:
//   FD  (address 0)  FIFO delay          N - (2L+1)
//   SC  (address 1)  start convolution   2LN + (2L+1) - 1
//   WS  (address 2)  window size         2L + 1
//   DB  (address 3)  down border         (N - 2L) * N
//   EOF (address 4)  end of frame        N * N - 1
// A register is written from din on a rising clock edge with en = 1, the
// address selecting which; din is truncated to the register's width.  Reset
// (asynchronous, active low) loads the values for the N and L parameters, so
// the system works without programming.  The outputs are the register
// contents.
//
// The five parameters, their formulas and the din/address/enable write port
// follow the design description; the widths (FD: log2 N bits, SC, DB, EOF:
// 2 log2 N + 2 bits, WS: 4 bits), the address map and the reset values are
// this design's choices.
module config_regs
  import sm2d_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned L   = 1,
  parameter int unsigned FDW = $clog2(N),
  parameter int unsigned CW  = 2 * $clog2(N) + 2,
  parameter int unsigned WSW = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [CFG_ADDR_W-1:0] addr,
  input  logic [CW-1:0]         din,
  output logic [FDW-1:0]        fd,
  output logic [CW-1:0]         sc,
  output logic [WSW-1:0]        ws,
  output logic [CW-1:0]         db,
  output logic [CW-1:0]         eof
);

  localparam logic [FDW-1:0] FD_RST  = FDW'(N - (2 * L + 1));
  localparam logic [CW-1:0]  SC_RST  = CW'(2 * L * N + 2 * L);
  localparam logic [WSW-1:0] WS_RST  = WSW'(2 * L + 1);
  localparam logic [CW-1:0]  DB_RST  = CW'((N - 2 * L) * N);
  localparam logic [CW-1:0]  EOF_RST = CW'(N * N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fd  <= FD_RST;
      sc  <= SC_RST;
      ws  <= WS_RST;
      db  <= DB_RST;
      eof <= EOF_RST;
    end else if (en) begin
      case (cfg_addr_e'(addr))
        CFG_FD:  fd  <= din[FDW-1:0];
        CFG_SC:  sc  <= din;
        CFG_WS:  ws  <= din[WSW-1:0];
        CFG_DB:  db  <= din;
        CFG_EOF: eof <= din;
        default: ;
      endcase
    end
  end

endmodule
