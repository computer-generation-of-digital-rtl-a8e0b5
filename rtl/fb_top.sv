// fb_top: filter bank chip with its companion parts.
//
// Instantiates the filter bank chip (fb_chip: controller and two data
// paths, parameters of the 16 channel speech recognition bank), and beside
// it the FIFO buffer chip (fb_fifo, 16 x 12) and the two-phase clock
// generator (fb_clockgen) that the document describes for use with it.  The
// three are separate parts on a board; each keeps its own ports here, so
// they can be wired as the application needs (typically FIFO wclear from
// lastch, wshift from the exclusive-or of the output strobes, din from the
// upper 12 bits of pout).
//
// Timing: the chip and the FIFO run on clk; the clock generator on clk4x.
module fb_top
  import fb_pkg::*;
#(
  parameter int unsigned W          = 20,
  parameter int unsigned RAM_WORDS  = 64,
  parameter int unsigned ROM_WORDS  = 192,
  parameter int unsigned PROG_LEN   = 192,
  parameter int unsigned DECIM      = 8,
  parameter int unsigned NPROC      = 2,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned FIFO_DW    = 12,
  localparam int unsigned PC_W      = $clog2(ROM_WORDS),
  localparam int unsigned PSEL_W    = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // filter bank chip
  input  logic               ld_en,
  input  logic [PSEL_W-1:0]  ld_proc,
  input  logic [PC_W-1:0]    ld_addr,
  input  cw_t                ld_data,
  input  logic [W-1:0]       pin,
  output logic [W-1:0]       pout,
  output logic [NPROC-1:0]   out_stb,
  output logic               datain_n,
  output logic               lastch,
  output logic               paden,
  output logic               first,
  output logic [NPROC-1:0]   sat,
  // FIFO buffer chip
  input  logic [FIFO_DW-1:0] fifo_din,
  input  logic               fifo_wclear,
  input  logic               fifo_wshift,
  input  logic               fifo_rclear_n,
  input  logic               fifo_rshift_n,
  input  logic               fifo_paden,
  output logic [FIFO_DW-1:0] fifo_dout,
  output logic               fifo_dout_oe,
  output logic               fifo_sync_n,
  // clock generator
  input  logic               ck_clk4x,
  input  logic               ck_rst_n,
  output logic               ck_ph1,
  output logic               ck_ph2
);

  fb_chip #(.W(W), .RAM_WORDS(RAM_WORDS), .ROM_WORDS(ROM_WORDS), .PROG_LEN(PROG_LEN),
            .DECIM(DECIM), .NPROC(NPROC)) u_chip (
    .clk(clk), .rst_n(rst_n), .ld_en(ld_en), .ld_proc(ld_proc), .ld_addr(ld_addr),
    .ld_data(ld_data), .pin(pin), .pout(pout), .out_stb(out_stb), .datain_n(datain_n),
    .lastch(lastch), .paden(paden), .first(first), .sat(sat));

  fb_fifo #(.DEPTH(FIFO_DEPTH), .DW(FIFO_DW)) u_fifo (
    .clk(clk), .rst_n(rst_n), .din(fifo_din), .wclear(fifo_wclear), .wshift(fifo_wshift),
    .rclear_n(fifo_rclear_n), .rshift_n(fifo_rshift_n), .paden(fifo_paden),
    .dout(fifo_dout), .dout_oe(fifo_dout_oe), .sync_n(fifo_sync_n));

  fb_clockgen u_ck (
    .clk4x(ck_clk4x), .rst_n(ck_rst_n), .ph1(ck_ph1), .ph2(ck_ph2));

endmodule
