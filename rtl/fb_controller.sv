// fb_controller: program counter, control ROMs and index registers.
//
// One program counter addresses NPROC control ROMs in lock step, so all
// processors run programs of the same length PROG_LEN (one sample period).
// Each ROM's registered output is that processor's control word for the
// cycle; its address field goes through the processor's own index register,
// which turns it into a RAM address and steps the decimation index.  All
// index registers are reset together and so stay synchronized; lastch is
// taken from processor 0.
//
// The shared PC, per-processor ROMs and index registers and the single
// lastch follow the document.  The ROM load port (ld_*) stands in for mask
// programming and is this design's choice.
//
// Timing: the ROM output register delays the control word one clock after
// the PC, so the 'first word of the sample' flag is delayed to match.
// cw[p], ram_addr[p] and lastch belong to the same cycle.
module fb_controller
  import fb_pkg::*;
#(
  parameter int unsigned NPROC     = 2,
  parameter int unsigned ROM_WORDS = 192,
  parameter int unsigned PROG_LEN  = 192,
  parameter int unsigned RAM_WORDS = 64,
  parameter int unsigned DECIM     = 8,
  localparam int unsigned PC_W     = $clog2(ROM_WORDS),
  localparam int unsigned RAM_AW   = $clog2(RAM_WORDS),
  localparam int unsigned IDX_W    = (DECIM > 1) ? $clog2(DECIM) : 1,
  localparam int unsigned PSEL_W   = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_en,
  input  logic [PSEL_W-1:0] ld_proc,
  input  logic [PC_W-1:0]   ld_addr,
  input  cw_t               ld_data,
  output cw_t               cw       [NPROC],
  output logic [RAM_AW-1:0] ram_addr [NPROC],
  output logic [IDX_W-1:0]  idx      [NPROC],
  output logic              first,
  output logic              lastch
);

  logic [PC_W-1:0] pc;
  logic            pc_first;
  logic            lastch_p [NPROC];

  fb_pc #(.ROM_WORDS(ROM_WORDS), .PROG_LEN(PROG_LEN)) u_pc (
    .clk(clk), .rst_n(rst_n), .pc(pc), .first(pc_first));

  always_ff @(posedge clk) begin
    if (!rst_n) first <= 1'b0;
    else        first <= pc_first;
  end

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    fb_rom #(.ROM_WORDS(ROM_WORDS)) u_rom (
      .clk(clk), .rst_n(rst_n), .addr(pc),
      .ld_en(ld_en && (ld_proc == PSEL_W'(p))), .ld_addr(ld_addr), .ld_data(ld_data),
      .cw(cw[p]));

    fb_index_reg #(.RAM_WORDS(RAM_WORDS), .DECIM(DECIM)) u_idx (
      .clk(clk), .rst_n(rst_n), .afield(cw[p].addr), .first(first),
      .ram_addr(ram_addr[p]), .idx(idx[p]), .lastch(lastch_p[p]));
  end

  assign lastch = lastch_p[0];

endmodule
