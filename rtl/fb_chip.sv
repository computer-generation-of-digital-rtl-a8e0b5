// fb_chip: the generated filter bank chip.
//
// A controller (program counter, one control ROM and one index register per
// processor) drives NPROC identical data paths.  Every processor runs its
// own part of the filter bank, one sample period per pass through the
// program.  All data paths read the same parallel input bus; datain_n (the
// chip's input strobe) is low while any processor strobes input, and the
// programs are written so that they input in the same cycles.  Outputs share
// one parallel output bus: pout is the OR of the enabled data path outputs,
// out_stb[p] is processor p's output strobe (evenout and oddout on the two
// processor speech recognition chip), and paden, the pad direction, is the
// OR of the output strobes.  lastch marks the sample in which the
// decimation index is at its minimum.
//
// Parameters default to the 16 channel speech recognition chip: 20-bit
// words, 64-word RAM, 192-word ROM with 192 cycles per sample, decimation
// by 8, two processors.  The ROM is loaded through ld_* before reset is
// released (see fb_rom).
//
// Timing: outputs are valid in the cycle their control word executes; the
// PC runs from the first clock after reset.
module fb_chip
  import fb_pkg::*;
#(
  parameter int unsigned W         = 20,
  parameter int unsigned RAM_WORDS = 64,
  parameter int unsigned ROM_WORDS = 192,
  parameter int unsigned PROG_LEN  = 192,
  parameter int unsigned DECIM     = 8,
  parameter int unsigned NPROC     = 2,
  parameter int unsigned MAX_SHIFT = 5,
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
  input  logic [W-1:0]      pin,
  output logic [W-1:0]      pout,
  output logic [NPROC-1:0]  out_stb,
  output logic              datain_n,
  output logic              lastch,
  output logic              paden,
  output logic              first,
  output logic [NPROC-1:0]  sat
);

  cw_t               cw       [NPROC];
  logic [RAM_AW-1:0] ram_addr [NPROC];
  logic [IDX_W-1:0]  idx      [NPROC];
  logic [W-1:0]      pout_p   [NPROC];
  logic [W-1:0]      acc_p    [NPROC];
  logic [NPROC-1:0]  in_stb_n;

  fb_controller #(.NPROC(NPROC), .ROM_WORDS(ROM_WORDS), .PROG_LEN(PROG_LEN),
                  .RAM_WORDS(RAM_WORDS), .DECIM(DECIM)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .ld_en(ld_en), .ld_proc(ld_proc), .ld_addr(ld_addr),
    .ld_data(ld_data), .cw(cw), .ram_addr(ram_addr), .idx(idx), .first(first),
    .lastch(lastch));

  for (genvar p = 0; p < NPROC; p++) begin : g_dp
    fb_datapath #(.W(W), .RAM_WORDS(RAM_WORDS), .MAX_SHIFT(MAX_SHIFT)) u_dp (
      .clk(clk), .rst_n(rst_n), .cw(cw[p]), .ram_addr(ram_addr[p]), .pin(pin),
      .pout(pout_p[p]), .out_stb(out_stb[p]), .in_stb_n(in_stb_n[p]),
      .acc(acc_p[p]), .sat(sat[p]));
  end

  always_comb begin
    pout = '0;
    for (int p = 0; p < NPROC; p++) pout |= pout_p[p];
  end

  assign datain_n = &in_stb_n;
  assign paden    = |out_stb;

  always_ff @(posedge clk) begin
    if (rst_n) assert ($countones(out_stb) <= 1)
      else $error("fb_chip: two processors drive the output bus in the same cycle");
  end

endmodule
