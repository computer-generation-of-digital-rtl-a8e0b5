// fb_rom: control ROM with its output register.
//
// Holds ROM_WORDS horizontal control words.  Each cycle the word at the
// program counter address is read and captured in the ROM output register,
// so the data path sees the word one clock after the PC selects it.  In the
// document the ROM is mask programmed from the filter compiler's output;
// here the array is written through a load port (ld_en/ld_addr/ld_data)
// before the program is started, or filled at start-up from INIT_FILE with
// $readmemh.  The load port and the INIT_FILE option are this design's
// substitutes for mask programming.
//
// Timing: cw is registered; reset sets it to the idle word fb_pkg::CW_IDLE.
module fb_rom
  import fb_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 192,
  parameter string       INIT_FILE = "",
  localparam int unsigned PC_W     = $clog2(ROM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] addr,
  input  logic            ld_en,
  input  logic [PC_W-1:0] ld_addr,
  input  cw_t             ld_data,
  output cw_t             cw
);

  cw_t rom [ROM_WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (ld_en) rom[ld_addr] <= ld_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) cw <= CW_IDLE;
    else        cw <= rom[addr];
  end

endmodule
