// fb_index_reg: RAM address decoder and decimation index register.
//
// The 7-bit address field of a control word is either a plain RAM address
// or an index register command:
//   0 a a a a a a   plain address: the RAM_AW bits after the leading 0
//                   (all 7 bits when the RAM has 128 words)
//   1 1 0 a a a a   index mode: the index register gives the high address
//                   bits, the field's low bits the rest
//   1 1 1 x x x x   step the index register (address formed as in index mode)
// The index register lets one post-decimation filter serve DECIM channels:
// each sample it works on the states of one channel, and the index moves on
// to the next channel once per sample.  It counts down from DECIM-1 to 0
// and reloads DECIM-1.  lastch is high in the first cycle of a sample while
// the index is at its minimum.  DECIM = 1 removes the index register and
// every field is a plain address.
//
// The field codes follow the document.  The count direction follows the
// document's lastch description ('counts down to its minimum'), and the
// split of index-mode addresses into {index, low field bits} is this
// design's reading of the field table.
//
// Timing: ram_addr is combinational from afield and the index; a step
// command changes the index at the end of its cycle, so the next word sees
// the new value.  Reset loads DECIM-1.
module fb_index_reg
  import fb_pkg::*;
#(
  parameter int unsigned RAM_WORDS = 64,
  parameter int unsigned DECIM     = 8,
  localparam int unsigned RAM_AW   = $clog2(RAM_WORDS),
  localparam int unsigned IDX_W    = (DECIM > 1) ? $clog2(DECIM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [AF_BITS-1:0] afield,
  input  logic               first,
  output logic [RAM_AW-1:0]  ram_addr,
  output logic [IDX_W-1:0]   idx,
  output logic               lastch
);

  localparam logic [IDX_W-1:0] IDX_MAX = IDX_W'((DECIM > 1) ? DECIM - 1 : 0);
  localparam int unsigned LOW_W = (DECIM > 1) ? RAM_AW - IDX_W : RAM_AW;

  logic indexed, step;

  assign indexed = (DECIM > 1) && (afield[AF_BITS-1 -: 2] == AF_INDEX);
  assign step    = indexed && afield[AF_BITS-3];

  always_comb begin
    if (indexed)
      ram_addr = RAM_AW'({idx, afield[LOW_W-1:0]});
    else if (RAM_AW >= AF_BITS)
      ram_addr = RAM_AW'(afield);
    else
      ram_addr = afield[AF_BITS-2 -: RAM_AW];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)               idx <= IDX_MAX;
    else if (step)            idx <= (idx == '0) ? IDX_MAX : idx - 1'b1;
  end

  assign lastch = (DECIM > 1) && first && (idx == '0);

  initial begin
    assert (RAM_WORDS >= 8 && RAM_WORDS <= 128) else $error("fb_index_reg: RAM_WORDS out of range");
    assert (DECIM <= 8) else $error("fb_index_reg: DECIM must not exceed 8");
    assert (DECIM <= 1 || (LOW_W >= 1 && LOW_W <= 4))
      else $error("fb_index_reg: index mode needs 1..4 low address bits from the field");
  end

endmodule
