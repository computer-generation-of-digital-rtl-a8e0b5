// fb_fifo: companion FIFO / circular buffer chip for the filter bank.
//
// DEPTH words of DW bits with fully independent write and read sides, used
// to collect the filter bank's channel outputs and play them back.
//
// Write side: a one-hot write pointer register.  wclear high puts the
// pointer on row 0.  On every rising edge of wshift the rows marked in the
// pointer register take din and the pointer moves one row on; its serial
// input is wclear, so if wclear is still high at that shift row 0 is marked
// again and two rows are written from then on (the misuse the document
// warns about).  Otherwise the pointer wraps from the last row to row 0:
// writing is never inhibited, which makes the buffer circular.  The filter
// bank drives wclear from lastch and wshift from the exclusive-or of its
// output strobes.
//
// Read side: rclear_n low selects row 0.  Each falling edge of rshift_n
// moves the read pointer one row on; after the last row it returns to
// row 0 by itself and sync_n goes low until the next shift.  dout always
// shows the selected row, so a write into that row appears at once.
// dout_oe (= paden) replaces the tri-state output pads.
//
// The pointer behaviour follows the document; sampling wshift and rshift_n
// with a clock, the reset (pointers to row 0, sync_n high, memory not
// cleared) and the dout_oe output are this design's choices.
module fb_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned DW    = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] din,
  input  logic          wclear,
  input  logic          wshift,
  input  logic          rclear_n,
  input  logic          rshift_n,
  input  logic          paden,
  output logic [DW-1:0] dout,
  output logic          dout_oe,
  output logic          sync_n
);

  logic [DW-1:0]    mem [DEPTH];
  logic [DEPTH-1:0] wsel;
  logic [AW-1:0]    rptr;
  logic             wshift_q, rshift_n_q;
  logic             wshift_rise, rshift_fall;

  assign wshift_rise = wshift && !wshift_q;
  assign rshift_fall = !rshift_n && rshift_n_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wshift_q   <= 1'b0;
      rshift_n_q <= 1'b1;
    end else begin
      wshift_q   <= wshift;
      rshift_n_q <= rshift_n;
    end
  end

  // ---- write pointer and memory
  always_ff @(posedge clk) begin
    if (!rst_n)           wsel <= DEPTH'(1);
    else if (wshift_rise) wsel <= {wsel[DEPTH-2:0], wsel[DEPTH-1] | wclear};
    else if (wclear)      wsel <= DEPTH'(1);
  end

  always_ff @(posedge clk) begin
    if (wshift_rise)
      for (int i = 0; i < DEPTH; i++)
        if (wsel[i]) mem[i] <= din;
  end

  // ---- read pointer
  always_ff @(posedge clk) begin
    if (!rst_n || !rclear_n) begin
      rptr   <= '0;
      sync_n <= 1'b1;
    end else if (rshift_fall) begin
      if (rptr == AW'(DEPTH - 1)) begin
        rptr   <= '0;
        sync_n <= 1'b0;
      end else begin
        rptr   <= rptr + 1'b1;
        sync_n <= 1'b1;
      end
    end
  end

  assign dout    = mem[rptr];
  assign dout_oe = paden;

endmodule
