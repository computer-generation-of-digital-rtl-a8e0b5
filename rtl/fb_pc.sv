// fb_pc: micro program counter.
//
// The controller has no branches: the program counter simply steps through
// the PROG_LEN words of the control ROM, one word per clock, and restarts at
// word 0.  One pass through the program is one sample period, so the clock
// rate is the sample rate times PROG_LEN (192 cycles per sample in the
// speech recognition bank).  'first' is high while the counter is at word 0.
//
// Interface: clk, active-low synchronous reset rst_n (counter to 0),
// outputs pc and first.  Timing: pc changes on every rising clock edge.
// The restart value 0 follows the document's 'load 0' counter cells; the
// synchronous reset is this design's choice.
module fb_pc #(
  parameter int unsigned ROM_WORDS = 192,
  parameter int unsigned PROG_LEN  = 192,
  localparam int unsigned PC_W     = $clog2(ROM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [PC_W-1:0] pc,
  output logic            first
);

  localparam logic [PC_W-1:0] LAST = PC_W'(PROG_LEN - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)          pc <= '0;
    else if (pc == LAST) pc <= '0;
    else                 pc <= pc + 1'b1;
  end

  assign first = (pc == '0);

  initial begin
    assert (PROG_LEN >= 2 && PROG_LEN <= ROM_WORDS)
      else $error("fb_pc: PROG_LEN must be between 2 and ROM_WORDS");
  end

endmodule
