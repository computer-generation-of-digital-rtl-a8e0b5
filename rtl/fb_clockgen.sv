// fb_clockgen: two-phase non-overlapping clock generator.
//
// The board-level circuit the document gives for clocking its chips: three
// D flip-flops clocked by a clock at four times the chip clock rate form a
// ring, and a 3-input NOR of their outputs feeds the first flip-flop.
// From reset the state runs 000 -> 100 -> 010 -> 001 -> 000, so ph1 (first
// flip-flop) and ph2 (third flip-flop) are each high one quarter of the
// period, with an idle quarter between them: a 2/8 duty cycle clock whose
// phases never overlap.  The flip-flop, NOR and output connections are the
// document's; the reset input is this design's addition.
//
// Interface: clk4x, rst_n (synchronous, ring to 000), outputs ph1, ph2.
module fb_clockgen (
  input  logic clk4x,
  input  logic rst_n,
  output logic ph1,
  output logic ph2
);

  logic q1, q2, q3;

  always_ff @(posedge clk4x) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
      q3 <= 1'b0;
    end else begin
      q1 <= ~(q1 | q2 | q3);
      q2 <= q1;
      q3 <= q2;
    end
  end

  assign ph1 = q1;
  assign ph2 = q3;

endmodule
