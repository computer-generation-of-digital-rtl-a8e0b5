// fb_shifter: sense latch, barrel shifter input mux and barrel shifter.
//
// Multiplication by a fixed coefficient is done serial-parallel: the
// operand is shifted right by the distance to the coefficient's next
// nonzero canonical-signed-digit and added to or subtracted from the
// accumulator, one digit per cycle.  To reach shifts beyond 5 places the
// shifter can take its own output back as input (recirculation), so the
// shifts of successive cycles add up.
//
// sreg is the register in front of the shifter.  At each clock it loads
// either the RAM read data of this cycle (src_shift=0) or this cycle's
// shifter output (src_shift=1).  So the source named in control word t is
// what the shifter works on in word t+1, which is the document's 'delayed
// one cycle' rule.  shout = sreg shifted arithmetically right by shnum
// places; shnum above 5 shifts 0 places.
//
// Timing: sreg registered, shout combinational.  The register is not reset
// (every program loads it before use); this is this design's choice.
module fb_shifter #(
  parameter int unsigned W         = 20,
  parameter int unsigned MAX_SHIFT = 5
) (
  input  logic         clk,
  input  logic         src_shift,
  input  logic [W-1:0] mem_data,
  input  logic [2:0]   shnum,
  output logic [W-1:0] sreg,
  output logic [W-1:0] shout
);

  always_ff @(posedge clk) begin
    sreg <= src_shift ? shout : mem_data;
  end

  always_comb begin
    if (shnum <= 3'(MAX_SHIFT)) shout = W'($signed(sreg) >>> shnum);
    else                        shout = sreg;
  end

endmodule
