// fb_sat_adder: saturating W-bit two's complement adder.
//
// sum = a + b + cin.  When the true result does not fit in W bits the
// output is clamped to the largest positive or most negative value instead
// of wrapping around, which keeps recursive filters out of overflow
// oscillations.  Overflow is detected as in the document's saturation
// logic from the carries into and out of the most significant bit; the two
// flags tell which way the result was clamped.  The document's adder is a
// ripple-carry chain of alternating even and odd cells; the function is the
// same.
//
// Purely combinational.
module fb_sat_adder #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         sat_pos,
  output logic         sat_neg
);

  logic [W-2:0] low;
  logic         c_msb_in, c_msb_out, s_msb;

  // carry into the MSB from the low bits, then the MSB itself
  assign {c_msb_in, low}    = {1'b0, a[W-2:0]} + {1'b0, b[W-2:0]} + {{(W-1){1'b0}}, cin};
  assign {c_msb_out, s_msb} = 2'(a[W-1]) + 2'(b[W-1]) + 2'(c_msb_in);

  // overflow when the two carries differ; the MSB carry-out gives the sign
  assign sat_pos = c_msb_in & ~c_msb_out;
  assign sat_neg = ~c_msb_in & c_msb_out;

  always_comb begin
    if (sat_pos)      sum = {1'b0, {(W-1){1'b1}}};
    else if (sat_neg) sum = {1'b1, {(W-1){1'b0}}};
    else              sum = {s_msb, low};
  end

endmodule
