// fb_complementor: true / invert / absolute value stage and adder A input.
//
// Sits between the barrel shifter and the adder.  inv2=1 inverts every bit,
// inv1=1 with inv2=0 inverts only when the word is negative (absolute
// value, used to full-wave rectify a section input), and inv1=inv2=0
// passes the word.  The document calls this a ones' complementor; this
// design also raises the adder carry-in (cin) whenever the A input is an
// inverted word, so that subtraction and absolute value are exact two's
// complement operations.  zeroa_n=0 forces the A input (and cin) to zero.
// comp, the complementor output before the zeroing gate, is also offered to
// the adder B input mux.
//
// Purely combinational.
module fb_complementor #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] din,
  input  logic         inv1,
  input  logic         inv2,
  input  logic         zeroa_n,
  output logic [W-1:0] comp,
  output logic [W-1:0] a_out,
  output logic         cin
);

  logic invert;

  assign invert = inv2 | (inv1 & din[W-1]);
  assign comp   = invert ? ~din : din;
  assign a_out  = zeroa_n ? comp : '0;
  assign cin    = zeroa_n & invert;

endmodule
