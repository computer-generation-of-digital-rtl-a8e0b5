// fb_datapath: one filter bank processor's data path.
//
// A bit-sliced arithmetic unit with no multiplier.  Per clock it executes
// one horizontal control word (fb_pkg::cw_t):
//
//   RAM --> sense latch / shifter input mux --> barrel shifter (0..5 right)
//       --> complementor (true, invert, |x|) --> adder A input
//   adder B input: zero, complementor output, sense latch (memory), or
//       the accumulator
//   saturating adder --> accumulator (loaded every cycle)
//   memory bus: accumulator (xmitacc*=0) or parallel input (xmitin2*=0)
//   write latch (memory input register) --> RAM write data
//
// Fixed-coefficient multiplies are sequences of shift-and-add/subtract
// words, one per nonzero canonical-signed-digit of the coefficient.
//
// Pipelining, as in the document: registers sit at the RAM output (the
// shifter input register), the RAM input (the write latch) and the adder
// output (the accumulator).  Resulting micro code timing:
//   * an adder operation in word t is visible in acc in word t+1;
//   * wrlatch and shiftsrc act one word late;
//   * data read (or written) in word t reaches the shifter in word t+1;
//   * a word whose write latch is loading writes the bus value itself, one
//     that holds writes the value loaded earlier.
// Parallel input takes two words with xmitin2*=0: the pins are sampled at
// the end of the first, and the sampled word drives the memory bus in the
// second.  Parallel output: with iobusen=1 the memory bus (normally the
// accumulator) appears on pout and out_stb is high for that cycle.
//
// What follows the document: the unit list, the control lines and their
// encodings, the pipeline positions and the I/O strobe sequence.  This
// design's choices: a carry-in makes inversion exact; an undriven memory
// bus reads 0; pout is 0 when no output is enabled; accumulator, write
// latch and input register reset to 0.
module fb_datapath
  import fb_pkg::*;
#(
  parameter int unsigned W         = 20,
  parameter int unsigned RAM_WORDS = 64,
  parameter int unsigned MAX_SHIFT = 5,
  localparam int unsigned RAM_AW   = $clog2(RAM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cw_t               cw,
  input  logic [RAM_AW-1:0] ram_addr,
  input  logic [W-1:0]      pin,
  output logic [W-1:0]      pout,
  output logic              out_stb,
  output logic              in_stb_n,
  output logic [W-1:0]      acc,
  output logic              sat
);

  logic [W-1:0] membus, wlatch, wdata, rdata, sreg, shout;
  logic [W-1:0] comp, a_in, b_in, sum, in_reg;
  logic         latch_en, in_prev, in_gate, cin, sat_pos, sat_neg;
  logic [2:0]   shnum;

  // ---- parallel input: sample in the first strobe cycle, gate in the second
  assign in_gate = !cw.xmitin2_n && in_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_prev <= 1'b0;
      in_reg  <= '0;
    end else begin
      in_prev <= !cw.xmitin2_n;
      if (!cw.xmitin2_n && !in_prev) in_reg <= pin;
    end
  end

  // ---- memory bus and write latch (RAM input pipeline register)
  always_comb begin
    if (!cw.xmitacc_n)  membus = acc;
    else if (in_gate)   membus = in_reg;
    else                membus = '0;
  end

  assign wdata = latch_en ? membus : wlatch;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      latch_en <= 1'b0;
      wlatch   <= '0;
    end else begin
      latch_en <= cw.wrlatch;
      wlatch   <= wdata;
    end
  end

  // ---- RAM
  fb_ram #(.W(W), .RAM_WORDS(RAM_WORDS)) u_ram (
    .clk(clk), .we(cw.memwrite), .addr(ram_addr), .wdata(wdata), .rdata(rdata));

  // ---- sense latch and barrel shifter (RAM output pipeline register)
  assign shnum = 3'(MAX_SHIFT) - cw.nshift;

  fb_shifter #(.W(W), .MAX_SHIFT(MAX_SHIFT)) u_shift (
    .clk(clk), .src_shift(cw.shiftsrc), .mem_data(rdata), .shnum(shnum),
    .sreg(sreg), .shout(shout));

  // ---- complementor and adder inputs
  fb_complementor #(.W(W)) u_comp (
    .din(shout), .inv1(cw.inv1), .inv2(cw.inv2), .zeroa_n(cw.zeroa_n),
    .comp(comp), .a_out(a_in), .cin(cin));

  always_comb begin
    unique case ({cw.bsel1, cw.bsel2})
      2'b00: b_in = '0;
      2'b01: b_in = comp;
      2'b10: b_in = sreg;
      2'b11: b_in = cw.accb_n ? '0 : acc;
    endcase
  end

  // ---- saturating adder and accumulator (adder output pipeline register)
  fb_sat_adder #(.W(W)) u_add (
    .a(a_in), .b(b_in), .cin(cin), .sum(sum), .sat_pos(sat_pos), .sat_neg(sat_neg));

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= sum;
  end

  assign sat = sat_pos | sat_neg;

  // ---- parallel output
  assign out_stb  = cw.iobusen;
  assign pout     = cw.iobusen ? membus : '0;
  assign in_stb_n = cw.xmitin2_n;

  // ---- micro code rules
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (cw.xmitacc_n || !in_gate)
        else $error("fb_datapath: accumulator and parallel input both drive the memory bus");
      assert (cw.accb_n || {cw.bsel1, cw.bsel2} == 2'b11)
        else $error("fb_datapath: accb* active while the B mux selects another source");
    end
  end

endmodule
