// fb_ram: data path RAM.
//
// RAM_WORDS words of W bits holding every filter state of the bank.  One
// access per cycle: a read (we=0) puts mem[addr] on rdata; a write (we=1)
// stores wdata and also puts wdata on rdata, because the written value is
// on the bit lines and the sense latch captures it like read data.  The
// document's RAM is a 4-transistor dynamic array refreshed by being read
// and written every sample; this register array has the same function
// without refresh.  Contents are not reset.
//
// Timing: rdata is combinational from addr/we/wdata (it is registered in
// the sense latch of fb_shifter); writes take effect at the clock edge.
module fb_ram #(
  parameter int unsigned W         = 20,
  parameter int unsigned RAM_WORDS = 64,
  localparam int unsigned RAM_AW   = $clog2(RAM_WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [RAM_AW-1:0] addr,
  input  logic [W-1:0]      wdata,
  output logic [W-1:0]      rdata
);

  logic [W-1:0] mem [RAM_WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = we ? wdata : mem[addr];

endmodule
