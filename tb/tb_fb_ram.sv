// tb_fb_ram: checks the data RAM at its default size (64 x 20 bits).  After
// every word is written once, random reads and writes are compared with a TB
// array.  A read addresses the array combinationally; during a write the
// read port must show the word being written.
module tb_fb_ram;
  localparam int W = 20, RAM_WORDS = 64;
  logic clk = 0, we = 0;
  logic [5:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [RAM_WORDS];
  int checks = 0, failures = 0;

  fb_ram #(.W(W), .RAM_WORDS(RAM_WORDS)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < RAM_WORDS; a++) begin
      we = 1; addr = 6'(a); wdata = W'($urandom); model[a] = wdata;
      #1 check(rdata == wdata, "write-through");
      @(negedge clk);
    end
    for (int i = 0; i < 4000; i++) begin
      we = ($urandom_range(0, 2) == 0); addr = 6'($urandom); wdata = W'($urandom);
      #1;
      if (we) check(rdata == wdata, $sformatf("write-through at %0d", addr));
      else    check(rdata == model[addr], $sformatf("read %0d: %h expected %h", addr, rdata, model[addr]));
      @(negedge clk);
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
