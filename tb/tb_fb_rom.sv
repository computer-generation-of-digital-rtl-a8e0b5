// tb_fb_rom: checks one control store.  Random control words are written
// through the load port, then read back at random addresses: each word must
// appear on the registered output one clock after its address, and reset
// must force the idle word.  The expected contents are kept in a TB array.
module tb_fb_rom;
  import fb_pkg::*;
  localparam int ROM_WORDS = 32;
  logic clk = 0, rst_n = 0, ld_en = 0;
  logic [4:0] addr = '0, ld_addr = '0;
  cw_t ld_data, cw;
  logic [CW_BITS-1:0] model [ROM_WORDS];
  int checks = 0, failures = 0;

  fb_rom #(.ROM_WORDS(ROM_WORDS)) dut (.clk, .rst_n, .addr, .ld_en, .ld_addr, .ld_data, .cw);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cw_t exp_w;
    ld_data = '0;
    @(negedge clk);
    check(cw == CW_IDLE, "reset word");
    for (int a = 0; a < ROM_WORDS; a++) begin
      ld_en = 1; ld_addr = 5'(a); ld_data = cw_t'(CW_BITS'($urandom));
      model[a] = ld_data;
      @(negedge clk);
    end
    ld_en = 0;
    rst_n = 1;
    addr = '0;
    @(negedge clk);
    exp_w = model[addr];
    for (int i = 0; i < 1000; i++) begin
      addr = 5'($urandom);
      if ($urandom_range(0, 9) == 0) begin
        // overwrite one word while reading
        ld_en = 1; ld_addr = 5'($urandom); ld_data = cw_t'(CW_BITS'($urandom));
      end else ld_en = 0;
      check(cw == exp_w, $sformatf("read: %h expected %h", cw, exp_w));
      exp_w = model[addr];        // word read at the coming edge, before any load
      @(negedge clk);
      if (ld_en) model[ld_addr] = ld_data;
      if (i % 100 == 99) begin
        rst_n = 0; @(negedge clk);
        check(cw == CW_IDLE, "reset word");
        rst_n = 1; @(negedge clk);
        exp_w = model[addr];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
