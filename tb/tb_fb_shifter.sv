// tb_fb_shifter: checks the shifter input register and barrel shifter.
// Each clock the register loads either the memory word or its own shifted
// output; the output is the register shifted right arithmetically by 0..5
// places (codes 6 and 7 pass it unshifted).  The model divides by a power of
// two with rounding toward minus infinity.
module tb_fb_shifter;
  localparam int W = 20;
  logic clk = 0, src_shift = 0;
  logic [W-1:0] mem_data = '0, sreg, shout;
  logic [2:0] shnum = '0;
  int checks = 0, failures = 0, n_recirc = 0;

  fb_shifter #(.W(W), .MAX_SHIFT(5)) dut (.clk, .src_shift, .mem_data, .shnum, .sreg, .shout);

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

  function automatic longint fdiv(longint v, int k);
    longint d = longint'(1) << k;
    longint q = v / d;
    if (v < 0 && q * d != v) q--;
    return q;
  endfunction

  initial begin
    longint m_reg, exp_out;
    src_shift = 0; mem_data = W'($urandom);
    @(negedge clk);
    m_reg = longint'($signed(mem_data));
    for (int i = 0; i < 5000; i++) begin
      shnum = 3'($urandom);
      src_shift = $urandom_range(0, 1);
      mem_data = W'($urandom);
      #1;
      exp_out = (shnum <= 5) ? fdiv(m_reg, int'(shnum)) : m_reg;
      check(longint'($signed(sreg)) == m_reg, "register contents");
      check(longint'($signed(shout)) == exp_out,
            $sformatf("%0d >> %0d = %0d expected %0d", m_reg, shnum, $signed(shout), exp_out));
      @(negedge clk);
      if (src_shift) begin m_reg = exp_out; n_recirc++; end
      else m_reg = longint'($signed(mem_data));
    end
    check(n_recirc > 0, "no recirculation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
