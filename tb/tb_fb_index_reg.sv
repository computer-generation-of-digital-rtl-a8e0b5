// tb_fb_index_reg: checks the address decoder and index register at the
// default size (64-word RAM, decimation by 8).  Random address fields are
// applied: a field 0aaaaaa must address word aaaaaa, 110aaaa must address
// {index, aaa}, 111xxxx must step the index down (8 -> 0 and back to 7),
// and lastch must be high exactly when 'first' coincides with index 0.  The
// index is modelled independently as an integer.
module tb_fb_index_reg;
  import fb_pkg::*;
  localparam int RAM_WORDS = 64, DECIM = 8;
  logic clk = 0, rst_n = 0, first = 0;
  logic [6:0] afield = '0;
  logic [5:0] ram_addr;
  logic [2:0] idx;
  logic lastch;
  int checks = 0, failures = 0, n_steps = 0, n_wrap = 0, n_last = 0, n_index = 0;

  fb_index_reg #(.RAM_WORDS(RAM_WORDS), .DECIM(DECIM)) dut (
    .clk, .rst_n, .afield, .first, .ram_addr, .idx, .lastch);

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
    int m_idx, exp_addr;
    @(negedge clk); rst_n = 1;
    m_idx = DECIM - 1;
    for (int i = 0; i < 5000; i++) begin
      case ($urandom_range(0, 3))
        0, 1: afield = 7'($urandom_range(0, 63));
        2:    afield = {3'b110, 4'($urandom)};
        3:    afield = {3'b111, 4'($urandom)};
      endcase
      first = ($urandom_range(0, 3) == 0);
      #1;
      if (afield[6] == 0) exp_addr = afield[5:0];
      else if (afield[6:4] == 3'b110) begin exp_addr = m_idx * 8 + afield[2:0]; n_index++; end
      else exp_addr = -1;
      if (exp_addr >= 0) check(ram_addr == 6'(exp_addr), $sformatf("field %b: address %0d expected %0d", afield, ram_addr, exp_addr));
      check(idx == 3'(m_idx), $sformatf("index %0d expected %0d", idx, m_idx));
      check(lastch == (first && m_idx == 0), "lastch");
      n_last += lastch;
      @(negedge clk);
      if (afield[6:4] == 3'b111) begin
        n_steps++;
        if (m_idx == 0) begin m_idx = DECIM - 1; n_wrap++; end else m_idx--;
      end
    end
    check(n_steps > 0 && n_wrap > 0 && n_last > 0 && n_index > 0, "a mechanism never happened");
    $display("steps=%0d wraps=%0d lastch=%0d indexed=%0d", n_steps, n_wrap, n_last, n_index);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
