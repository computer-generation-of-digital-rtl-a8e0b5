// tb_fb_pc: checks the micro program counter.  With a 16-word ROM and a
// program of 11 words (overridden to keep the run short) the counter must
// step 0,1,..,10,0,.. once per clock, flag word 0 with 'first', return to 0
// on reset at random points, and so give a sample period of exactly
// PROG_LEN clocks.  The expected count is kept as a plain integer.
module tb_fb_pc;
  localparam int ROM_WORDS = 16, PROG_LEN = 11;
  logic clk = 0, rst_n = 0;
  logic [3:0] pc;
  logic first;
  int checks = 0, failures = 0;

  fb_pc #(.ROM_WORDS(ROM_WORDS), .PROG_LEN(PROG_LEN)) dut (.clk, .rst_n, .pc, .first);

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
    int exp_pc, last_first, n_periods;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_pc = 0; last_first = -1; n_periods = 0;
    for (int c = 0; c < 2000; c++) begin
      check(pc == 4'(exp_pc), $sformatf("pc %0d expected %0d", pc, exp_pc));
      check(first == (exp_pc == 0), "first flag");
      if (first) begin
        if (last_first >= 0) begin
          check(c - last_first == PROG_LEN, $sformatf("period %0d", c - last_first));
          n_periods++;
        end
        last_first = c;
      end
      if ($urandom_range(0, 199) == 0) begin
        rst_n = 0; @(negedge clk); rst_n = 1;
        exp_pc = 0; last_first = -1;
        c++;
        continue;
      end
      @(negedge clk);
      exp_pc = (exp_pc + 1) % PROG_LEN;
    end
    check(n_periods > 10, "too few complete sample periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
