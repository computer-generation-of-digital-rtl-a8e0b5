// tb_fb_clockgen: checks the two-phase clock generator.  After reset the
// three-stage ring must run with a period of four input clocks in which ph1
// is high for one clock and ph2 for one clock two clocks later, so the two
// never overlap and one idle clock separates each phase from the next.  Reset is reapplied at random points.
module tb_fb_clockgen;
  logic clk4x = 0, rst_n = 0, ph1, ph2;
  int checks = 0, failures = 0, n_ph1 = 0, n_ph2 = 0;

  fb_clockgen dut (.clk4x, .rst_n, .ph1, .ph2);

  always #5 clk4x = ~clk4x;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk4x);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    for (int r = 0; r < 20; r++) begin
      rst_n = 0;
      repeat ($urandom_range(1, 3)) @(negedge clk4x);
      check(!ph1 && !ph2, "phases low in reset");
      rst_n = 1;
      t = 0;
      repeat ($urandom_range(10, 60)) begin
        @(negedge clk4x);
        // clock t+1 after reset: ph1 in clocks 1,5,9,..; ph2 in 3,7,11,..
        check(ph1 == ((t % 4) == 0), $sformatf("ph1 at clock %0d", t + 1));
        check(ph2 == ((t % 4) == 2), $sformatf("ph2 at clock %0d", t + 1));
        check(!(ph1 && ph2), "phases overlap");
        n_ph1 += ph1; n_ph2 += ph2;
        t++;
      end
    end
    check(n_ph1 > 0 && n_ph2 > 0, "no phases produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
