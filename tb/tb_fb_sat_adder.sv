// tb_fb_sat_adder: checks the saturating adder.  Random and full-scale
// operands with random carry-in are added in a wide integer; the result
// must be the exact sum when it fits in W bits, otherwise the largest
// positive or negative value, with the matching overflow flag.
module tb_fb_sat_adder;
  localparam int W = 20;
  logic [W-1:0] a, b, sum;
  logic cin, sat_pos, sat_neg;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  fb_sat_adder #(.W(W)) dut (.a, .b, .cin, .sum, .sat_pos, .sat_neg);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    #100000;
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [W-1:0] edge_val();
    case ($urandom_range(0, 4))
      0: return {1'b0, {(W-1){1'b1}}};
      1: return {1'b1, {(W-1){1'b0}}};
      2: return '0;
      3: return '1;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    longint s, lim_hi, lim_lo, exp_s;
    lim_hi = (longint'(1) << (W - 1)) - 1;
    lim_lo = -(longint'(1) << (W - 1));
    for (int i = 0; i < 5000; i++) begin
      a = (i % 3 == 0) ? edge_val() : W'($urandom);
      b = (i % 5 == 0) ? edge_val() : W'($urandom);
      cin = $urandom_range(0, 1);
      #1;
      s = longint'($signed(a)) + longint'($signed(b)) + longint'(cin);
      exp_s = s > lim_hi ? lim_hi : (s < lim_lo ? lim_lo : s);
      check(longint'($signed(sum)) == exp_s, $sformatf("%0d + %0d + %0d = %0d expected %0d",
            $signed(a), $signed(b), cin, $signed(sum), exp_s));
      check(sat_pos == (s > lim_hi) && sat_neg == (s < lim_lo), "overflow flags");
      n_pos += sat_pos; n_neg += sat_neg;
    end
    check(n_pos > 0 && n_neg > 0, "saturation never happened in both directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
