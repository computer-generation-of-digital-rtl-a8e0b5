// tb_fb_complementor: checks the complementor in all its modes.  For
// random and edge-case inputs, the A operand plus carry-in must equal the
// input (true), its negative (invert) or its magnitude (absolute value,
// inv1 alone), or zero when zeroa* is low; the one's complement output
// seen by the B mux must be the input or its bitwise inverse.
module tb_fb_complementor;
  localparam int W = 20;
  logic [W-1:0] din, comp, a_out;
  logic inv1, inv2, zeroa_n, cin;
  int checks = 0, failures = 0;

  fb_complementor #(.W(W)) dut (.din, .inv1, .inv2, .zeroa_n, .comp, .a_out, .cin);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    #100000;
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint x, exp_a, got;
    bit neg;
    for (int i = 0; i < 4000; i++) begin
      case (i % 8)
        0: din = {1'b1, {(W-1){1'b0}}};
        1: din = {1'b0, {(W-1){1'b1}}};
        2: din = '0;
        3: din = '1;
        default: din = W'($urandom);
      endcase
      {inv1, inv2, zeroa_n} = 3'($urandom);
      #1;
      x = longint'($signed(din));
      neg = inv2 || (inv1 && x < 0);
      exp_a = zeroa_n ? (neg ? -x : x) : 0;
      got = longint'($signed(a_out)) + longint'(cin);
      check(got == exp_a, $sformatf("A: in %0d inv1 %0b inv2 %0b zeroa_n %0b: %0d expected %0d",
                                     x, inv1, inv2, zeroa_n, got, exp_a));
      check(comp == (neg ? ~din : din), "one's complement output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
