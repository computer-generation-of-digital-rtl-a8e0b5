// tb_fb_fifo: checks the 16 x 12 output buffer.  Words are written on
// rising edges of wshift into the rows selected by the circulating write
// shift register.  wclear is its serial input: high at a write edge it
// enters a new pointer at row 0 while the old one moves on (so two rows are
// then written together), high without a write edge it restarts the
// pointer at row 0.  The model keeps the selected rows as a bit vector.  The read side is
// cleared by rclear* and advanced on falling edges of rshift*, shows the
// addressed row continuously, wraps after row 15 and drops sync* after the
// wrap.  The output enable follows paden.  A TB array models the rows.
module tb_fb_fifo;
  localparam int DEPTH = 16, DW = 12;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] din = '0, dout;
  logic wclear = 0, wshift = 0, rclear_n = 1, rshift_n = 1, paden = 0;
  logic dout_oe, sync_n;
  logic [DW-1:0] model [DEPTH];
  logic valid [DEPTH];
  int checks = 0, failures = 0, n_wr = 0, n_clr = 0, n_wrap_w = 0, n_sync = 0, n_multi = 0;

  fb_fifo #(.DEPTH(DEPTH), .DW(DW)) dut (
    .clk, .rst_n, .din, .wclear, .wshift, .rclear_n, .rshift_n, .paden, .dout, .dout_oe, .sync_n);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int rp;
    logic [DEPTH-1:0] wsel;
    bit m_sync_n, ws_q, rs_q;
    foreach (valid[i]) valid[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wsel = DEPTH'(1); rp = 0; m_sync_n = 1; ws_q = 0; rs_q = 1;
    for (int c = 0; c < 20000; c++) begin
      // random stimulus: writes are slow pulses, reads slower still
      din = DW'($urandom);
      wshift = ($urandom_range(0, 2) == 0);
      wclear = ($urandom_range(0, 40) == 0);
      rshift_n = ($urandom_range(0, 3) != 0);
      rclear_n = ($urandom_range(0, 300) != 0);
      paden = $urandom_range(0, 1);
      #1;
      if (valid[rp]) check(dout == model[rp], $sformatf("row %0d: %h expected %h", rp, dout, model[rp]));
      check(sync_n == m_sync_n, "sync*");
      check(dout_oe == paden, "output enable");
      @(negedge clk);
      // write side model
      if (wshift && !ws_q) begin
        for (int r = 0; r < DEPTH; r++) if (wsel[r]) begin model[r] = din; valid[r] = 1; end
        n_wr++;
        if ($countones(wsel) > 1) n_multi++;
        if (wsel[DEPTH-1]) n_wrap_w++;
        wsel = {wsel[DEPTH-2:0], wsel[DEPTH-1] | wclear};
        n_clr += wclear;
      end else if (wclear) begin wsel = DEPTH'(1); n_clr++; end
      ws_q = wshift;
      // read side model
      if (!rclear_n) begin rp = 0; m_sync_n = 1; end
      else if (!rshift_n && rs_q) begin
        if (rp == DEPTH - 1) begin rp = 0; m_sync_n = 0; n_sync++; end
        else begin rp++; m_sync_n = 1; end
      end
      rs_q = rshift_n;
    end
    check(n_wr > 0 && n_clr > 0 && n_wrap_w > 0 && n_sync > 0 && n_multi > 0, "a mechanism never happened");
    $display("writes=%0d clears=%0d write wraps=%0d read wraps=%0d multi-row=%0d", n_wr, n_clr, n_wrap_w, n_sync, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
