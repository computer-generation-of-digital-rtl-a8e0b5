// tb_fb_layouts: a 16 channel bank run on the chip at the size of the 8 and
// 16 channel layouts (16-bit words, 64-word RAMs, 128-word stores and 128
// cycles per sample, decimation by 8, two processors).  Those layouts give
// only their sizes, not their filters, so the bank is this testbench's own:
// per channel a two-pole band-pass resonator, a full-wave rectifier and a
// one-pole low pass; after decimation by 8 a two-pole low pass per channel,
// run by one indexed section on each processor.
//
// The micro code is assembled by fb_ucode_pkg, loaded into both stores and
// run for NSAMP sample periods of random and full-scale input; every output
// value and its cycle, the 128-cycle sample period, the input strobe,
// lastch and paden are checked against the package's reference, and both
// programs must fit in 128 words.  Second-order sections, the one-word low
// pass, rectification of negative values, subtraction, saturation and index
// steps must all occur.
module tb_fb_layouts;
  import fb_pkg::*;
  import fb_ucode_pkg::*;

  localparam int W = 16, RAM_WORDS = 64, ROM_WORDS = 128, PROG_LEN = 128, DECIM = 8, NPROC = 2;
  localparam int NSAMP = 64;

  logic clk = 0, rst_n = 0;
  logic ld_en = 0;
  logic [0:0] ld_proc = '0;
  logic [7:0] ld_addr = '0;
  cw_t ld_data;
  logic [W-1:0] pin = '0, pout;
  logic [NPROC-1:0] out_stb, sat;
  logic datain_n, lastch, paden, first;

  fb_chip #(.W(W), .RAM_WORDS(RAM_WORDS), .ROM_WORDS(ROM_WORDS), .PROG_LEN(PROG_LEN),
            .DECIM(DECIM), .NPROC(NPROC), .MAX_SHIFT(5)) dut (
    .clk, .rst_n, .ld_en, .ld_proc, .ld_addr, .ld_data, .pin, .pout, .out_stb, .datain_n,
    .lastch, .paden, .first, .sat);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (NSAMP * PROG_LEN + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bank_c b;
  int    prog_words [2];

  // Eight channels per processor, channel c in RAM block 8c: low pass
  // state at 8c, resonator at 8c+1/8c+2, post-decimation low pass (index
  // mode, reading 8c) at 8c+5/8c+6; the input sample is kept at 7.  The
  // resonator has a1 = 2 - 2^-m, a2 = -(1 - 2^-(m+1)) and gain 2^-(m+1);
  // that of channel 0 on processor 1 has one more gain digit so that the
  // two processors' decimated outputs fall in different cycles.  The low
  // pass is y <= (1 - 2^-k) y + 2^-k |x| in four words.
  function automatic void build_layout(bank_c bk);
    sec_t s;
    for (int p = 0; p < NPROC; p++) begin
      s.kind = S_INPUT; s.xa = 7; s.ya = 0; s.indexed = 0;
      bk.add_sec(p, s);
      for (int c = 0; c < DECIM; c++) begin
        int m = 2 + (c + 3 * p) % 3;
        s = l2(8 * c + 1, 7, 0, 0);
        s.a.push_back(dg(0)); s.a.push_back(dg(0)); s.a.push_back(dg(m, 1));
        s.a2.push_back(dg(0, 1)); s.a2.push_back(dg(m + 1));
        s.g.push_back(dg(m + 1));
        if (p == 1 && c == 0) s.g.push_back(dg(m + 3, 1));
        bk.add_sec(p, s);
        s = l1(8 * c, 8 * c + 1, 0, 1, 0);
        s.a.push_back(dg(0)); s.a.push_back(dg(2 + c % 4, 1));
        s.g.push_back(dg(2 + c % 4));
        s.bmem = 1;
        bk.add_sec(p, s);
      end
      s = l2(5, 0, 1, 1);
      s.a.push_back(dg(0)); s.a.push_back(dg(1)); s.a.push_back(dg(3));
      s.a2.push_back(dg(1, 1)); s.a2.push_back(dg(5));
      s.g.push_back(dg(3)); s.g.push_back(dg(5, 1));
      bk.add_sec(p, s);
      s.kind = S_STEP;
      bk.add_sec(p, s);
    end
  endfunction
  exp_t  e [2][$];
  int    n_out [2], n_lastch, n_in_cycles, n_sat_chip;

  cw_t cq[$];

  task automatic load_rom(int p, cw_t q[$]);
    for (int a = 0; a < PROG_LEN; a++) begin
      @(negedge clk);
      ld_en = 1; ld_proc = 1'(p); ld_addr = 8'(a); ld_data = q[a];
    end
    @(negedge clk); ld_en = 0;
  endtask

  initial begin
    longint x;
    int off, n;
    b = new(W, $clog2(RAM_WORDS), DECIM, PROG_LEN);
    build_layout(b);
    if (!b.assemble()) begin
      $display("FAIL: program does not fit");
      failures++;
    end
    prog_words = b.used;
    if (NPROC == 2) foreach (b.out_line[0][i]) foreach (b.out_line[1][j])
      check(b.out_line[0][i] != b.out_line[1][j], "processors output in the same cycle");

    // clear both RAMs with a one-sample program, then load the bank
    clear_prog($clog2(RAM_WORDS), DECIM, PROG_LEN, cq);
    for (int p = 0; p < NPROC; p++) load_rom(p, cq);
    rst_n = 1;
    repeat (PROG_LEN + 4) @(negedge clk);
    rst_n = 0;
    for (int p = 0; p < NPROC; p++) load_rom(p, b.prog[p]);
    @(negedge clk); ld_en = 0;
    repeat (2) @(negedge clk);
    pin = W'(12345);
    rst_n = 1;

    n = -1; off = 0;
    while (n < NSAMP) begin
      @(negedge clk);
      if (first) begin
        if (n >= 0) begin
          check(off == PROG_LEN - 1, $sformatf("sample period %0d cycles", off + 1));
          for (int p = 0; p < NPROC; p++) check(e[p].size() == 0, $sformatf("processor %0d: %0d outputs missing", p, e[p].size()));
        end
        n++; off = 0;
        check(lastch == (b.ridx[0] == 0), "lastch does not match the index register");
        n_lastch += lastch;
        x = $signed(pin);
        b.ref_sample(x, e);
      end else off++;

      check(datain_n == !(off == 0 || off == 1), $sformatf("input strobe at cycle %0d", off));
      n_in_cycles += !datain_n;
      check(paden == |out_stb, "paden is not the OR of the output strobes");
      n_sat_chip += (sat != 0);
      for (int p = 0; p < NPROC; p++) if (out_stb[p]) begin
        n_out[p]++;
        if (e[p].size() == 0) check(0, $sformatf("processor %0d: unexpected output at cycle %0d", p, off));
        else begin
          exp_t t;
          t = e[p].pop_front();
          check(t.line == off, $sformatf("processor %0d: output at cycle %0d, expected %0d", p, off, t.line));
          check($signed(pout) == t.value,
                $sformatf("processor %0d sample %0d cycle %0d: got %0d expected %0d", p, n, off, $signed(pout), t.value));
        end
      end

      // new input value in the middle of the sample period
      if (off == PROG_LEN / 2) begin
        if ((n / 16) % 3 == 2) pin = ($urandom_range(0, 1) != 0) ? W'(2**(W-1) - 1 - $urandom_range(0, 99)) : W'(-(2**(W-1)) + $urandom_range(0, 99));
        else pin = W'($signed($urandom_range(0, 2**(W-2))) - 2**(W-3));
      end
    end

    // every mechanism must have happened
    check(b.n_l2 == NPROC * (DECIM + 1), $sformatf("%0d second-order sections", b.n_l2));
    check(b.n_bmem == NPROC * DECIM, "one-word low pass not used in every channel");
    check(b.n_recirc > 0,      "no recirculating multiply");
    check(b.n_sub > 0,         "no subtraction");
    check(b.n_ref_rect_neg > 0, "no rectified negative input");
    check(n_sat_chip > 0,      "adder never saturated");
    check(b.n_steps > 0,       "index register never stepped");
    check(n_lastch >= NSAMP / DECIM - 1, $sformatf("lastch seen %0d times", n_lastch));
    check(n_in_cycles == 2 * NSAMP + 1, $sformatf("input strobe cycles %0d", n_in_cycles));
    check(n_out[0] == NSAMP && n_out[1] == NSAMP, $sformatf("outputs %0d / %0d", n_out[0], n_out[1]));
    $display("program words: %0d / %0d of %0d; mechanisms: l2=%0d recirc=%0d sub=%0d rect_neg=%0d sat_ref=%0d sat_chip=%0d step=%0d lastch=%0d",
             prog_words[0], prog_words[1], PROG_LEN, b.n_l2, b.n_recirc, b.n_sub, b.n_ref_rect_neg, b.n_ref_sat, n_sat_chip, b.n_steps, n_lastch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
