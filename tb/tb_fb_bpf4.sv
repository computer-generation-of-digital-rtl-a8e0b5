// tb_fb_bpf4: the single four-pole band-pass filter chip, run on the
// generator's smallest configuration: one processor, 10-bit words, 8-word
// RAM, 32-word store and 32 cycles per sample, no decimation.  The filter
// is two cascaded two-pole resonators in direct form; the coefficients are
// this testbench's own canonical-signed-digit choices.
//
// The micro code is assembled by fb_ucode_pkg and must fit in 32 words; the
// chip is run for NSAMP sample periods of random and full-scale input and
// every output value and its cycle, the 32-cycle period, the input strobe
// and paden are checked against the package's reference.  Second-order
// sections, subtraction and saturation must occur.
module tb_fb_bpf4;
  import fb_pkg::*;
  import fb_ucode_pkg::*;

  localparam int W = 10, RAM_WORDS = 8, ROM_WORDS = 32, PROG_LEN = 32, DECIM = 1, NPROC = 1;
  localparam int NSAMP = 400;

  logic clk = 0, rst_n = 0;
  logic ld_en = 0;
  logic [0:0] ld_proc = '0;
  logic [4:0] ld_addr = '0;
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

  // Input to word 0; two cascaded two-pole resonators (states 1,2 and 3,4),
  // the second output off chip.  a1 = 2 - 2^-3, a2 = -(1 - 2^-4) and
  // a1 = 2 - 2^-2 + 2^-5, a2 = -(1 - 2^-3), gains 2^-3 and 2^-2.
  function automatic void build_bpf4(bank_c bk);
    sec_t s;
    s.kind = S_INPUT; s.xa = 0; s.ya = 0; s.indexed = 0;
    bk.add_sec(0, s);
    s = l2(1, 0, 0, 0);
    s.a.push_back(dg(0)); s.a.push_back(dg(0)); s.a.push_back(dg(3, 1));
    s.a2.push_back(dg(0, 1)); s.a2.push_back(dg(4));
    s.g.push_back(dg(3));
    bk.add_sec(0, s);
    s = l2(3, 1, 0, 1);
    s.a.push_back(dg(0)); s.a.push_back(dg(0)); s.a.push_back(dg(2, 1)); s.a.push_back(dg(5));
    s.a2.push_back(dg(0, 1)); s.a2.push_back(dg(3));
    s.g.push_back(dg(2));
    bk.add_sec(0, s);
  endfunction
  exp_t  e [2][$];
  int    n_out [2], n_lastch, n_in_cycles, n_sat_chip;

  cw_t cq[$];

  task automatic load_rom(int p, cw_t q[$]);
    for (int a = 0; a < PROG_LEN; a++) begin
      @(negedge clk);
      ld_en = 1; ld_proc = 1'(p); ld_addr = 5'(a); ld_data = q[a];
    end
    @(negedge clk); ld_en = 0;
  endtask

  initial begin
    longint x;
    int off, n;
    b = new(W, $clog2(RAM_WORDS), DECIM, PROG_LEN);
    build_bpf4(b);
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
        check(!lastch, "lastch without decimation");
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

    check(b.n_l2 == 2,         "second-order sections not assembled");
    check(b.n_sub > 0,         "no subtraction");
    check(n_sat_chip > 0,      "adder never saturated");
    check(n_in_cycles == 2 * NSAMP + 1, $sformatf("input strobe cycles %0d", n_in_cycles));
    check(n_out[0] == NSAMP,   $sformatf("outputs %0d", n_out[0]));
    $display("program words: %0d of %0d; mechanisms: l2=%0d recirc=%0d sub=%0d sat_ref=%0d sat_chip=%0d",
             prog_words[0], PROG_LEN, b.n_l2, b.n_recirc, b.n_sub, b.n_ref_sat, n_sat_chip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
