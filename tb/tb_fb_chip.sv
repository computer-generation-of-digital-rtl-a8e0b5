// tb_fb_chip: end-to-end test of one filter bank chip (controller, two
// control stores, two processors) at a reduced size: 16-bit words, 32-word
// RAMs, 96 cycles per sample from a 128-word store, decimation by 4.
//
// The micro code of the demonstration bank (fb_ucode_pkg::build_demo, four
// rectified channels on processor 0 followed by a decimating section, four
// output sections on processor 1) is loaded and NSAMP sample periods are run
// with random input, including full-scale stretches that drive the recursive
// sections into saturation.  The reference model gives every output value
// and the cycle of the sample at which it must appear; the test also checks
// the input strobe, lastch against the reference index register, paden and
// the sample period, and requires each mechanism (recirculating multiply,
// pre-shift, subtraction, rectification of a negative input, saturation, B
// input from memory and from the complementor, held write latch, index step,
// lastch) to have happened.
module tb_fb_chip;
  import fb_pkg::*;
  import fb_ucode_pkg::*;

  localparam int W = 16, RAM_WORDS = 32, ROM_WORDS = 128, PROG_LEN = 96, DECIM = 4;
  localparam int NSAMP = 48;

  logic clk = 0, rst_n = 0;
  logic ld_en = 0;
  logic [0:0] ld_proc = '0;
  logic [6:0] ld_addr = '0;
  cw_t ld_data;
  logic [W-1:0] pin = '0, pout;
  logic [1:0] out_stb, sat;
  logic datain_n, lastch, paden, first;

  fb_chip #(.W(W), .RAM_WORDS(RAM_WORDS), .ROM_WORDS(ROM_WORDS), .PROG_LEN(PROG_LEN),
            .DECIM(DECIM), .NPROC(2), .MAX_SHIFT(5)) dut (
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
  exp_t  e [2][$];
  int    n_out [2], n_lastch, n_in_cycles, n_sat_chip;

  cw_t cq[$];

  task automatic load_rom(int p, cw_t q[$]);
    for (int a = 0; a < PROG_LEN; a++) begin
      @(negedge clk);
      ld_en = 1; ld_proc = 1'(p); ld_addr = 7'(a); ld_data = q[a];
    end
    @(negedge clk); ld_en = 0;
  endtask

  initial begin
    longint x;
    int off, n;
    b = new(W, $clog2(RAM_WORDS), DECIM, PROG_LEN);
    build_demo(b, DECIM);
    if (!b.assemble()) begin
      $display("FAIL: program does not fit");
      failures++;
    end
    foreach (b.out_line[0][i]) foreach (b.out_line[1][j])
      check(b.out_line[0][i] != b.out_line[1][j], "processors output in the same cycle");

    // clear both RAMs with a one-sample program, then load the bank
    clear_prog($clog2(RAM_WORDS), DECIM, PROG_LEN, cq);
    load_rom(0, cq); load_rom(1, cq);
    rst_n = 1;
    repeat (PROG_LEN + 4) @(negedge clk);
    rst_n = 0;
    load_rom(0, b.prog[0]); load_rom(1, b.prog[1]);
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
          foreach (e[p]) check(e[p].size() == 0, $sformatf("processor %0d: %0d outputs missing", p, e[p].size()));
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
      for (int p = 0; p < 2; p++) if (out_stb[p]) begin
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
    check(b.n_recirc > 0,      "no recirculating multiply");
    check(b.n_preshift > 0,    "no pre-shift beyond 5 places");
    check(b.n_sub > 0,         "no subtraction");
    check(b.n_ref_rect_neg > 0, "no rectified negative input");
    check(b.n_ref_sat > 0,     "reference saw no saturation");
    check(n_sat_chip > 0,      "adder never saturated");
    check(b.n_bmem > 0,        "B input from memory never used");
    check(b.n_bcomp > 0,       "B input from the complementor never used");
    check(b.n_hold > 0,        "write latch hold never used");
    check(b.n_steps > 0,       "index register never stepped");
    check(n_lastch >= NSAMP / DECIM - 1, $sformatf("lastch seen %0d times", n_lastch));
    check(n_in_cycles == 2 * NSAMP + 1, $sformatf("input strobe cycles %0d", n_in_cycles));
    check(n_out[0] == NSAMP && n_out[1] == 4 * NSAMP, $sformatf("outputs %0d / %0d", n_out[0], n_out[1]));
    $display("mechanisms: recirc=%0d preshift=%0d sub=%0d rect_neg=%0d sat_ref=%0d sat_chip=%0d bmem=%0d bcomp=%0d hold=%0d step=%0d lastch=%0d",
             b.n_recirc, b.n_preshift, b.n_sub, b.n_ref_rect_neg, b.n_ref_sat, n_sat_chip, b.n_bmem, b.n_bcomp, b.n_hold, b.n_steps, n_lastch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
