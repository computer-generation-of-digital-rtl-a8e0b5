// tb_fb_datapath: checks one arithmetic processor against a cycle model.
// Random control words (kept legal: the accumulator and the parallel input
// never drive the memory bus together, accb* only with B select 11) and
// random RAM addresses are applied at the default size.  The model keeps
// the RAM, the shifter input register, the write latch, the accumulator
// and the input register as integers and applies the data path rules:
// shift right by 5 - nshift, complement/absolute value, B input from zero,
// the complementor, the unshifted register or the accumulator, saturating
// sum into the accumulator, write data from the bus when the latch was
// loading in the previous cycle, otherwise from the held latch, and a
// two-cycle input strobe whose second cycle puts the sampled input on the
// bus.  Output bus, strobes, accumulator and the overflow flag are compared
// every cycle, and each source of each mux must have been used.
module tb_fb_datapath;
  import fb_pkg::*;
  localparam int W = 20, RAM_WORDS = 64;
  logic clk = 0, rst_n = 0;
  cw_t cw;
  logic [5:0] ram_addr = '0;
  logic [W-1:0] pin = '0, pout, acc;
  logic out_stb, in_stb_n, sat;
  int checks = 0, failures = 0;
  int n_bsel [4], n_sat, n_hold, n_in, n_abs, n_recirc;

  fb_datapath #(.W(W), .RAM_WORDS(RAM_WORDS), .MAX_SHIFT(5)) dut (
    .clk, .rst_n, .cw, .ram_addr, .pin, .pout, .out_stb, .in_stb_n, .acc, .sat);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam longint HI = (longint'(1) << (W - 1)) - 1;
  localparam longint LO = -(longint'(1) << (W - 1));

  function automatic longint sx(logic [W-1:0] v);
    return longint'($signed(v));
  endfunction
  function automatic longint fdiv(longint v, int k);
    longint d = longint'(1) << k;
    longint q = v / d;
    if (v < 0 && q * d != v) q--;
    return q;
  endfunction
  function automatic longint clamp(longint v);
    return v > HI ? HI : (v < LO ? LO : v);
  endfunction

  longint m_mem [RAM_WORDS];
  longint m_sreg, m_wlatch, m_acc, m_inreg;
  bit     m_latch_en, m_in_prev;

  initial begin
    longint shout, a, b, s, bus, wd, rd;
    bit inv, in_gate;
    int sh, phase;
    cw = CW_IDLE;
    m_sreg = 0; m_wlatch = 0; m_acc = 0; m_inreg = 0; m_latch_en = 0; m_in_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase = 0;
    for (int i = 0; i < 12000; i++) begin
      // ---- choose a legal random control word
      cw = cw_t'(CW_BITS'($urandom));
      if (i < RAM_WORDS) begin
        // first pass: clear every RAM word (latch loading an idle bus)
        cw = CW_IDLE;
        cw.xmitacc_n = 1'b1;
        cw.wrlatch   = 1'b1;
        cw.memwrite  = 1'b1;
        cw.shiftsrc  = 1'b0;       // shifter register loads the cleared word
        ram_addr     = 6'(i);
      end else begin
        ram_addr = 6'($urandom);
        cw.xmitin2_n = 1'b1;
        if (phase == 1) begin cw.xmitin2_n = 1'b0; phase = 0; end
        else if ($urandom_range(0, 15) == 0) begin cw.xmitin2_n = 1'b0; phase = 1; pin = W'($urandom); end
        if (!cw.xmitin2_n && m_in_prev) cw.xmitacc_n = 1'b1;
        if ({cw.bsel1, cw.bsel2} != 2'b11) cw.accb_n = 1'b1;
        // bias toward long accumulations so that the adder saturates
        if ($urandom_range(0, 3) != 0) begin cw.bsel1 = 1; cw.bsel2 = 1; cw.accb_n = 0; end
      end
      #1;
      // ---- model of the combinational part
      sh = 5 - int'(cw.nshift);
      shout = (sh >= 0 && sh <= 5) ? fdiv(m_sreg, sh) : m_sreg;
      inv = cw.inv2 || (cw.inv1 && shout < 0);
      a = cw.zeroa_n ? (inv ? -shout : shout) : 0;
      case ({cw.bsel1, cw.bsel2})
        2'b00: b = 0;
        2'b01: b = inv ? -shout - 1 : shout;
        2'b10: b = m_sreg;
        2'b11: b = cw.accb_n ? 0 : m_acc;
      endcase
      s = a + b;
      in_gate = !cw.xmitin2_n && m_in_prev;
      bus = !cw.xmitacc_n ? m_acc : (in_gate ? m_inreg : 0);
      wd = m_latch_en ? bus : m_wlatch;
      rd = cw.memwrite ? wd : m_mem[ram_addr];

      check(sx(acc) == m_acc, $sformatf("accumulator %0d expected %0d", sx(acc), m_acc));
      check(sat == (s != clamp(s)), "overflow flag");
      check(out_stb == cw.iobusen && in_stb_n == cw.xmitin2_n, "strobes");
      check(sx(pout) == (cw.iobusen ? bus : 0), $sformatf("output bus %0d expected %0d", sx(pout), bus));
      if (i >= RAM_WORDS) begin
        n_bsel[{cw.bsel1, cw.bsel2}]++;
        n_sat += (s != clamp(s));
        n_hold += (cw.memwrite && !m_latch_en);
        n_in += in_gate;
        n_abs += (cw.inv1 && !cw.inv2 && shout < 0 && cw.zeroa_n);
        n_recirc += cw.shiftsrc;
      end
      @(negedge clk);
      // ---- model of the clocked part
      if (cw.memwrite) m_mem[ram_addr] = wd;
      if (!cw.xmitin2_n && !m_in_prev) m_inreg = sx(pin);
      m_in_prev = !cw.xmitin2_n;
      m_wlatch = wd;
      m_latch_en = cw.wrlatch;
      m_sreg = cw.shiftsrc ? shout : rd;
      m_acc = clamp(s);
    end
    foreach (n_bsel[k]) check(n_bsel[k] > 0, $sformatf("B select %0d never used", k));
    check(n_sat > 0 && n_hold > 0 && n_in > 0 && n_abs > 0 && n_recirc > 0, "a mechanism never happened");
    $display("sat=%0d hold=%0d in=%0d abs=%0d recirc=%0d", n_sat, n_hold, n_in, n_abs, n_recirc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
