// fb_ucode_pkg: micro code assembler and reference model for the testbenches.
//
// Builds control words (fb_pkg::cw_t) from symbolic fields, in the spirit of
// the filter compiler's symbolic micro code: memory operation and address,
// write latch, shifter source, shift count, adder A operation, adder B
// source and I/O operation.  On top of that, bank_c describes a small filter
// bank as a list of sections (input, first-order low pass with optional
// rectified input, second-order all-pole section, index step), assembles the micro program of each
// processor from it, and computes independently, from the sections'
// difference equations and canonical-signed-digit coefficients, the values
// the chip must output and the cycle of the sample period at which each
// output must appear.
//
// The reference arithmetic works on integers: a term is the operand shifted
// right (floor) by the digit's position, negated or rectified, and every
// addition saturates to W bits, as the data path does.
package fb_ucode_pkg;
  import fb_pkg::*;

  typedef enum int {A_ZERO, A_PLUS, A_MINUS, A_ABS} aop_e;
  typedef enum int {B_ZERO, B_ACC, B_MEM, B_COMP} bop_e;
  typedef enum int {IO_NONE, IO_IN, IO_OUT} io_e;

  // ------------------------------------------------------------------
  // Address field encodings
  function automatic logic [6:0] af_plain(int addr, int ram_aw);
    if (ram_aw >= 7) return 7'(addr);
    return 7'(addr << (6 - ram_aw));
  endfunction

  function automatic logic [6:0] af_index(int low);
    return {3'b110, 4'(low)};
  endfunction

  function automatic logic [6:0] af_step();
    return 7'b1110000;
  endfunction

  // ------------------------------------------------------------------
  // One control word from symbolic fields
  function automatic cw_t uc(logic [6:0] af, bit wr, bit latch, bit src_shift,
                             int shift, aop_e aop, bop_e bop, io_e io);
    cw_t c;
    c.addr      = af;
    c.memwrite  = wr;
    c.wrlatch   = latch;
    c.shiftsrc  = src_shift;
    c.nshift    = 3'(5 - shift);
    c.inv1      = (aop == A_ABS);
    c.inv2      = (aop == A_MINUS);
    c.zeroa_n   = (aop != A_ZERO);
    {c.bsel1, c.bsel2} = (bop == B_ZERO) ? 2'b00 : (bop == B_COMP) ? 2'b01 :
                         (bop == B_MEM)  ? 2'b10 : 2'b11;
    c.accb_n    = (bop != B_ACC);
    c.xmitacc_n = (io == IO_IN);
    c.xmitin2_n = (io != IO_IN);
    c.iobusen   = (io == IO_OUT);
    return c;
  endfunction

  function automatic cw_t uc_idle();
    return uc(7'd0, 0, 0, 1, 0, A_ZERO, B_ZERO, IO_NONE);
  endfunction

  // ------------------------------------------------------------------
  // Reference arithmetic
  function automatic longint sat(longint v, int w);
    longint hi = (longint'(1) <<< (w - 1)) - 1;
    longint lo = -(longint'(1) <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // acc + term, where the term is operand v shifted right k places and
  // negated (neg) or rectified (rect); the complementor inverts and the
  // adder carry completes the negation, exactly as the data path does.
  function automatic longint add_term(longint acc, longint v, int k, bit neg, bit rect,
                                      int w, output bit saturated);
    longint s = v >>> k;
    bit inv = rect ? (s < 0) : neg;
    longint a = inv ? (-s - 1) : s;
    longint t = acc + a + (inv ? 1 : 0);
    longint r = sat(t, w);
    saturated = (r != t);
    return r;
  endfunction

  // A digit of a canonical-signed-digit coefficient: weight (-1)^neg * 2^-k
  typedef struct {int k; bit neg;} digit_t;

  typedef enum int {S_INPUT, S_L1, S_L2, S_STEP} sec_kind_e;

  // A section of the bank.  S_L1: y <= a*y + g*x with state y at address
  // ya and input x at xa (index-mode low bits when indexed).  S_L2:
  // y <= a*y1 + a2*y2 + g*x, y2 <= y1, y1 <= y, with y1 at ya and y2 at
  // ya+1 (a second-order direct-form section with poles only).
  typedef struct {
    sec_kind_e kind;
    int        ya;
    int        xa;
    bit        indexed;
    digit_t    a[$];
    digit_t    g[$];
    digit_t    a2[$];     // S_L2: coefficient of y2
    bit        rect;      // rectify the input (|x| terms)
    bit        out;       // send the result off chip
    bit        bmem;      // first a digit (2^0) brought in on the B input
    bit        gdouble;   // g = 2: x on both adder inputs (B from complementor)
    bit        hold;      // latch the result, write it one word later
  } sec_t;

  typedef struct {int line; longint value;} exp_t;

  class bank_c;
    int w, ram_aw, decim, prog_len;
    sec_t secs [2][$];
    cw_t  prog [2][$];
    int   out_line [2][$];
    int   used [2];           // program words before padding
    // reference state
    longint rmem [2][];
    int     ridx [2];
    // mechanism counters from the assembled programs
    int n_recirc, n_preshift, n_sub, n_abs_lines, n_bmem, n_bcomp, n_hold, n_steps, n_l2;
    // reference event counters
    int n_ref_sat, n_ref_rect_neg;

    function new(int w, int ram_aw, int decim, int prog_len);
      this.w = w; this.ram_aw = ram_aw; this.decim = decim; this.prog_len = prog_len;
      for (int p = 0; p < 2; p++) begin
        rmem[p] = new[1 << ram_aw];
        foreach (rmem[p][i]) rmem[p][i] = 0;
        ridx[p] = (decim > 1) ? decim - 1 : 0;
      end
    endfunction

    function void add_sec(int p, sec_t s);
      secs[p].push_back(s);
    endfunction

    function logic [6:0] fld(int a, bit indexed);
      return indexed ? af_index(a) : af_plain(a, ram_aw);
    endfunction

    // Emit the words for acc = b_first + sum(digits * v), with v already in
    // the shifter input register.  The last word gets read field rd (or
    // no read when rd < 0), shifter source last_src and write latch 'latch'.
    function void emit_terms(int p, digit_t d[$], bit acc_first, bit rect,
                             int rd_field, bit last_src, bit latch);
      int cur = 0;
      for (int i = 0; i < d.size(); i++) begin
        int dst = d[i].k - cur;
        bit last = (i == d.size() - 1);
        aop_e op;
        while (dst > 5) begin
          prog[p].push_back(uc(7'd0, 0, 0, 1, 5, A_ZERO, (i == 0 && !acc_first) ? B_ZERO : B_ACC, IO_NONE));
          n_preshift++; n_recirc++;
          dst -= 5;
        end
        op = rect ? A_ABS : (d[i].neg ? A_MINUS : A_PLUS);
        if (op == A_MINUS) n_sub++;
        if (op == A_ABS) n_abs_lines++;
        prog[p].push_back(uc(last ? 7'(rd_field < 0 ? 0 : rd_field) : 7'd0, 0, last ? latch : 1'b0,
                             last ? last_src : 1'b1, dst, op,
                             (i == 0 && !acc_first) ? B_ZERO : B_ACC, IO_NONE));
        if (!last) n_recirc++;
        cur = d[i].k;
      end
    endfunction

    function void assemble_l1(int p, sec_t s);
      int line;
      logic [6:0] yf = fld(s.ya, s.indexed);
      logic [6:0] xf = fld(s.xa, s.indexed);
      if (s.gdouble) begin
        // x first: acc = x + x with the complementor output on the B input,
        // then a * y is accumulated
        prog[p].push_back(uc(xf, 0, 0, 0, 0, A_ZERO, B_ZERO, IO_NONE));
        prog[p].push_back(uc(yf, 0, 0, 0, 0, A_PLUS, B_COMP, IO_NONE));
        n_bcomp++;
        emit_terms(p, s.a, 1, 0, -1, 1, 1);
      end else begin
        // read the state
        prog[p].push_back(uc(yf, 0, 0, 0, 0, A_ZERO, B_ZERO, IO_NONE));
        // a * y, then read x at the last a word
        if (s.bmem) begin
          // a = 1 +/- 2^-k: one word, A = +/-(y >> k), B = y unshifted
          prog[p].push_back(uc(xf, 0, 0, 0, s.a[1].k, s.a[1].neg ? A_MINUS : A_PLUS, B_MEM, IO_NONE));
          n_bmem++;
          if (s.a[1].neg) n_sub++;
        end else
          emit_terms(p, s.a, 0, 0, xf, 0, 0);
        // + g * x, latch the result
        emit_terms(p, s.g, 1, s.rect, -1, 1, 1);
      end
      // write back (and output)
      if (s.hold) begin
        line = prog[p].size();
        prog[p].push_back(uc(7'd0, 0, 0, 1, 0, A_ZERO, B_ZERO, s.out ? IO_OUT : IO_NONE));
        prog[p].push_back(uc(yf, 1, 0, 1, 0, A_ZERO, B_ZERO, IO_NONE));
        n_hold++;
      end else begin
        line = prog[p].size();
        prog[p].push_back(uc(yf, 1, 0, 1, 0, A_ZERO, B_ZERO, s.out ? IO_OUT : IO_NONE));
      end
      if (s.out) out_line[p].push_back(line);
    endfunction

    // Second-order section.  y1 is read and copied through the accumulator
    // into the write latch while y2 is read; the a2 terms then run on y2,
    // and their first word writes the latched y1 into y2's place.  The last
    // a2 word reads y1 (through the write-through port when it is that same
    // first word), the a1 terms run on y1 and read x, the g terms follow and
    // latch the sum, and the final word writes y1 (and outputs it).
    function void assemble_l2(int p, sec_t s);
      int n, line;
      logic [6:0] y1f = fld(s.ya, s.indexed);
      logic [6:0] y2f = fld(s.ya + 1, s.indexed);
      logic [6:0] xf  = fld(s.xa, s.indexed);
      prog[p].push_back(uc(y1f, 0, 0, 0, 0, A_ZERO, B_ZERO, IO_NONE));
      prog[p].push_back(uc(y2f, 0, 1, 0, 0, A_PLUS, B_ZERO, IO_NONE));
      n = prog[p].size();
      emit_terms(p, s.a2, 0, 0, (s.a2.size() == 1 && s.a2[0].k <= 5) ? y2f : y1f, 0, 0);
      prog[p][n].addr = y2f;
      prog[p][n].memwrite = 1'b1;
      emit_terms(p, s.a, 1, 0, xf, 0, 0);
      emit_terms(p, s.g, 1, s.rect, -1, 1, 1);
      line = prog[p].size();
      prog[p].push_back(uc(y1f, 1, 0, 1, 0, A_ZERO, B_ZERO, s.out ? IO_OUT : IO_NONE));
      if (s.out) out_line[p].push_back(line);
      n_l2++;
    endfunction

    // Assemble both programs; the input section must be first in both so
    // that the processors strobe input together.  Pads to prog_len.
    function int assemble();
      for (int p = 0; p < 2; p++) begin
        prog[p].delete(); out_line[p].delete();
        foreach (secs[p][i]) begin
          case (secs[p][i].kind)
            S_INPUT: begin
              prog[p].push_back(uc(7'd0, 0, 1, 1, 0, A_ZERO, B_ZERO, IO_IN));
              prog[p].push_back(uc(fld(secs[p][i].xa, 0), 1, 0, 1, 0, A_ZERO, B_ZERO, IO_IN));
            end
            S_L1:   assemble_l1(p, secs[p][i]);
            S_L2:   assemble_l2(p, secs[p][i]);
            S_STEP: begin
              prog[p].push_back(uc(af_step(), 0, 0, 1, 0, A_ZERO, B_ZERO, IO_NONE));
              n_steps++;
            end
          endcase
        end
        used[p] = prog[p].size();
        if (prog[p].size() > prog_len) return 0;
        while (prog[p].size() < prog_len) prog[p].push_back(uc_idle());
      end
      return 1;
    endfunction

    function int addr_of(int p, int a, bit indexed);
      int low_w = ram_aw - $clog2(decim);
      if (!indexed) return a;
      return (ridx[p] << low_w) | (a & ((1 << low_w) - 1));
    endfunction

    // Reference: one sample period with input x.  Returns the expected
    // outputs of processor p in program order.
    function void ref_sample(longint x, ref exp_t e [2][$]);
      for (int p = 0; p < 2; p++) begin
        int oi = 0;
        e[p].delete();
        foreach (secs[p][i]) begin
          sec_t s = secs[p][i];
          case (s.kind)
            S_INPUT: rmem[p][s.xa] = x;
            S_STEP:  ridx[p] = (ridx[p] == 0) ? decim - 1 : ridx[p] - 1;
            S_L1: begin
              int ya = addr_of(p, s.ya, s.indexed);
              int xa = addr_of(p, s.xa, s.indexed);
              longint y = rmem[p][ya];
              longint xv = rmem[p][xa];
              longint acc = 0;
              bit st;
              if (s.gdouble) begin
                acc = add_term(xv, xv, 0, 0, 0, w, st);
                n_ref_sat += st;
                foreach (s.a[j]) begin
                  acc = add_term(acc, y, s.a[j].k, s.a[j].neg, 0, w, st);
                  n_ref_sat += st;
                end
              end else begin
                if (s.bmem) begin
                  acc = add_term(y, y, s.a[1].k, s.a[1].neg, 0, w, st);
                  n_ref_sat += st;
                end else
                  foreach (s.a[j]) begin
                    acc = add_term(acc, y, s.a[j].k, s.a[j].neg, 0, w, st);
                    n_ref_sat += st;
                  end
                foreach (s.g[j]) begin
                  if (s.rect && (xv >>> s.g[j].k) < 0) n_ref_rect_neg++;
                  acc = add_term(acc, xv, s.g[j].k, s.g[j].neg, s.rect, w, st);
                  n_ref_sat += st;
                end
              end
              rmem[p][ya] = acc;
              if (s.out) begin
                e[p].push_back('{out_line[p][oi], acc});
                oi++;
              end
            end
            S_L2: begin
              int ya = addr_of(p, s.ya, s.indexed);
              int yb = addr_of(p, s.ya + 1, s.indexed);
              int xa = addr_of(p, s.xa, s.indexed);
              longint y1 = rmem[p][ya];
              longint y2 = rmem[p][yb];
              longint xv = rmem[p][xa];
              longint acc = 0;
              bit st;
              foreach (s.a2[j]) begin
                acc = add_term(acc, y2, s.a2[j].k, s.a2[j].neg, 0, w, st);
                n_ref_sat += st;
              end
              foreach (s.a[j]) begin
                acc = add_term(acc, y1, s.a[j].k, s.a[j].neg, 0, w, st);
                n_ref_sat += st;
              end
              foreach (s.g[j]) begin
                if (s.rect && (xv >>> s.g[j].k) < 0) n_ref_rect_neg++;
                acc = add_term(acc, xv, s.g[j].k, s.g[j].neg, s.rect, w, st);
                n_ref_sat += st;
              end
              rmem[p][yb] = y1;
              rmem[p][ya] = acc;
              if (s.out) begin
                e[p].push_back('{out_line[p][oi], acc});
                oi++;
              end
            end
          endcase
        end
      end
    endfunction
  endclass

  // Helpers to write digit lists
  function automatic digit_t dg(int k, bit neg = 0);
    return '{k, neg};
  endfunction


  // A program that writes 0 to every RAM word (the accumulator is 0 and the
  // write latch stays loading), used to start the RAM from a known state.
  function automatic void clear_prog(int ram_aw, int decim, int prog_len, ref cw_t q[$]);
    q.delete();
    q.push_back(uc(7'd0, 0, 1, 1, 0, A_ZERO, B_ZERO, IO_NONE));
    for (int a = 0; a < (1 << ram_aw); a++)
      q.push_back(uc(af_plain(a, ram_aw), 1, 1, 1, 0, A_ZERO, B_ZERO, IO_NONE));
    while (q.size() < prog_len) q.push_back(uc_idle());
  endfunction

  // ------------------------------------------------------------------
  // The demonstration bank used by the chip and top testbenches.
  //   processor 0: input; nch0 channels of rectifier + one-pole low pass
  //     (state of channel c at address c * 2^low_w, the speech recognition
  //     bank's rectify-and-smooth stage); then one post-decimation one-pole
  //     low pass on the indexed channel, output off chip; index step.
  //   processor 1: input; four one-pole sections that each use another data
  //     path feature (B input from memory, B input from the complementor,
  //     held write latch, plain), each output off chip.
  function automatic sec_t l1(int ya, int xa, bit indexed, bit rect, bit out);
    sec_t s;
    s.kind = S_L1; s.ya = ya; s.xa = xa; s.indexed = indexed; s.rect = rect; s.out = out;
    s.bmem = 0; s.gdouble = 0; s.hold = 0;
    return s;
  endfunction

  function automatic sec_t l2(int ya, int xa, bit indexed, bit out);
    sec_t s;
    s = l1(ya, xa, indexed, 0, out);
    s.kind = S_L2;
    return s;
  endfunction

  function automatic void build_demo(bank_c b, int nch0);
    int low_w = b.ram_aw - $clog2(b.decim);
    sec_t s;
    for (int p = 0; p < 2; p++) begin
      s.kind = S_INPUT; s.xa = 2; s.ya = 0; s.indexed = 0;
      b.add_sec(p, s);
    end
    for (int c = 0; c < nch0; c++) begin
      s = l1(c << low_w, 2, 0, 1, 0);
      s.a.push_back(dg(0));
      s.a.push_back(dg((c == 1) ? 7 : 3 + c % 3, 1));   // a = 1 - 2^-k
      s.g.push_back(dg(1 + c % 3));                    // g = 2^-m on |x|
      if (c == 2) s.g.push_back(dg(4));
      b.add_sec(0, s);
    end
    s = l1(1, 0, 1, 0, 1);                             // decimated channel
    s.a.push_back(dg(0)); s.a.push_back(dg(2, 1));
    s.g.push_back(dg(2));
    b.add_sec(0, s);
    s.kind = S_STEP;
    b.add_sec(0, s);
    // processor 1
    s = l1(3, 2, 0, 0, 1);  s.bmem = 1;                 // a = 1 - 1/8 on B
    s.a.push_back(dg(0)); s.a.push_back(dg(3, 1)); s.g.push_back(dg(3));
    b.add_sec(1, s);
    s = l1(4, 2, 0, 0, 1);  s.gdouble = 1;              // 2x - y/2
    s.a.push_back(dg(1, 1));
    b.add_sec(1, s);
    s = l1(5, 2, 0, 0, 1);  s.hold = 1;                 // a = 1 - 2^-6, g = 1/2 - 1/8
    s.a.push_back(dg(0)); s.a.push_back(dg(6, 1));
    s.g.push_back(dg(1)); s.g.push_back(dg(3, 1));
    b.add_sec(1, s);
    s = l1(6, 2, 0, 0, 1);                              // a = 1/2, g = -1
    s.a.push_back(dg(1)); s.g.push_back(dg(0, 1));
    b.add_sec(1, s);
  endfunction

endpackage
