// tb_fb_controller: checks the shared sequencer with two control stores.
// With a 16-word ROM, a 12-word program, 64-word RAMs and decimation by 8,
// random control words are loaded into each processor's store.  While the
// program runs, each processor must present word pc-1 of its own store
// (one clock of ROM output register), 'first' must mark word 0 of every
// period, the RAM address must follow the field decoding against each
// processor's own index register model, and lastch must be processor 0's
// index at 0 during 'first'.
module tb_fb_controller;
  import fb_pkg::*;
  localparam int NPROC = 2, ROM_WORDS = 16, PROG_LEN = 12, RAM_WORDS = 64, DECIM = 8;
  logic clk = 0, rst_n = 0, ld_en = 0;
  logic [0:0] ld_proc = '0;
  logic [3:0] ld_addr = '0;
  cw_t ld_data, cw [NPROC];
  logic [5:0] ram_addr [NPROC];
  logic [2:0] idx [NPROC];
  logic first, lastch;
  cw_t model [NPROC][ROM_WORDS];
  int checks = 0, failures = 0, n_steps = 0, n_last = 0;

  fb_controller #(.NPROC(NPROC), .ROM_WORDS(ROM_WORDS), .PROG_LEN(PROG_LEN),
                  .RAM_WORDS(RAM_WORDS), .DECIM(DECIM)) dut (
    .clk, .rst_n, .ld_en, .ld_proc, .ld_addr, .ld_data, .cw, .ram_addr, .idx, .first, .lastch);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t, m_idx [NPROC], exp_addr;
    cw_t w;
    ld_data = CW_IDLE;
    for (int p = 0; p < NPROC; p++)
      for (int a = 0; a < ROM_WORDS; a++) begin
        @(negedge clk);
        w = cw_t'(CW_BITS'($urandom));
        case ($urandom_range(0, 3))       // spread the address field over its modes
          0:       w.addr = {3'b111, 4'($urandom)};
          1:       w.addr = {3'b110, 4'($urandom)};
          default: w.addr = {1'b0, 6'($urandom)};
        endcase
        // processor 0 steps its index exactly once per period, in word 5
        if (p == 0) w.addr = (a == 5) ? 7'b1110000 : (w.addr[6:4] == 3'b111 ? 7'b1100001 : w.addr);
        ld_en = 1; ld_proc = 1'(p); ld_addr = 4'(a); ld_data = w; model[p][a] = w;
      end
    @(negedge clk); ld_en = 0;
    rst_n = 1;
    foreach (m_idx[p]) m_idx[p] = DECIM - 1;
    // after reset the store output is the idle word for one clock
    check(cw[0] == CW_IDLE && cw[1] == CW_IDLE && !first, "idle word after reset");
    @(negedge clk);
    t = 0;                                     // word now presented
    for (int c = 0; c < 100 * PROG_LEN; c++) begin
      check(first == (t == 0), $sformatf("first at word %0d", t));
      check(lastch == (t == 0 && m_idx[0] == 0), "lastch");
      n_last += lastch;
      for (int p = 0; p < NPROC; p++) begin
        check(cw[p] == model[p][t], $sformatf("processor %0d word %0d", p, t));
        check(idx[p] == 3'(m_idx[p]), $sformatf("processor %0d index %0d expected %0d", p, idx[p], m_idx[p]));
        if (!cw[p].addr[6]) exp_addr = cw[p].addr[5:0];
        else if (cw[p].addr[6:4] == 3'b110) exp_addr = m_idx[p] * 8 + cw[p].addr[2:0];
        else exp_addr = -1;
        if (exp_addr >= 0) check(ram_addr[p] == 6'(exp_addr), $sformatf("processor %0d address", p));
      end
      @(negedge clk);
      for (int p = 0; p < NPROC; p++)
        if (model[p][t].addr[6:4] == 3'b111) begin
          m_idx[p] = (m_idx[p] == 0) ? DECIM - 1 : m_idx[p] - 1;
          n_steps++;
        end
      t = (t + 1) % PROG_LEN;
    end
    check(n_steps > 0 && n_last > 0, "index step or lastch never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
