// tb_fgmap_top: end-to-end test of both mapping engines at full size.
//
// Engine A (CHILL) runs a synthetic retirement stream, one signature per
// cycle, built from scripted phases:
//   * chained loads behind distinct backward-branch tags, killed so that the
//     pending chains table fills and overflows and the completed chains
//     table fills and replaces an entry;
//   * loops that re-enter known chains (branch target = stored tag);
//   * bursts of self-killing loads that overrun the signature buffer;
//   * shadow-only and quiet phases, so that the shadow counter moves both
//     ways and the base reactive mapper decides;
//   * chains left pending for about ten epochs, so that the counter runs down
//     on the OoO core and the in-order core then holds.
// After each chain start the script waits until the tracker has drained the
// signature buffer, so that the chain's loads are stamped with the branch tag
// just taken (the tracker uses the tag current when it analyses a signature).
// The scenario is this testbench's own; the rules it checks are the design's.
// A register-level reference model in the testbench predicts the number of
// long-latency loads, kills and shadow writes; the counts seen at the top's
// event outputs must match, the number of epoch ends must equal the retired
// count / 512, and every decision reason, both core switches, and every
// tracker mechanism (kill, merge, pending-table overflow, chain completion,
// chain re-entry, completed-table replacement, buffer back-pressure) must
// occur at least once. With zero regression weights and gains the reactive
// choice reduces to "observed cycles > constant -> in-order", which the
// testbench checks on every epoch decided by the reactive rule.
// Engine B also gets a random OoO issue/retire stream; a reference with one
// early flag per ROB entry predicts the early scheduled retirements per
// class, which must match the tracker's counts and occur in every class.
// Engine B (regression mapper) runs with zero weights and gains, so that
// delta_cc = cycles - k_cc, bi = k_bi, esi_loss = k_esi; the constants are
// picked at random each epoch and the chosen core is checked against that
// closed form in every mode. Every mode must see both decisions.
module tb_fgmap_top;
  import chill_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // engine A
  logic [1:0]      a_retire_cnt;
  logic [3:0]      a_ev_inc [NCC-1];
  logic            a_sig_valid, a_sig_ready, a_br_valid, a_br_backward;
  sig_t            a_sig;
  pc_t             a_br_target;
  lr_cc_t          a_cc_o2i, a_cc_i2o;
  gains_t          a_gains;
  core_e           a_core;
  why_e            a_why;
  logic [SATW-1:0] a_sat;
  logic            a_switched, a_epoch_end;
  chill_ev_t       a_ev;
  ep_t             a_epoch_num;
  cpi_t            a_delta;
  // engine B
  map_mode_e       b_mode;
  logic [1:0]      b_retire_cnt;
  logic [3:0]      b_ev_inc [NCC-1+NBI];
  logic [6:0]      b_rob_head, b_wait_idx;
  logic            b_wait_valid;
  logic [2:0]      b_iss_valid, b_ret_valid, b_iss_early;
  logic [6:0]      b_iss_idx [3];
  logic [6:0]      b_ret_idx [3];
  esi_cls_e        b_ret_cls [3];
  cpi_t            b_bi_meas, b_esi_meas;
  map_cfg_t        b_cfg;
  core_e           b_core;
  logic            b_switched, b_epoch_end;
  cpi_t            b_delta_cc, b_bi, b_esi_loss;

  fgmap_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- model
  dvec_t m_rows [NREG];
  int exp_lll = 0, exp_kill = 0, exp_shadow = 0, sent = 0;

  function automatic dvec_t mrd(input reg_t r);
    return (r == 0) ? '0 : m_rows[r];
  endfunction

  task automatic model(input sig_t s);
    dvec_t k, u;
    if (s.dst == 0) return;
    if (m_rows[s.dst][s.dst]) begin
      exp_kill++;
      k = m_rows[s.dst];
      for (int i = 0; i < NREG; i++) if ((m_rows[i] & k) == k) m_rows[i] &= ~k;
    end
    u = mrd(s.src1) | mrd(s.src2);
    m_rows[s.dst] = u | m_rows[s.dst];
    if (s.lll) begin m_rows[s.dst][s.dst] = 1'b1; exp_lll++; end
    else if (u != '0) exp_shadow++;
  endtask

  // ---------------------------------------------------------------- counts
  int c_ev [10];
  int c_why [6];
  int c_sw_to_ino = 0, c_sw_to_ooo = 0, c_epochs = 0;
  int c_react_checked = 0;
  int b_seen [4][2];
  int b_epochs = 0;
  // ESI reference: one early flag per ROB entry, counts per class
  bit m_esi_early [128];
  int esi_exp [NESI-1];
  int esi_got [NESI-1];

  function automatic int rob_age(input int idx, input int head);
    return (idx - head + 128) % 128;
  endfunction

  always @(posedge clk) if (rst_n) begin
    c_ev[0] += a_ev.lll;          c_ev[1] += a_ev.kill;
    c_ev[2] += a_ev.shadow;       c_ev[3] += a_ev.pct_created;
    c_ev[4] += a_ev.pct_merged;   c_ev[5] += a_ev.pct_overflow;
    c_ev[6] += a_ev.chain_done;   c_ev[7] += a_ev.cct_hit;
    c_ev[8] += a_ev.cct_replaced; c_ev[9] += a_ev.sig_stall;
  end

  // engine A decision checks: core sampled before and after the deciding edge
  core_e a_before;
  bit    a_pend = 0;
  always @(negedge clk) if (rst_n) begin
    if (a_pend) begin
      c_why[a_why]++;
      if (a_core != a_before) begin
        if (a_core == CORE_INO) c_sw_to_ino++; else c_sw_to_ooo++;
      end
    end
    a_pend = a_epoch_end;
    if (a_epoch_end) begin
      c_epochs++;
      a_before = a_core;
    end
  end

  // reactive rule with zero weights: delta = obs - k (k of the running core)
  cpi_t a_pred_delta;
  always @(negedge clk) if (rst_n && a_epoch_end) begin
    a_pred_delta = cpi_t'(dut.a_cyc) - ((a_core == CORE_OOO) ? a_cc_o2i.k : a_cc_i2o.k);
    check("engine A reactive delta", a_delta, a_pred_delta);
    c_react_checked++;
    // new constants for the next epoch, so both choices happen
    a_cc_o2i.k = ($urandom_range(0, 1) != 0) ? cpi_t'(100) : cpi_t'(100000);
    a_cc_i2o.k = ($urandom_range(0, 1) != 0) ? cpi_t'(100) : cpi_t'(100000);
  end

  // engine B decision check
  bit   b_exp_go;
  cpi_t b_d;
  always @(negedge clk) if (rst_n && b_epoch_end) begin
    b_epochs++;
    b_d = cpi_t'(dut.b_cyc) - ((b_core == CORE_OOO) ? b_cfg.cc_o2i.k : b_cfg.cc_i2o.k);
    check("engine B delta_cc", b_delta_cc, b_d);
    check("engine B bi", b_bi, (b_core == CORE_OOO) ? b_cfg.bi_o2i.k : b_cfg.bi_i2o.k);
    check("engine B esi", b_esi_loss, b_cfg.esi.k);
    if (b_mode == MODE_BI || b_mode == MODE_COMB) b_d = b_d - b_bi;
    if (b_core != CORE_OOO)      b_exp_go = (b_d > 0);
    else if (b_mode == MODE_ESI)  b_exp_go = (b_esi_loss < 0);
    else if (b_mode == MODE_COMB) b_exp_go = ((b_esi_loss - b_bi) < 0);
    else                          b_exp_go = !(b_d > 0);
    check("engine B decision", dut.b_go_ooo, b_exp_go);
    b_seen[b_mode][b_exp_go]++;
  end

  // ---------------------------------------------------------------- driver A
  // an instruction retires when its signature is accepted
  always_comb a_retire_cnt = {1'b0, a_sig_valid && a_sig_ready};

  function automatic sig_t mk(input int d, input int a, input int b, input bit l);
    sig_t s;
    s.dst = reg_t'(d); s.src1 = reg_t'(a); s.src2 = reg_t'(b); s.lll = l;
    return s;
  endfunction

  // one retired instruction; waits while the buffer is full
  task automatic ret(input sig_t s);
    @(negedge clk);
    a_sig_valid = 1; a_sig = s;
    @(posedge clk);
    while (!a_sig_ready) @(posedge clk);
    #1 a_sig_valid = 0;
    model(s);
    sent++;
  endtask

  task automatic br(input int tgt, input bit back);
    @(negedge clk);
    a_br_valid = 1; a_br_target = pc_t'(tgt); a_br_backward = back;
    @(negedge clk);
    a_br_valid = 0; a_br_backward = 0;
  endtask

  // quiet filler: independent arithmetic, no dependence on loads
  task automatic quiet(input int n);
    for (int i = 0; i < n; i++) ret(mk(50 + (i % 8), 60, 61, 0));
  endtask

  // shadows: consumers of a live load in r63
  task automatic shadows(input int n);
    ret(mk(63, 0, 0, 1));
    for (int i = 0; i < n; i++) ret(mk(58 + (i % 4), 63, 0, 0));
  endtask

  // chain with tag t on registers r, r+1: ld r; ld r+1=[r]; consumer
  task automatic chain_start(input int t, input int r);
    br(t, 1);
    ret(mk(r, 0, 0, 1));
    ret(mk(r + 1, r, 0, 1));
    ret(mk(r + 2, r + 1, 0, 0));
  endtask

  // wait until the tracker has caught up with retirement, so a chain's
  // loads are stamped with the branch that was just taken
  task automatic settle();
    @(negedge clk);
    while (dut.u_a_chill.sig_level != 0 || !dut.u_a_chill.f_ready) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- driver B
  // Random per-cycle counts for the performance and branch-waste features, and
  // a random OoO issue/retire stream for the ESI tracker. At every falling edge
  // the reference flags first take the issues of the cycle just ended; the
  // tracker's per-class counts for the retirements still applied are then
  // compared with the reference before new inputs are driven.
  task automatic b_rob_idle();
    b_wait_valid = 0; b_iss_valid = '0; b_ret_valid = '0; b_rob_head = '0; b_wait_idx = '0;
    for (int i = 0; i < 3; i++) begin
      b_iss_idx[i] = '0; b_ret_idx[i] = '0; b_ret_cls[i] = ESI_INT;
    end
  endtask

  initial begin
    int e [NESI-1];
    b_mode = MODE_CC; b_retire_cnt = 0; b_bi_meas = '0; b_esi_meas = '0; b_cfg = '0;
    for (int i = 0; i < NCC-1+NBI; i++) b_ev_inc[i] = 0;
    for (int i = 0; i < 128; i++) m_esi_early[i] = 0;
    for (int c = 0; c < NESI-1; c++) begin esi_exp[c] = 0; esi_got[c] = 0; end
    b_rob_idle();
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      for (int i = 0; i < 3; i++)
        if (b_iss_valid[i])
          m_esi_early[b_iss_idx[i]] = b_wait_valid &&
            (rob_age(b_iss_idx[i], b_rob_head) > rob_age(b_wait_idx, b_rob_head));
      for (int c = 0; c < NESI-1; c++) e[c] = 0;
      for (int j = 0; j < 3; j++)
        if (b_ret_valid[j] && m_esi_early[b_ret_idx[j]]) e[int'(b_ret_cls[j])]++;
      for (int c = 0; c < NESI-1; c++) begin
        esi_exp[c] += e[c];
        esi_got[c] += int'(dut.b_esi_inc[c]);
      end
      b_retire_cnt = 2'($urandom_range(1, 3));
      for (int i = 0; i < NCC-1+NBI; i++) b_ev_inc[i] = 4'($urandom_range(0, 2));
      b_rob_head   = 7'($urandom_range(0, 127));
      b_wait_valid = ($urandom_range(0, 3) != 0);
      b_wait_idx   = 7'(b_rob_head + $urandom_range(0, 30));
      for (int i = 0; i < 3; i++) begin
        b_iss_valid[i] = ($urandom_range(0, 1) != 0);
        b_iss_idx[i]   = 7'(b_rob_head + 8'(i * 20) + 8'($urandom_range(0, 19)));
        b_ret_valid[i] = ($urandom_range(0, 1) != 0);
        b_ret_idx[i]   = 7'(b_rob_head + 8'(i));
        b_ret_cls[i]   = esi_cls_e'($urandom_range(0, NESI - 2));
      end
      if (b_epoch_end) begin
        b_mode = map_mode_e'($urandom_range(0, 3));
        b_cfg.cc_o2i.k = cpi_t'($urandom_range(0, 500));
        b_cfg.cc_i2o.k = cpi_t'($urandom_range(0, 500));
        b_cfg.bi_o2i.k = cpi_t'($urandom_range(0, 200));
        b_cfg.bi_i2o.k = cpi_t'($urandom_range(0, 200));
        b_cfg.esi.k    = cpi_t'(int'($urandom_range(0, 400)) - 200);
      end
    end
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- script
  initial begin
    static string names [10] = '{"lll", "kill", "shadow", "pct_created", "pct_merged",
                          "pct_overflow", "chain_done", "cct_hit", "cct_replaced", "sig_stall"};
    a_sig_valid = 0; a_sig = '0; a_br_valid = 0; a_br_backward = 0;
    a_br_target = '0; a_cc_o2i = '0; a_cc_i2o = '0; a_gains = '0;
    for (int i = 0; i < NCC-1; i++) a_ev_inc[i] = 0;
    for (int i = 0; i < NREG; i++) m_rows[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int round = 0; round < 3; round++) begin
      // quiet epochs: reactive decisions
      quiet(1500);
      // shadows outside chains: cold start
      shadows(600);
      ret(mk(63, 0, 0, 0));           // kill the lone load
      quiet(1100);
      // six chains pending at once: the sixth overflows the table
      for (int k = 0; k < 6; k++) begin
        chain_start('h100 + 16 * round + k, 2 + 3 * k);
        settle();
      end
      for (int k = 0; k < 6; k++) ret(mk(2 + 3 * k, 0, 0, 0));      // kill first loads
      settle();
      // chains stay pending for many epochs: the saturation counter runs
      // down on the OoO core, then the in-order core holds
      quiet(5500);
      shadows(300);
      for (int k = 0; k < 6; k++) ret(mk(3 + 3 * k, 0, 0, 0));      // kill second loads
      ret(mk(63, 0, 0, 0));
      settle();
      quiet(700);
      // re-enter the known chains through their tags
      for (int k = 0; k < 5; k++) begin
        br('h100 + 16 * round + k, 0);
        quiet(200);
      end
      shadows(200);
      ret(mk(63, 0, 0, 0));
      quiet(1200);
      // burst of self-killing loads overruns the buffer
      for (int i = 0; i < 200; i++) ret(mk(40, 0, 0, 1));
      ret(mk(40, 0, 0, 0));
      quiet(1500);
    end
    // let the tracker drain
    repeat (20000) @(posedge clk);

    check("LLLs analysed", c_ev[0], exp_lll);
    check("kills", c_ev[1], exp_kill);
    check("shadow writes", c_ev[2], exp_shadow);
    check("epoch ends", c_epochs, sent / 512);
    for (int i = 1; i < 10; i++) begin
      $display("mechanism %-13s happened %0d times", names[i], c_ev[i]);
      check($sformatf("mechanism %s happened", names[i]), c_ev[i] > 0, 1);
    end
    for (int i = 0; i < 6; i++) begin
      $display("decision reason %0d happened %0d times", i, c_why[i]);
      check($sformatf("decision reason %0d happened", i), c_why[i] > 0, 1);
    end
    $display("switches to in-order %0d, to OoO %0d", c_sw_to_ino, c_sw_to_ooo);
    check("switch to in-order happened", c_sw_to_ino > 0, 1);
    check("switch to OoO happened", c_sw_to_ooo > 0, 1);
    check("engine B epochs", b_epochs > 50, 1);
    for (int c = 0; c < NESI-1; c++) begin
      $display("ESI class %0d counted %0d times", c, esi_got[c]);
      check($sformatf("ESI class %0d count", c), esi_got[c], esi_exp[c]);
      check($sformatf("ESI class %0d happened", c), esi_exp[c] > 0, 1);
    end
    for (int m = 0; m < 4; m++)
      for (int g = 0; g < 2; g++) check($sformatf("engine B mode %0d decision %0d seen", m, g), b_seen[m][g] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
