// tb_regression_mapper: self-checking test of the branch-impact / ESI mapper.
//
// Every epoch gets random statistics, measurements, weights, gains and a
// random mode. The testbench evaluates the three regressions, their three
// PI corrections (the ESI history only advancing after OoO epochs) and the
// mode-dependent decision with its own integer arithmetic, keeps its own
// copy of the current core, and checks delta_cc, bi, esi_loss, the decision,
// the core and the switch pulse. Every mode must be exercised from both
// cores with both outcomes.
module tb_regression_mapper;
  import chill_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             epoch_end, go_ooo, switched;
  map_mode_e        mode;
  core_e            core;
  feat_t [NCC-1:0]  cc_feat;
  feat_t [NBI-1:0]  bi_feat;
  feat_t [NESI-1:0] esi_feat;
  cpi_t             obs, bi_meas, esi_meas, delta_cc, bi, esi_loss;
  map_cfg_t         cfg;

  regression_mapper dut (.*);

  int checks = 0, failures = 0;
  int outcome [4][2][2];
  longint h_cc [$], h_bi [$], h_esi [$];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint sum(input longint q [$]);
    longint s = 0;
    foreach (q[i]) s += q[i];
    return wrap24(s);
  endfunction

  function automatic longint pi(input longint base, input longint s, input longint err, input gains_t gg);
    return wrap24(base + fdiv256(gg.alpha * s) + fdiv256(gg.beta * err));
  endfunction

  function automatic coef_t rc();
    return coef_t'(int'($urandom_range(0, 400)) - 100);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint wc [], xc [], wb [], xb [], we [], xe [];
    longint est, err_cc, dcc, bir, e_bi, esr, e_esi, d;
    bit e_go, on_ooo, use_bi;
    core_e m_core;
    wc = new[NCC]; xc = new[NCC]; wb = new[NBI]; xb = new[NBI]; we = new[NESI]; xe = new[NESI];
    epoch_end = 0; mode = MODE_CC; cc_feat = '0; bi_feat = '0; esi_feat = '0;
    obs = '0; bi_meas = '0; esi_meas = '0; cfg = '0;
    repeat (5) begin h_cc.push_back(0); h_bi.push_back(0); h_esi.push_back(0); end
    m_core = CORE_OOO;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check("core", core, m_core);
      mode = map_mode_e'($urandom_range(0, 3));
      for (int i = 0; i < NCC; i++) begin
        cc_feat[i] = feat_t'($urandom_range(0, 600));
        cfg.cc_o2i.w[i] = rc(); cfg.cc_i2o.w[i] = rc();
      end
      for (int i = 0; i < NBI; i++) begin
        bi_feat[i] = feat_t'($urandom_range(0, 300));
        cfg.bi_o2i.w[i] = rc(); cfg.bi_i2o.w[i] = rc();
      end
      for (int i = 0; i < NESI; i++) begin
        esi_feat[i] = feat_t'($urandom_range(0, 300));
        cfg.esi.w[i] = rc();
      end
      cfg.cc_o2i.k = cpi_t'($urandom_range(0, 800));
      cfg.cc_i2o.k = cpi_t'($urandom_range(0, 800));
      cfg.bi_o2i.k = cpi_t'($urandom_range(0, 300));
      cfg.bi_i2o.k = cpi_t'($urandom_range(0, 300));
      cfg.esi.k    = cpi_t'(int'($urandom_range(0, 1200)) - 900);
      cfg.g_cc.alpha  = coef_t'($urandom_range(0, 64));
      cfg.g_cc.beta   = coef_t'($urandom_range(0, 256));
      cfg.g_bi.alpha  = coef_t'($urandom_range(0, 64));
      cfg.g_bi.beta   = coef_t'($urandom_range(0, 256));
      cfg.g_esi.alpha = coef_t'($urandom_range(0, 64));
      cfg.g_esi.beta  = coef_t'($urandom_range(0, 256));
      obs      = cpi_t'($urandom_range(200, 3000));
      bi_meas  = cpi_t'($urandom_range(0, 400));
      esi_meas = cpi_t'(int'($urandom_range(0, 1000)) - 500);
      epoch_end = 1;
      #1;
      on_ooo = (m_core == CORE_OOO);
      use_bi = (mode == MODE_BI) || (mode == MODE_COMB);
      for (int i = 0; i < NCC; i++) begin
        xc[i] = cc_feat[i]; wc[i] = on_ooo ? cfg.cc_o2i.w[i] : cfg.cc_i2o.w[i];
      end
      for (int i = 0; i < NBI; i++) begin
        xb[i] = bi_feat[i]; wb[i] = on_ooo ? cfg.bi_o2i.w[i] : cfg.bi_i2o.w[i];
      end
      for (int i = 0; i < NESI; i++) begin xe[i] = esi_feat[i]; we[i] = cfg.esi.w[i]; end
      est    = lr(wc, xc, on_ooo ? cfg.cc_o2i.k : cfg.cc_i2o.k);
      err_cc = wrap24(est - obs);
      dcc    = wrap24(pi(obs, sum(h_cc), err_cc, cfg.g_cc) - est);
      bir    = lr(wb, xb, on_ooo ? cfg.bi_o2i.k : cfg.bi_i2o.k);
      e_bi   = pi(bir, sum(h_bi), wrap24(bir - bi_meas), cfg.g_bi);
      esr    = lr(we, xe, cfg.esi.k);
      e_esi  = pi(esr, sum(h_esi), wrap24(esr - esi_meas), cfg.g_esi);
      d      = wrap24(dcc - (use_bi ? e_bi : 0));
      if (!on_ooo)                e_go = (d > 0);
      else if (mode == MODE_ESI)  e_go = (e_esi < 0);
      else if (mode == MODE_COMB) e_go = (wrap24(e_esi - e_bi) < 0);
      else                        e_go = !(d > 0);
      check("delta_cc", delta_cc, dcc);
      check("bi", bi, e_bi);
      check("esi_loss", esi_loss, e_esi);
      check("decision", go_ooo, e_go);
      outcome[mode][on_ooo][e_go]++;
      h_cc.push_front(err_cc);  void'(h_cc.pop_back());
      h_bi.push_front(wrap24(bir - bi_meas)); void'(h_bi.pop_back());
      if (on_ooo) begin h_esi.push_front(wrap24(esr - esi_meas)); void'(h_esi.pop_back()); end
      @(negedge clk);
      epoch_end = 0;
      check("switch pulse", switched, (e_go != on_ooo));
      m_core = e_go ? CORE_OOO : CORE_INO;
    end
    foreach (outcome[m, c, g]) check($sformatf("mode %0d core %0d go %0d seen", m, c, g), outcome[m][c][g] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
