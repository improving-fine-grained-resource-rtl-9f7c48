// tb_reactive_mapper: self-checking test of the base reactive mapper.
//
// For random epochs (random core, statistics, observed CPI, weights and
// gains) the testbench computes the estimate for the other core, the error,
// the five-epoch error sum and delta = obs + alpha*S + beta*err - est with
// its own integer arithmetic and checks delta and the chosen core
// (positive delta: move to the other core). Both outcomes must occur from
// both cores.
module tb_reactive_mapper;
  import chill_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            epoch_end, go_ooo;
  core_e           core;
  feat_t [NCC-1:0] feat;
  cpi_t            obs, est, delta;
  lr_cc_t          cc_o2i, cc_i2o;
  gains_t          g;

  reactive_mapper dut (.*);

  int checks = 0, failures = 0;
  int outcome [2][2];
  longint hist [$];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint w [], x [], e_est, e_err, e_delta, s;
    bit e_go;
    w = new[NCC]; x = new[NCC];
    epoch_end = 0; core = CORE_OOO; feat = '0; obs = '0; cc_o2i = '0; cc_i2o = '0; g = '0;
    repeat (5) hist.push_back(0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      core = core_e'($urandom_range(0, 1));
      for (int i = 0; i < NCC; i++) begin
        feat[i]     = feat_t'($urandom_range(0, 600));
        cc_o2i.w[i] = coef_t'(int'($urandom_range(0, 400)) - 100);
        cc_i2o.w[i] = coef_t'(int'($urandom_range(0, 400)) - 100);
      end
      cc_o2i.k = cpi_t'($urandom_range(0, 800));
      cc_i2o.k = cpi_t'($urandom_range(0, 800));
      obs      = cpi_t'($urandom_range(200, 3000));
      g.alpha  = coef_t'($urandom_range(0, 64));
      g.beta   = coef_t'($urandom_range(0, 256));
      epoch_end = 1;
      #1;
      for (int i = 0; i < NCC; i++) begin
        x[i] = feat[i];
        w[i] = (core == CORE_OOO) ? cc_o2i.w[i] : cc_i2o.w[i];
      end
      e_est = lr(w, x, (core == CORE_OOO) ? cc_o2i.k : cc_i2o.k);
      e_err = wrap24(e_est - obs);
      s = 0;
      foreach (hist[i]) s += hist[i];
      e_delta = wrap24(obs + fdiv256(g.alpha * wrap24(s)) + fdiv256(g.beta * e_err) - e_est);
      e_go = (core == CORE_OOO) ? !(e_delta > 0) : (e_delta > 0);
      check("estimate", est, e_est);
      check("delta", delta, e_delta);
      check("decision", go_ooo, e_go);
      outcome[core][go_ooo]++;
      hist.push_front(e_err);
      void'(hist.pop_back());
    end
    foreach (outcome[i, j]) check($sformatf("outcome core=%0d go_ooo=%0d seen", i, j), outcome[i][j] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
