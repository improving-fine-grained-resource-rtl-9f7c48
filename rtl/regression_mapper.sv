// regression_mapper: core choice from branch-impact and early-scheduled-
// instruction (ESI) regressions on top of the reactive performance estimate.
//
// Three trained regressions are evaluated at each epoch end, each corrected by
// its own proportional-integral controller:
//   * performance: est = estimated CPI on the other core, as in
//     reactive_mapper; base term delta_cc = obs + PI(err = est - obs) - est;
//   * branch impact: bi = LR(waste counts) + PI(err = LR - bi_meas), the CPI
//     the other core would lose to branch mispredictions;
//   * ESI (OoO only): loss = LR(ESI counts) + PI(err = LR - esi_meas), the
//     CPI the in-order core would lose relative to the OoO core.
// Decision on the OoO core, by mode:
//   MODE_CC   delta_cc > 0 -> in-order
//   MODE_BI   delta_cc - bi > 0 -> in-order
//   MODE_ESI  loss >= 0 -> in-order (negative loss keeps the OoO core)
//   MODE_COMB loss - bi >= 0 -> in-order
// On the in-order core (ESI cannot be measured there) every mode uses
//   delta_cc - (bi if branch impact is enabled) > 0 -> OoO.
// The formulas are those of the original branch-impact, ESI and combined
// schemes; the sign rule "positive -> switch" follows the branch-impact text
// (the CHILL text states the opposite for the same base formula). The error
// references bi_meas and esi_meas are measurements the core supplies: the
// original text does not say what each estimate is compared with, so this
// is an interface of this design's own.
//
// The mapper holds the current core itself (OoO after reset, this design's
// choice) and moves to the chosen core at every epoch end.
//
// Timing: go_ooo is combinational in the epoch snapshot; controller
// histories advance on the rising edge when epoch_end is high (the ESI one
// only after OoO epochs).
module regression_mapper
  import chill_pkg::*;
#(
  parameter int unsigned HIST = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              epoch_end,
  input  map_mode_e         mode,
  input  feat_t [NCC-1:0]   cc_feat,
  input  feat_t [NBI-1:0]   bi_feat,
  input  feat_t [NESI-1:0]  esi_feat,
  input  cpi_t              obs,
  input  cpi_t              bi_meas,
  input  cpi_t              esi_meas,
  input  map_cfg_t          cfg,
  output core_e             core,      // core running the current epoch
  output logic              switched,  // core changed at the last epoch end
  output logic              go_ooo,
  output cpi_t              delta_cc,
  output cpi_t              bi,
  output cpi_t              esi_loss
);
  cpi_t est_io, est_ooo, est, err_cc, pi_cc, past_cc;
  cpi_t bi_io, bi_ooo, bi_raw, pi_bi, past_bi;
  cpi_t esi_raw, past_esi;
  logic use_bi, on_ooo;
  cpi_t d_ooo, d_ino;

  assign on_ooo = (core == CORE_OOO);
  assign use_bi = (mode == MODE_BI) || (mode == MODE_COMB);

  lin_regress #(.N(NCC)) u_cc_o2i (.x(cc_feat), .w(cfg.cc_o2i.w), .k(cfg.cc_o2i.k), .est(est_io));
  lin_regress #(.N(NCC)) u_cc_i2o (.x(cc_feat), .w(cfg.cc_i2o.w), .k(cfg.cc_i2o.k), .est(est_ooo));
  lin_regress #(.N(NBI)) u_bi_o2i (.x(bi_feat), .w(cfg.bi_o2i.w), .k(cfg.bi_o2i.k), .est(bi_io));
  lin_regress #(.N(NBI)) u_bi_i2o (.x(bi_feat), .w(cfg.bi_i2o.w), .k(cfg.bi_i2o.k), .est(bi_ooo));
  lin_regress #(.N(NESI)) u_esi   (.x(esi_feat), .w(cfg.esi.w), .k(cfg.esi.k), .est(esi_raw));

  assign est    = on_ooo ? est_io : est_ooo;
  assign err_cc = est - obs;
  assign bi_raw = on_ooo ? bi_io : bi_ooo;

  pi_controller #(.HIST(HIST)) u_pi_cc (
    .clk, .rst_n, .update(epoch_end),
    .base(obs), .err(err_cc), .g(cfg.g_cc), .out(pi_cc), .past_sum(past_cc));
  pi_controller #(.HIST(HIST)) u_pi_bi (
    .clk, .rst_n, .update(epoch_end),
    .base(bi_raw), .err(bi_raw - bi_meas), .g(cfg.g_bi), .out(pi_bi), .past_sum(past_bi));
  pi_controller #(.HIST(HIST)) u_pi_esi (
    .clk, .rst_n, .update(epoch_end && on_ooo),
    .base(esi_raw), .err(esi_raw - esi_meas), .g(cfg.g_esi), .out(esi_loss), .past_sum(past_esi));

  assign delta_cc = pi_cc - est;
  assign bi       = pi_bi;

  always_comb begin
    d_ino = delta_cc - (use_bi ? bi : '0);
    d_ooo = d_ino;
    go_ooo = 1'b1;
    if (on_ooo) begin
      unique case (mode)
        MODE_CC, MODE_BI: go_ooo = !(d_ooo > 0);
        MODE_ESI:         go_ooo = (esi_loss < 0);
        MODE_COMB:        go_ooo = ((esi_loss - bi) < 0);
        default:          go_ooo = 1'b1;
      endcase
    end else begin
      go_ooo = (d_ino > 0);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      core     <= CORE_OOO;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (epoch_end) begin
        core     <= go_ooo ? CORE_OOO : CORE_INO;
        switched <= (go_ooo != on_ooo);
      end
    end
  end
endmodule
