// reactive_mapper: base reactive core choice from a performance estimate.
//
// At each epoch end the statistics of the core that ran the epoch are fed to
// the trained regression for the opposite core (OoO -> in-order or in-order
// -> OoO), which estimates the CPI the program would have had there. With
// obs the observed CPI of the epoch and err = estimate - obs, a PI term gives
//   delta = obs + alpha * (sum of past errors) + beta * err - estimate.
// A positive delta means the running core does worse than the estimate for
// the other one, so the program moves; otherwise it stays.
// The formula is the one of the original work. Its text states the sign rule
// both ways (negative -> in-order in the CHILL chapter; positive -> in-order
// in the branch-impact chapter); this design follows the second, which agrees
// with the arithmetic of the formula. CPI is in cycles per 512-instruction
// epoch.
//
// Timing: go_ooo and delta are combinational in the epoch snapshot; the error
// history advances on the rising edge when epoch_end is high.
module reactive_mapper
  import chill_pkg::*;
#(
  parameter int unsigned HIST = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             epoch_end,
  input  core_e            core,          // core that ran the epoch
  input  feat_t [NCC-1:0]  feat,          // statistics of that epoch
  input  cpi_t             obs,           // observed CPI of the epoch
  input  lr_cc_t           cc_o2i,
  input  lr_cc_t           cc_i2o,
  input  gains_t           g,
  output logic             go_ooo,        // core for the next epoch is OoO
  output cpi_t             est,
  output cpi_t             delta
);
  cpi_t est_io, est_ooo, err, pi_out, past;

  lin_regress #(.N(NCC)) u_o2i (.x(feat), .w(cc_o2i.w), .k(cc_o2i.k), .est(est_io));
  lin_regress #(.N(NCC)) u_i2o (.x(feat), .w(cc_i2o.w), .k(cc_i2o.k), .est(est_ooo));

  assign est = (core == CORE_OOO) ? est_io : est_ooo;
  assign err = est - obs;

  pi_controller #(.HIST(HIST)) u_pi (
    .clk, .rst_n, .update(epoch_end),
    .base(obs), .err, .g, .out(pi_out), .past_sum(past)
  );

  assign delta  = pi_out - est;
  assign go_ooo = (core == CORE_OOO) ? !(delta > 0) : (delta > 0);
endmodule
