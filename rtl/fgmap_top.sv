// fgmap_top: fine-grained core-mapping logic for a tightly coupled
// heterogeneous core (one fetch engine feeding an out-of-order and an
// in-order back end).
//
// Two mapping engines stand side by side, each with its own ports, because
// they are separate schemes that are not meant to run together:
//   * Engine A (ports a_*): the CHILL scheme. Retired-instruction signatures
//     and branches feed the CHILL tracker, which follows chains of dependent
//     long-latency loads and their shadow instructions; an epoch counter
//     supplies the 512-instruction epoch boundary and statistics for the
//     base reactive mapper, which decides whenever no chain is active.
//   * Engine B (ports b_*): the regression scheme. An epoch counter gathers
//     performance and branch-misprediction-waste counts from the core, and
//     the early scheduled instruction (ESI) tracker derives the ESI counts
//     from the OoO core's issue and retirement; the regression mapper decides
//     from them in one of four modes (performance only, plus branch impact,
//     ESI, ESI plus branch impact).
// The cores, caches, fetch unit and state transfer are outside this block:
// their retirement information comes in through the ports and the chosen
// core goes out. Regression weights and controller gains are configuration
// inputs, because they come from offline training.
//
// Timing: a_core/b_core change on the rising edge at which the engine's
// epoch_end is high; epoch_end is a one-cycle pulse one cycle after the
// retirement that completes the epoch.
module fgmap_top
  import chill_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // ---- Engine A: CHILL ----
  input  logic [1:0]        a_retire_cnt,
  input  logic [3:0]        a_ev_inc [NCC-1],   // L2 miss, L2 hit, branch miss, MLP, ILP
  input  logic              a_sig_valid,
  output logic              a_sig_ready,
  input  sig_t              a_sig,
  input  logic              a_br_valid,
  input  logic              a_br_backward,
  input  pc_t               a_br_target,
  input  lr_cc_t            a_cc_o2i,
  input  lr_cc_t            a_cc_i2o,
  input  gains_t            a_gains,
  output core_e             a_core,
  output why_e              a_why,
  output logic [SATW-1:0]   a_sat,
  output logic              a_switched,
  output chill_ev_t         a_ev,
  output logic              a_epoch_end,
  output ep_t               a_epoch_num,
  output cpi_t              a_delta,
  // ---- Engine B: regression mapper ----
  input  map_mode_e         b_mode,
  input  logic [1:0]        b_retire_cnt,
  // NCC-1 performance events (as a_ev_inc), then NBI branch-waste events
  // (L2 miss + hit, branch miss, int + fp, control, cycles wasted)
  input  logic [3:0]        b_ev_inc [NCC-1+NBI],
  // OoO issue and retirement, for the early scheduled instruction counts
  input  logic [6:0]        b_rob_head,          // oldest ROB entry in flight
  input  logic              b_wait_valid,        // an instruction waits to issue
  input  logic [6:0]        b_wait_idx,          // oldest waiting ROB entry
  input  logic [2:0]        b_iss_valid,
  input  logic [6:0]        b_iss_idx [3],
  input  logic [2:0]        b_ret_valid,
  input  logic [6:0]        b_ret_idx [3],
  input  esi_cls_e          b_ret_cls [3],
  input  cpi_t              b_bi_meas,
  input  cpi_t              b_esi_meas,
  input  map_cfg_t          b_cfg,
  output core_e             b_core,
  output logic              b_switched,
  output logic              b_epoch_end,
  output cpi_t              b_delta_cc,
  output cpi_t              b_bi,
  output cpi_t              b_esi_loss,
  output logic [2:0]        b_iss_early          // which issues are early scheduled
);
  // ------------------------------------------------------------ Engine A
  localparam int unsigned NA = NCC - 1;
  feat_t           a_snap [NA];
  feat_t           a_cyc;
  feat_t [NCC-1:0] a_feat;
  logic            a_go_ooo;
  cpi_t            a_est;

  epoch_stats #(.NFEAT(NA)) u_a_stats (
    .clk, .rst_n, .retire_cnt(a_retire_cnt), .ev_inc(a_ev_inc),
    .epoch_end(a_epoch_end), .epoch_num(a_epoch_num),
    .snap_feat(a_snap), .snap_cycles(a_cyc)
  );

  always_comb begin
    for (int i = 0; i < NA; i++) a_feat[i] = a_snap[i];
    a_feat[NCC-1] = a_cyc;   // active core cycles
  end

  reactive_mapper u_a_react (
    .clk, .rst_n, .epoch_end(a_epoch_end), .core(a_core),
    .feat(a_feat), .obs(cpi_t'(a_cyc)),
    .cc_o2i(a_cc_o2i), .cc_i2o(a_cc_i2o), .g(a_gains),
    .go_ooo(a_go_ooo), .est(a_est), .delta(a_delta)
  );

  chill_system u_a_chill (
    .clk, .rst_n,
    .sig_valid(a_sig_valid), .sig_ready(a_sig_ready), .sig(a_sig),
    .br_valid(a_br_valid), .br_backward(a_br_backward), .br_target(a_br_target),
    .epoch_end(a_epoch_end), .epoch_num(a_epoch_num),
    .reactive_ooo(a_go_ooo),
    .core(a_core), .why(a_why), .sat(a_sat), .switched(a_switched),
    .ev(a_ev), .sig_level()
  );

  // ------------------------------------------------------------ Engine B
  localparam int unsigned NB = NCC - 1 + NBI + NESI - 1;
  feat_t            b_snap [NB];
  feat_t            b_cyc;
  ep_t              b_epoch_num;
  feat_t [NCC-1:0]  b_cc;
  feat_t [NBI-1:0]  b_bif;
  feat_t [NESI-1:0] b_esif;
  logic             b_go_ooo;

  logic [3:0]       b_esi_inc [NESI-1];
  logic [3:0]       b_inc [NB];

  esi_tracker u_b_esi (
    .clk, .rst_n, .rob_head(b_rob_head), .wait_valid(b_wait_valid), .wait_idx(b_wait_idx),
    .iss_valid(b_iss_valid), .iss_idx(b_iss_idx),
    .ret_valid(b_ret_valid), .ret_idx(b_ret_idx), .ret_cls(b_ret_cls),
    .esi_inc(b_esi_inc), .iss_early(b_iss_early)
  );

  always_comb begin
    for (int i = 0; i < NCC-1+NBI; i++) b_inc[i] = b_ev_inc[i];
    for (int i = 0; i < NESI-1; i++)    b_inc[NCC-1+NBI+i] = b_esi_inc[i];
  end

  epoch_stats #(.NFEAT(NB)) u_b_stats (
    .clk, .rst_n, .retire_cnt(b_retire_cnt), .ev_inc(b_inc),
    .epoch_end(b_epoch_end), .epoch_num(b_epoch_num),
    .snap_feat(b_snap), .snap_cycles(b_cyc)
  );

  always_comb begin
    for (int i = 0; i < NCC-1; i++)  b_cc[i]   = b_snap[i];
    b_cc[NCC-1] = b_cyc;
    for (int i = 0; i < NBI; i++)    b_bif[i]  = b_snap[NCC-1+i];
    for (int i = 0; i < NESI-1; i++) b_esif[i] = b_snap[NCC-1+NBI+i];
    b_esif[NESI-1] = b_cyc;   // cycles used
  end

  regression_mapper u_b_map (
    .clk, .rst_n, .epoch_end(b_epoch_end), .mode(b_mode),
    .cc_feat(b_cc), .bi_feat(b_bif), .esi_feat(b_esif),
    .obs(cpi_t'(b_cyc)), .bi_meas(b_bi_meas), .esi_meas(b_esi_meas),
    .cfg(b_cfg),
    .core(b_core), .switched(b_switched), .go_ooo(b_go_ooo),
    .delta_cc(b_delta_cc), .bi(b_bi), .esi_loss(b_esi_loss)
  );
endmodule
