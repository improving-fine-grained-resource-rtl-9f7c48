// chill_system: the complete CHILL tracker and predictor.
//
// Retired instructions enter as signatures through the signature buffer and
// are analysed one at a time by the Current Dependencies Table. A killed
// long-latency load produces a current full chain that the Pending Chains
// Table merges or records; chains that end move to the Completed Chains
// Table, which recognises re-entry into a known chain by comparing retiring
// branch targets with the stored backward-branch PCs. The predictor turns
// this activity, together with the base reactive mapper's choice, into the
// core for the next epoch.
//
// The last backward branch PC is kept here: every retiring branch flagged as
// backward loads its target tag, and that tag is stamped into the dependence
// table when an LLL is analysed. Using the target (the loop head) as the tag,
// so that it compares directly with later branch targets, is this design's
// reading; the analysis uses the tag current when the signature leaves the
// buffer, not when it entered.
//
// Timing: see the sub-blocks. A non-killing signature costs one cycle, a
// killing one 24 cycles at the defaults (see chill_cdt); sig_ready falls
// while the buffer is full.
module chill_system
  import chill_pkg::*;
#(
  parameter int unsigned SIG_DEPTH = 89,
  parameter int unsigned PCT_N     = 5,
  parameter int unsigned CCT_N     = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  // retired instruction signatures
  input  logic      sig_valid,
  output logic      sig_ready,
  input  sig_t      sig,
  // retired branches
  input  logic      br_valid,
  input  logic      br_backward,
  input  pc_t       br_target,
  // epoch timing
  input  logic      epoch_end,
  input  ep_t       epoch_num,
  // decision
  input  logic      reactive_ooo,
  output core_e     core,
  output why_e      why,
  output logic [SATW-1:0] sat,
  output logic      switched,
  output chill_ev_t ev,
  output logic [$clog2(SIG_DEPTH+1)-1:0] sig_level
);
  pc_t  last_bb_pc;
  logic f_valid, f_ready;
  sig_t f_sig;

  logic kill_valid;
  dvec_t kill_chain;
  reg_t kill_reg;
  pc_t  kill_pc;
  ep_t  kill_ep;
  logic shadow, lll_seen;
  logic created, merged, pct_ovf, complete, pct_active;
  pc_t  complete_pc;
  ep_t  complete_dur;
  logic cct_hit, cct_live, cct_repl;
  logic sig_ovf;
  logic [PCT_N-1:0] pct_mask;
  dvec_t dbg_row;

  always_ff @(posedge clk) begin
    if (!rst_n)                       last_bb_pc <= '0;
    else if (br_valid && br_backward) last_bb_pc <= br_target;
  end

  sig_fifo #(.DEPTH(SIG_DEPTH), .W($bits(sig_t))) u_fifo (
    .clk, .rst_n,
    .in_valid(sig_valid), .in_ready(sig_ready), .in_data(sig),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_sig),
    .level(sig_level), .overflow(sig_ovf)
  );

  chill_cdt u_cdt (
    .clk, .rst_n,
    .in_valid(f_valid), .in_ready(f_ready), .in_sig(f_sig),
    .cur_pc(last_bb_pc), .cur_epoch(epoch_num),
    .kill_valid, .kill_chain, .kill_reg, .kill_pc, .kill_ep,
    .shadow, .lll_seen,
    .dbg_idx('0), .dbg_row
  );

  chill_pct #(.NENT(PCT_N)) u_pct (
    .clk, .rst_n,
    .kill_valid, .kill_chain, .kill_reg, .kill_pc, .kill_ep,
    .cur_epoch(epoch_num),
    .created, .merged, .overflow(pct_ovf),
    .complete, .complete_pc, .complete_dur,
    .active(pct_active), .valid_mask(pct_mask)
  );

  chill_cct #(.NENT(CCT_N)) u_cct (
    .clk, .rst_n,
    .complete, .complete_pc, .complete_dur,
    .br_valid, .br_target,
    .epoch_end,
    .hit(cct_hit), .live(cct_live), .replaced(cct_repl)
  );

  chill_predictor u_pred (
    .clk, .rst_n,
    .epoch_end, .shadow,
    .pct_created(created), .cct_hit,
    .pct_active, .cct_live,
    .reactive_ooo,
    .core, .why, .sat, .switched
  );

  always_comb begin
    ev.lll          = lll_seen;
    ev.kill         = kill_valid;
    ev.shadow       = shadow;
    ev.pct_created  = created;
    ev.pct_merged   = merged;
    ev.pct_overflow = pct_ovf;
    ev.chain_done   = complete;
    ev.cct_hit      = cct_hit;
    ev.cct_replaced = cct_repl;
    ev.sig_stall    = sig_ovf;
  end
endmodule
