// chill_predictor: per-epoch core choice of the CHILL mapping scheme.
//
// During an epoch it records whether the dependence table wrote a shadow
// dependence, whether a pending chain was created and whether a retiring
// branch entered a known completed chain. At the epoch end it picks the core
// for the next epoch:
//   * a new chain or an entered known chain ("CHILL event") -> OoO core; if
//     the program was on the in-order core the shadow counter is set to max;
//   * otherwise, while chains are live (pending chains, or a positive CCT
//     countdown): on the OoO core, stay there unless the 4-bit shadow counter
//     has fallen below half its maximum, then go in-order; on the in-order
//     core stay there;
//   * otherwise, a shadow dependence seen outside any chain (cold start) ->
//     OoO core;
//   * otherwise the base reactive mapper's decision is taken.
// The shadow counter saturates at 0 and 15; it counts up in an epoch with
// shadows and down in one without. This follows the original description;
// the priority order of the rules, the reset core (OoO) and the reset
// counter value (0) are this design's choices.
//
// Timing: core/why/sat update at the rising edge on which epoch_end is high;
// pulses that arrive in that same cycle count for the ending epoch. switched
// pulses one cycle when the core changes.
module chill_predictor
  import chill_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  epoch_end,
  input  logic  shadow,
  input  logic  pct_created,
  input  logic  cct_hit,
  input  logic  pct_active,
  input  logic  cct_live,
  input  logic  reactive_ooo,   // base reactive mapper: 1 = OoO next epoch
  output core_e core,
  output why_e  why,
  output logic [SATW-1:0] sat,
  output logic  switched
);
  localparam logic [SATW-1:0] SAT_MAX  = '1;
  localparam logic [SATW-1:0] SAT_HALF = SATW'((2**SATW) / 2);

  logic shadow_q, created_q, hit_q;
  logic shadow_now, event_now, active_now;
  logic [SATW-1:0] sat_n;
  core_e core_n;
  why_e  why_n;

  always_comb begin
    shadow_now = shadow_q | shadow;
    event_now  = created_q | pct_created | hit_q | cct_hit;
    active_now = pct_active | cct_live;
    if (shadow_now) sat_n = (sat == SAT_MAX) ? sat : sat + 1'b1;
    else            sat_n = (sat == '0) ? sat : sat - 1'b1;
    core_n = core;
    why_n  = WHY_REACTIVE;
    if (event_now) begin
      core_n = CORE_OOO;
      why_n  = WHY_CHILL_EVENT;
      if (core == CORE_INO) sat_n = SAT_MAX;
    end else if (active_now) begin
      if (core == CORE_OOO) begin
        core_n = (sat_n < SAT_HALF) ? CORE_INO : CORE_OOO;
        why_n  = (sat_n < SAT_HALF) ? WHY_SAT_LOW : WHY_SAT_HIGH;
      end else begin
        core_n = CORE_INO;
        why_n  = WHY_INO_HOLD;
      end
    end else if (shadow_now) begin
      core_n = CORE_OOO;
      why_n  = WHY_COLD_START;
    end else begin
      core_n = reactive_ooo ? CORE_OOO : CORE_INO;
      why_n  = WHY_REACTIVE;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      core      <= CORE_OOO;
      why       <= WHY_REACTIVE;
      sat       <= '0;
      shadow_q  <= 1'b0;
      created_q <= 1'b0;
      hit_q     <= 1'b0;
      switched  <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (epoch_end) begin
        core      <= core_n;
        why       <= why_n;
        sat       <= sat_n;
        switched  <= (core_n != core);
        shadow_q  <= 1'b0;
        created_q <= 1'b0;
        hit_q     <= 1'b0;
      end else begin
        shadow_q  <= shadow_now;
        created_q <= created_q | pct_created;
        hit_q     <= hit_q | cct_hit;
      end
    end
  end
endmodule
