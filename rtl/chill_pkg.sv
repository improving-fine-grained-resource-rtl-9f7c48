// chill_pkg: types and constants shared by the fine-grained core-mapping logic.
//
// The CHILL (chained high impact long-latency load) tracker works on retired
// instruction "signatures": one destination and two source architectural
// register numbers of 6 bits each plus one bit that marks a long-latency load
// (a load that missed the L2). That 19-bit record, the 64-entry register space,
// the 10-bit backward-branch PC tag and the 5-bit epoch number follow the
// sizes given for the original tracker. The fixed-point formats of the
// regression mappers are this design's own choice: CPI is carried as
// "cycles per 512-instruction epoch", i.e. CPI scaled by 512, so the cycle
// count of an epoch is directly its CPI in that unit; regression coefficients
// and the alpha/beta controller gains are signed Q8.8.
package chill_pkg;

  localparam int unsigned NREG      = 64;   // architectural registers = CDT rows
  localparam int unsigned REGW      = 6;    // register number width
  localparam int unsigned PCW       = 10;   // last backward branch PC tag
  localparam int unsigned EPW       = 5;    // epoch number / duration / countdown
  localparam int unsigned SIGW      = 3*REGW + 1;  // 19-bit signature
  localparam int unsigned FEATW     = 16;   // per-epoch event count
  localparam int unsigned COEFW     = 16;   // Q8.8 coefficient
  localparam int unsigned CPIW      = 24;   // signed CPI x 512
  localparam int unsigned SATW      = 4;    // shadow saturation counter

  typedef logic [REGW-1:0]         reg_t;
  typedef logic [NREG-1:0]         dvec_t;  // dependence bit-vector
  typedef logic [PCW-1:0]          pc_t;
  typedef logic [EPW-1:0]          ep_t;
  typedef logic [FEATW-1:0]        feat_t;
  typedef logic signed [COEFW-1:0] coef_t;
  typedef logic signed [CPIW-1:0]  cpi_t;

  // One retired instruction as seen by the CHILL tracker. Register 0 is
  // treated as "no operand": its row is never written and stays zero.
  typedef struct packed {
    reg_t dst;
    reg_t src1;
    reg_t src2;
    logic lll;
  } sig_t;

  // Core the program runs on.
  typedef enum logic { CORE_INO = 1'b0, CORE_OOO = 1'b1 } core_e;

  // Why the CHILL predictor chose the core for the next epoch.
  typedef enum logic [2:0] {
    WHY_CHILL_EVENT = 3'd0,  // PCT entry created or CCT chain entered
    WHY_SAT_LOW     = 3'd1,  // live chain, shadow counter below half: in-order
    WHY_SAT_HIGH    = 3'd2,  // live chain, shadow counter at/above half: OoO
    WHY_INO_HOLD    = 3'd3,  // live chain while on in-order, no new CHILL
    WHY_COLD_START  = 3'd4,  // shadow seen outside any chain: OoO
    WHY_REACTIVE    = 3'd5   // no CHILL activity: base reactive mapper
  } why_e;

  // One-cycle event pulses of the CHILL tracker, brought out for counting.
  typedef struct packed {
    logic lll;           // an LLL signature was analysed
    logic kill;          // an LLL was killed (dependence table walk ended)
    logic shadow;        // a non-load shadow dependence was recorded
    logic pct_created;   // new pending chain
    logic pct_merged;    // kill merged into a pending chain
    logic pct_overflow;  // new chain dropped, pending table full
    logic chain_done;    // pending chain completed, moved to CCT
    logic cct_hit;       // retiring branch entered a known chain
    logic cct_replaced;  // completed chain evicted an older one
    logic sig_stall;     // signature buffer full, retire back-pressured
  } chill_ev_t;

  // Regression feature sets, in the order of their ridge-regression
  // compositions. Composite-Cores style performance estimate: L2 miss, L2 hit,
  // branch miss, MLP, ILP, active core cycles. Branch impact: L2 miss+hit
  // waste, branch miss, int+fp waste, control waste, cycles wasted. Early
  // scheduled instructions (ESI): L2 miss, L2 hit, int, fp, control, cycles
  // used.
  localparam int unsigned NCC  = 6;
  localparam int unsigned NBI  = 5;
  localparam int unsigned NESI = 6;

  // Class of a retiring instruction for the ESI counts (one per ESI feature
  // except cycles used).
  typedef enum logic [2:0] {
    ESI_L2MISS = 3'd0, ESI_L2HIT = 3'd1, ESI_INT = 3'd2, ESI_FP = 3'd3, ESI_CNTL = 3'd4
  } esi_cls_e;

  typedef struct packed { coef_t [NCC-1:0]  w; cpi_t k; } lr_cc_t;
  typedef struct packed { coef_t [NBI-1:0]  w; cpi_t k; } lr_bi_t;
  typedef struct packed { coef_t [NESI-1:0] w; cpi_t k; } lr_esi_t;
  // Proportional-integral gains (Q8.8): alpha on the summed past errors,
  // beta on the current error.
  typedef struct packed { coef_t alpha; coef_t beta; } gains_t;

  // Mapping scheme of the regression mapper.
  typedef enum logic [1:0] {
    MODE_CC   = 2'd0,  // performance estimate only (reactive base)
    MODE_BI   = 2'd1,  // plus branch impact
    MODE_ESI  = 2'd2,  // ESI loss estimate on the OoO core
    MODE_COMB = 2'd3   // ESI and branch impact combined
  } map_mode_e;

  typedef struct packed {
    lr_cc_t  cc_o2i;   // estimates in-order CPI from OoO statistics
    lr_cc_t  cc_i2o;   // estimates OoO CPI from in-order statistics
    lr_bi_t  bi_o2i;   // in-order branch impact from OoO waste
    lr_bi_t  bi_i2o;   // OoO branch impact from in-order waste
    lr_esi_t esi;      // in-order loss from OoO ESI counts
    gains_t  g_cc;
    gains_t  g_bi;
    gains_t  g_esi;
  } map_cfg_t;

  // Q8.8 multiply of a coefficient by an unsigned count, rounded toward -inf.
  function automatic cpi_t qmul(input coef_t c, input logic [CPIW-1:0] x);
    logic signed [COEFW+CPIW:0] p;
    p = c * $signed({1'b0, x});
    return cpi_t'(p >>> 8);
  endfunction

  // Q8.8 multiply of a gain by a signed CPI value.
  function automatic cpi_t gmul(input coef_t g, input cpi_t x);
    logic signed [COEFW+CPIW-1:0] p;
    p = g * x;
    return cpi_t'(p >>> 8);
  endfunction

endpackage
