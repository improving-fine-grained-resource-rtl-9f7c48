// chill_cdt: Current Dependencies Table of the CHILL tracker.
//
// One row per architectural register. Row N holds a bit-vector of the
// long-latency loads (LLLs) whose values register N currently depends on, plus
// the last backward branch PC and the epoch number recorded when an LLL wrote
// register N. For every retired signature the new row of the destination is
// the union of both source rows and the old destination row; an LLL also sets
// its own identity bit N in row N and stamps PC and epoch. A write to a
// register whose own identity bit is set "kills" that LLL: with K the killed
// row, the table is walked, ROWS rows per cycle; every row that has bit N set is
// OR-ed into the current full chain, and every row that contains all bits of
// K has exactly those bits cleared. The chain, the killed register and its
// PC/epoch stamp are then handed to the pending chains table, and only after
// that is the killing instruction's own write applied.
// These rules follow the original description and worked example. The walk
// examines ROWS rows per cycle; the default of 3 gives ceil(64/3) = 22 walk
// cycles, close to the roughly 22 cycles the original timing analysis gives
// for a kill. How the walk is split into cycles, and register 0 as the
// "no operand" code, are this design's choices.
//
// Timing: a non-killing signature is absorbed in one cycle (in_ready stays
// high). A killing signature takes WALK+2 cycles, WALK = ceil(NREG/ROWS):
// accept, WALK walk cycles, write (24 cycles at the defaults); in_ready is
// low for WALK+1 cycles; kill_valid pulses for one cycle during the write
// cycle. shadow pulses
// in the cycle a non-LLL instruction with a non-empty source dependence set is
// written. dbg_row gives the current content of row dbg_idx combinationally.
module chill_cdt
  import chill_pkg::*;
#(
  parameter int unsigned NREG_P = chill_pkg::NREG,
  parameter int unsigned ROWS   = 3     // rows examined per walk cycle
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  sig_t  in_sig,
  input  pc_t   cur_pc,       // last backward branch PC at processing time
  input  ep_t   cur_epoch,
  output logic  kill_valid,   // one-cycle pulse: an LLL was killed
  output logic [NREG_P-1:0] kill_chain,  // current full chain
  output reg_t  kill_reg,
  output pc_t   kill_pc,
  output ep_t   kill_ep,
  output logic  shadow,       // a non-load shadow dependence was written
  output logic  lll_seen,     // an LLL signature was written
  input  reg_t  dbg_idx,
  output logic [NREG_P-1:0] dbg_row
);
  typedef enum logic [1:0] { S_IDLE, S_WALK, S_WRITE } state_e;

  logic [NREG_P-1:0] rows [NREG_P];
  pc_t               pcs  [NREG_P];
  ep_t               eps  [NREG_P];

  // walk cycles per kill, and the width of the walk step counter
  localparam int unsigned WALK = (NREG_P + ROWS - 1) / ROWS;
  localparam int unsigned STW  = (WALK > 1) ? $clog2(WALK) : 1;

  state_e            state;
  sig_t              hold;
  logic [NREG_P-1:0] kvec, chain;
  logic [STW-1:0]    step;

  assign in_ready = (state == S_IDLE);
  assign dbg_row  = rows[dbg_idx];

  // Row read with register 0 forced to "no dependence".
  function automatic logic [NREG_P-1:0] rd(input reg_t r);
    return (r == '0) ? '0 : rows[r];
  endfunction

  // The signature that is to be written this cycle: a fresh one in S_IDLE,
  // the held killing one in S_WRITE.
  sig_t wsig;
  logic [NREG_P-1:0] src_union, new_row;
  logic do_write, kills;

  always_comb begin
    wsig      = (state == S_WRITE) ? hold : in_sig;
    src_union = rd(wsig.src1) | rd(wsig.src2);
    new_row   = src_union | rd(wsig.dst);
    if (wsig.lll) new_row[wsig.dst] = 1'b1;
    kills     = (wsig.dst != '0) && rows[wsig.dst][wsig.dst];
    do_write  = (wsig.dst != '0) &&
                ((state == S_WRITE) || (state == S_IDLE && in_valid && !kills));
  end

  // The ROWS rows of the current walk step: which of them carry the killed
  // identity (their union joins the chain) and which contain all of K.
  logic [NREG_P-1:0] step_or;
  logic [ROWS-1:0]   step_clr;
  always_comb begin
    step_or  = '0;
    step_clr = '0;
    for (int j = 0; j < ROWS; j++) begin
      automatic int unsigned r = int'(step) * ROWS + j;
      if (r < NREG_P) begin
        if (rows[r][hold.dst]) step_or = step_or | rows[r];
        step_clr[j] = ((rows[r] & kvec) == kvec);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      step       <= '0;
      kill_valid <= 1'b0;
      shadow     <= 1'b0;
      lll_seen   <= 1'b0;
      kill_chain <= '0;
      kill_reg   <= '0;
      kill_pc    <= '0;
      kill_ep    <= '0;
      kvec       <= '0;
      chain      <= '0;
      hold       <= '0;
      for (int i = 0; i < NREG_P; i++) begin
        rows[i] <= '0;
        pcs[i]  <= '0;
        eps[i]  <= '0;
      end
    end else begin
      kill_valid <= 1'b0;
      shadow     <= 1'b0;
      lll_seen   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (in_valid && kills) begin
            hold  <= in_sig;
            kvec  <= rows[in_sig.dst];
            chain <= '0;
            step  <= '0;
            state <= S_WALK;
          end
        end
        S_WALK: begin
          chain <= chain | step_or;
          for (int j = 0; j < ROWS; j++) begin
            automatic int unsigned r = int'(step) * ROWS + j;
            if (r < NREG_P && step_clr[j]) rows[r] <= rows[r] & ~kvec;
          end
          if (step == STW'(WALK - 1)) begin
            state      <= S_WRITE;
            kill_valid <= 1'b1;
            kill_chain <= chain | step_or;
            kill_reg   <= hold.dst;
            kill_pc    <= pcs[hold.dst];
            kill_ep    <= eps[hold.dst];
          end
          step <= step + 1'b1;
        end
        S_WRITE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (do_write) begin
        rows[wsig.dst] <= new_row;
        if (wsig.lll) begin
          pcs[wsig.dst] <= cur_pc;
          eps[wsig.dst] <= cur_epoch;
        end
        shadow   <= !wsig.lll && (src_union != '0);
        lll_seen <= wsig.lll;
      end
    end
  end
endmodule
