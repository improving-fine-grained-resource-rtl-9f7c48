// chill_pct: Pending Chains Table of the CHILL tracker.
//
// Each entry is a bit-vector of the LLL registers of one chain that have not
// been killed yet, with the branch PC and start epoch of the chain's first LLL.
// On every kill from the dependence table the current full chain is compared
// with all entries: entries sharing any bit with it are merged (the first
// matching entry keeps its PC and start epoch and absorbs the chain and the
// other matching entries, which are freed). If nothing matches and the chain
// holds at least two LLLs, it becomes a new entry stamped with the killed
// row's PC and epoch. Finally the killed register's identity bit is cleared in
// the entry; an entry that becomes empty is a completed chain and is reported
// with its PC and its duration (current epoch minus start epoch, modulo 32).
// The merge/create/clear/complete rules follow the original description.
// This design's own choices: a lone LLL that belongs to no chain and matches
// no entry creates nothing (a chain needs more than one LLL); merging several
// matching entries; when all entries are busy a new chain is dropped and
// 'overflow' pulses.
//
// Timing: one kill is processed per cycle; created/complete/overflow are
// registered one-cycle pulses in the cycle after kill_valid.
module chill_pct
  import chill_pkg::*;
#(
  parameter int unsigned NENT   = 5,
  parameter int unsigned NREG_P = chill_pkg::NREG
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  kill_valid,
  input  logic [NREG_P-1:0] kill_chain,
  input  reg_t  kill_reg,
  input  pc_t   kill_pc,
  input  ep_t   kill_ep,
  input  ep_t   cur_epoch,
  output logic  created,      // a new pending chain was created
  output logic  merged,       // the chain was merged into an existing entry
  output logic  overflow,     // a new chain was dropped: table full
  output logic  complete,     // a pending chain ended
  output pc_t   complete_pc,
  output ep_t   complete_dur,
  output logic  active,       // at least one pending chain
  output logic [NENT-1:0] valid_mask
);
  logic [NREG_P-1:0] vec [NENT];
  pc_t               pcs [NENT];
  ep_t               eps [NENT];

  logic [NENT-1:0] hit, freev;
  int unsigned     first_hit, first_free;
  logic            any_hit, any_free, is_chain;
  logic [NREG_P-1:0] merged_vec, kmask;

  always_comb begin
    kmask = '0;
    kmask[kill_reg] = 1'b1;
    any_hit = 1'b0;
    any_free = 1'b0;
    first_hit = 0;
    first_free = 0;
    merged_vec = kill_chain;
    for (int i = NENT-1; i >= 0; i--) begin
      hit[i]   = (vec[i] & kill_chain) != '0;
      freev[i] = (vec[i] == '0);
      if (hit[i])   begin any_hit = 1'b1;  first_hit = i;  end
      if (freev[i]) begin any_free = 1'b1; first_free = i; end
      if (hit[i]) merged_vec = merged_vec | vec[i];
    end
    merged_vec = merged_vec & ~kmask;
    // A chain needs at least two LLLs: more than the killed identity bit.
    is_chain = (kill_chain & ~kmask) != '0;
  end

  always_comb begin
    active = 1'b0;
    for (int i = 0; i < NENT; i++) begin
      valid_mask[i] = (vec[i] != '0);
      active |= valid_mask[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NENT; i++) begin
        vec[i] <= '0;
        pcs[i] <= '0;
        eps[i] <= '0;
      end
      created      <= 1'b0;
      merged       <= 1'b0;
      overflow     <= 1'b0;
      complete     <= 1'b0;
      complete_pc  <= '0;
      complete_dur <= '0;
    end else begin
      created  <= 1'b0;
      merged   <= 1'b0;
      overflow <= 1'b0;
      complete <= 1'b0;
      if (kill_valid) begin
        if (any_hit) begin
          merged <= 1'b1;
          for (int i = 0; i < NENT; i++)
            if (hit[i] && i != first_hit) vec[i] <= '0;
          vec[first_hit] <= merged_vec;
          if (merged_vec == '0) begin
            complete     <= 1'b1;
            complete_pc  <= pcs[first_hit];
            complete_dur <= cur_epoch - eps[first_hit];
          end
        end else if (is_chain) begin
          if (any_free) begin
            created         <= 1'b1;
            vec[first_free] <= kill_chain & ~kmask;
            pcs[first_free] <= kill_pc;
            eps[first_free] <= kill_ep;
          end else begin
            overflow <= 1'b1;
          end
        end
      end
    end
  end
endmodule
