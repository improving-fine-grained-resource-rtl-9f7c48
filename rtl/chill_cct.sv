// chill_cct: Completed Chains Table of the CHILL tracker.
//
// Each entry remembers one finished chain by the last backward branch PC that
// preceded its first LLL, how many epochs the chain lasted (duration) and a
// countdown. When the pending chains table reports a finished chain, an entry
// with the same PC takes the longer of its old and new duration; otherwise a
// new entry is written. Either way its countdown is cleared. Branch targets of
// retiring instructions are compared with the stored PCs: a match means the
// program is entering a known CHILL phase, so the countdown is loaded with the
// duration and 'hit' pulses. At every epoch end all positive countdowns are
// decremented together; 'live' is high while any countdown is positive.
// These rules follow the original description. This design's own choices:
// a finished chain that finds no free entry replaces entries in round-robin
// order; a finished chain and a branch match in the same cycle are both
// applied, the finished chain taking precedence on the same entry.
//
// Timing: all updates take effect at the next rising edge; hit is a
// registered one-cycle pulse.
module chill_cct
  import chill_pkg::*;
#(
  parameter int unsigned NENT = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic complete,
  input  pc_t  complete_pc,
  input  ep_t  complete_dur,
  input  logic br_valid,       // a branch retired
  input  pc_t  br_target,      // its target PC tag
  input  logic epoch_end,
  output logic hit,            // a known chain was entered
  output logic live,           // some countdown is positive
  output logic replaced        // a valid entry was overwritten
);
  logic [NENT-1:0] vld;
  pc_t             pcs [NENT];
  ep_t             dur [NENT];
  ep_t             cnt [NENT];
  logic [$clog2(NENT)-1:0] rr;

  logic [NENT-1:0] cmatch, bmatch;
  logic            any_cmatch, any_free;
  int unsigned     cidx, fidx, widx;

  always_comb begin
    any_cmatch = 1'b0;
    any_free   = 1'b0;
    cidx = 0;
    fidx = 0;
    for (int i = NENT-1; i >= 0; i--) begin
      cmatch[i] = vld[i] && (pcs[i] == complete_pc);
      bmatch[i] = vld[i] && br_valid && (pcs[i] == br_target);
      if (cmatch[i]) begin any_cmatch = 1'b1; cidx = i; end
      if (!vld[i])   begin any_free   = 1'b1; fidx = i; end
    end
    widx = any_cmatch ? cidx : (any_free ? fidx : int'(rr));
  end

  always_comb begin
    live = 1'b0;
    for (int i = 0; i < NENT; i++) live |= vld[i] && (cnt[i] != '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld      <= '0;
      rr       <= '0;
      hit      <= 1'b0;
      replaced <= 1'b0;
      for (int i = 0; i < NENT; i++) begin
        pcs[i] <= '0;
        dur[i] <= '0;
        cnt[i] <= '0;
      end
    end else begin
      hit      <= |bmatch;
      replaced <= 1'b0;
      for (int i = 0; i < NENT; i++) begin
        if (bmatch[i])                   cnt[i] <= dur[i];
        else if (epoch_end && cnt[i] != '0) cnt[i] <= cnt[i] - 1'b1;
      end
      if (complete) begin
        vld[widx] <= 1'b1;
        pcs[widx] <= complete_pc;
        cnt[widx] <= '0;
        if (any_cmatch) begin
          if (complete_dur > dur[widx]) dur[widx] <= complete_dur;
        end else begin
          dur[widx] <= complete_dur;
          if (!any_free) begin
            replaced <= 1'b1;
            rr <= (rr == $clog2(NENT)'(NENT-1)) ? '0 : rr + 1'b1;
          end
        end
      end
    end
  end
endmodule
