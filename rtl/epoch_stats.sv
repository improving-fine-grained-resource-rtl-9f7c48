// epoch_stats: epoch boundary generator and per-epoch event counters.
//
// The mapping decisions are made once per epoch of EPOCH_LEN retired
// instructions (512 in the original evaluation). This block counts retired
// instructions (up to 2**RETW-1 per cycle), the cycles spent in the epoch and
// NFEAT event counts supplied by the active core (for example L2 misses,
// L2 hits, branch misses, MLP/ILP samples, flushed or early-scheduled
// instructions by type). When the instruction count reaches EPOCH_LEN it
// snapshots all counts, pulses epoch_end and increments the 5-bit epoch
// number; instructions retired beyond the boundary in that cycle count toward
// the next epoch. Counts saturate at 2**16-1. Because an epoch always holds
// EPOCH_LEN instructions, the cycle count of an epoch is its CPI scaled by
// EPOCH_LEN, which is the CPI unit used by the regression mappers. The
// counter widths and the carry-over rule are this design's choices.
//
// Timing: epoch_end and the snapshots are registered; they appear in the
// cycle after the retirement that completed the epoch and hold until the
// next epoch end.
module epoch_stats
  import chill_pkg::*;
#(
  parameter int unsigned NFEAT     = 6,
  parameter int unsigned EPOCH_LEN = 512,
  parameter int unsigned RETW      = 2,
  parameter int unsigned INCW      = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [RETW-1:0] retire_cnt,
  input  logic [INCW-1:0] ev_inc [NFEAT],
  output logic            epoch_end,
  output ep_t             epoch_num,
  output feat_t           snap_feat [NFEAT],
  output feat_t           snap_cycles
);
  localparam int unsigned IW = $clog2(EPOCH_LEN + 2**RETW);

  logic [IW-1:0] icnt, icnt_n;
  feat_t         fcnt [NFEAT];
  feat_t         ccnt;
  logic          done;

  function automatic feat_t sat_add(input feat_t a, input logic [INCW-1:0] b);
    logic [FEATW:0] s;
    s = {1'b0, a} + (FEATW+1)'(b);
    return s[FEATW] ? '1 : s[FEATW-1:0];
  endfunction

  always_comb begin
    icnt_n = icnt + IW'(retire_cnt);
    done   = (icnt_n >= IW'(EPOCH_LEN));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      icnt        <= '0;
      ccnt        <= '0;
      epoch_end   <= 1'b0;
      epoch_num   <= '0;
      snap_cycles <= '0;
      for (int i = 0; i < NFEAT; i++) begin
        fcnt[i]      <= '0;
        snap_feat[i] <= '0;
      end
    end else begin
      epoch_end <= done;
      if (done) begin
        icnt        <= icnt_n - IW'(EPOCH_LEN);
        ccnt        <= '0;
        epoch_num   <= epoch_num + 1'b1;
        snap_cycles <= sat_add(ccnt, INCW'(1));
        for (int i = 0; i < NFEAT; i++) begin
          snap_feat[i] <= sat_add(fcnt[i], ev_inc[i]);
          fcnt[i]      <= '0;
        end
      end else begin
        icnt <= icnt_n;
        ccnt <= sat_add(ccnt, INCW'(1));
        for (int i = 0; i < NFEAT; i++) fcnt[i] <= sat_add(fcnt[i], ev_inc[i]);
      end
    end
  end
endmodule
