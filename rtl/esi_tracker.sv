// esi_tracker: counts early scheduled instructions (ESI) on the OoO core.
//
// An instruction is early scheduled when it issues while an older instruction
// is still waiting to issue. The core reports, every cycle, the reorder
// buffer (ROB) index of its oldest instruction (rob_head) and of the oldest
// instruction that has not issued yet (wait_valid/wait_idx), plus up to IW
// issuing instructions by ROB index. An issuing instruction whose age
// (distance from rob_head, modulo ROB) is larger than the waiting one's is
// marked early in a one-bit-per-entry flag array; every issue rewrites the
// flag of its entry, so entries reused after a flush start clean. At
// retirement (up to RW instructions per cycle, each with its ROB index and
// class) the flags are read and the early ones are counted by class: L2 miss,
// L2 hit (loads, by the level that served them), integer, floating point and
// control, the ESI categories of the original regression. The per-cycle
// counts feed the epoch counters, which add the epoch's cycles used as the
// sixth regression input.
// The ESI definition, the categories and the 128-entry ROB follow the
// original description; detecting ESI by age comparison against the oldest
// waiting instruction, marking at issue and counting at retirement (so that
// squashed instructions never count) are this design's choices.
//
// Timing: flags are written on the rising edge of the issue cycle; esi_inc is
// combinational in the retirement inputs and the flags, so an instruction
// that issues and retires in the same cycle is not counted as early.
module esi_tracker
  import chill_pkg::*;
#(
  parameter int unsigned ROB = 128,   // reorder buffer entries
  parameter int unsigned IW  = 3,     // issue width
  parameter int unsigned RW  = 3      // retire width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(ROB)-1:0] rob_head,               // oldest in flight
  input  logic                   wait_valid,             // some instruction waits to issue
  input  logic [$clog2(ROB)-1:0] wait_idx,               // oldest waiting instruction
  input  logic [IW-1:0]          iss_valid,
  input  logic [$clog2(ROB)-1:0] iss_idx [IW],
  input  logic [RW-1:0]          ret_valid,
  input  logic [$clog2(ROB)-1:0] ret_idx [RW],
  input  esi_cls_e               ret_cls [RW],
  output logic [3:0]             esi_inc [NESI-1],       // early retirements per class
  output logic [IW-1:0]          iss_early               // which issues are early
);
  localparam int unsigned AW = $clog2(ROB);

  logic [ROB-1:0] early;
  logic [AW-1:0]  wait_age;

  always_comb begin
    wait_age = wait_idx - rob_head;
    for (int i = 0; i < IW; i++)
      iss_early[i] = iss_valid[i] && wait_valid && ((iss_idx[i] - rob_head) > wait_age);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      early <= '0;
    end else begin
      for (int i = 0; i < IW; i++)
        if (iss_valid[i]) early[iss_idx[i]] <= iss_early[i];
    end
  end

  always_comb begin
    for (int c = 0; c < NESI-1; c++) esi_inc[c] = '0;
    for (int j = 0; j < RW; j++)
      if (ret_valid[j] && early[ret_idx[j]])
        esi_inc[int'(ret_cls[j])] = esi_inc[int'(ret_cls[j])] + 4'd1;
  end

  // A retiring class must name one of the counted categories.
  always_ff @(posedge clk)
    for (int j = 0; j < RW; j++)
      if (rst_n && ret_valid[j])
        a_cls_range: assert (int'(ret_cls[j]) < NESI - 1);
endmodule
