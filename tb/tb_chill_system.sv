// tb_chill_system: end-to-end test of the CHILL tracker and predictor.
//
// 1. A backward branch to tag 0x155 and a forward branch retire, then the chained-load example
//    (three long-latency loads, five shadows) goes through the signature
//    buffer; LLL and shadow events are counted.
// 2. Plain writes kill r4, r5 and r1 in turn: expected events are a pending
//    chain created, two merges and a completed chain, with the chain lasting
//    from epoch 1 to epoch 3.
// 3. An epoch end must then choose the OoO core because of a CHILL event.
// 4. A retiring branch to tag 0x155 must hit the completed chain and keep
//    it live for its two-epoch duration; another tag must not.
// 5. A burst of 150 loads that each kill the previous load of the same
//    register overruns the tracker: the buffer must fill (back-pressure seen)
//    and every signature must still be analysed; a kill must reach the pending
//    chains table 22 walk cycles after the table accepts it.
module tb_chill_system;
  import chill_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sig_valid, sig_ready, br_valid, br_backward, epoch_end, reactive_ooo, switched;
  sig_t sig;
  pc_t  br_target;
  ep_t  epoch_num;
  core_e core;
  why_e  why;
  logic [3:0] sat;
  chill_ev_t ev;
  logic [6:0] sig_level;

  chill_system dut (.*);

  int checks = 0, failures = 0;
  int n_lll = 0, n_kill = 0, n_shadow = 0, n_created = 0, n_merged = 0, n_done = 0, n_hit = 0, n_stall = 0;
  int max_level = 0;

  always @(posedge clk) if (rst_n) begin
    n_lll     += ev.lll;
    n_kill    += ev.kill;
    n_shadow  += ev.shadow;
    n_created += ev.pct_created;
    n_merged  += ev.pct_merged;
    n_done    += ev.chain_done;
    n_hit     += ev.cct_hit;
    n_stall   += ev.sig_stall;
    if (sig_level > max_level) max_level = sig_level;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic sig_t mk(input int d, input int a, input int b, input bit l);
    sig_t s;
    s.dst = reg_t'(d); s.src1 = reg_t'(a); s.src2 = reg_t'(b); s.lll = l;
    return s;
  endfunction

  task automatic push(input sig_t s);
    @(negedge clk);
    sig_valid = 1; sig = s;
    @(posedge clk);
    while (!sig_ready) @(posedge clk);
    #1 sig_valid = 0;
  endtask

  task automatic drain();
    while (dut.f_valid || !dut.f_ready) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task automatic epoch();
    @(negedge clk);
    epoch_end = 1;
    @(negedge clk);
    epoch_end = 0;
    epoch_num = epoch_num + 1'b1;
  endtask

  task automatic branch(input int tgt, input bit back);
    @(negedge clk);
    br_valid = 1; br_target = pc_t'(tgt); br_backward = back;
    @(negedge clk);
    br_valid = 0; br_backward = 0;
    @(negedge clk);   // registered hit pulse has been counted
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    sig_valid = 0; sig = '0; br_valid = 0; br_backward = 0; br_target = '0;
    epoch_end = 0; epoch_num = 5'd1; reactive_ooo = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    branch('h155, 1);
    branch('h300, 0);             // forward branch must not move the tag
    push(mk(1, 0, 0, 1)); push(mk(2, 1, 3, 0)); push(mk(3, 2, 4, 0)); push(mk(4, 1, 0, 1));
    push(mk(5, 4, 0, 1)); push(mk(6, 4, 7, 0)); push(mk(7, 6, 8, 0)); push(mk(8, 5, 4, 0));
    drain();
    check("three LLLs analysed", n_lll, 3);
    check("five shadows", n_shadow, 5);
    check("no kill yet", n_kill, 0);

    epoch();                      // epoch 1 -> 2
    epoch();                      // epoch 2 -> 3
    branch('h200, 0);             // forward branch: no effect
    push(mk(4, 0, 0, 0));
    drain();
    check("kill r4", n_kill, 1);
    check("pending chain created", n_created, 1);
    push(mk(5, 0, 0, 0));
    drain();
    check("kill r5 merged", n_merged, 1);
    push(mk(1, 0, 0, 0));
    drain();
    check("kill r1 merged", n_merged, 2);
    check("chain completed", n_done, 1);
    check("three kills", n_kill, 3);

    epoch();
    check("CHILL event keeps OoO", core, CORE_OOO);
    check("reason chill event", why, WHY_CHILL_EVENT);

    branch('h154, 0);
    check("no hit on other tag", n_hit, 0);
    branch('h155, 0);
    check("hit on chain tag", n_hit, 1);
    check("countdown live", dut.cct_live, 1);
    epoch();
    check("live after 1 epoch", dut.cct_live, 1);
    epoch();
    check("over after 2 epochs", dut.cct_live, 0);

    // burst of self-killing loads
    n_lll = 0;
    n_kill = 0;
    fork
      begin
        for (int i = 0; i < 150; i++) push(mk(9, 0, 0, 1));
      end
    join
    t0 = $time;
    drain();
    check("all burst loads analysed", n_lll, 150);
    check("149 kills in burst", n_kill, 149);
    check("buffer filled", max_level, 89);
    check("back-pressure seen", n_stall > 0, 1);
    // timing: from the reference edge, 1 cycle to drive the push, 1 to write
    // the buffer, 1 for the table to accept, 22 walk cycles, and the pulse
    // is counted on the following edge: 26
    n_kill = 0;
    @(negedge clk);
    t0 = $time;
    push(mk(9, 0, 0, 1));
    while (n_kill == 0) @(posedge clk);
    t1 = $time;
    check("kill latency (cycles from accept to kill pulse)", (t1 - t0) / 10, 26);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
