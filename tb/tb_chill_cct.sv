// tb_chill_cct: self-checking test of the Completed Chains Table.
//
// Records a finished chain, re-records it with a shorter and a longer
// duration (the longer one is kept), enters it through a matching branch
// target (countdown loads the duration, live rises), counts the epochs until
// live falls again, checks that a non-matching target does nothing and that
// a sixth distinct chain replaces an entry in a full five-entry table.
module tb_chill_cct;
  import chill_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic complete, br_valid, epoch_end, hit, live, replaced;
  pc_t  complete_pc, br_target;
  ep_t  complete_dur;

  chill_cct dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic finish_chain(input int pc, input int dur);
    @(negedge clk);
    complete = 1; complete_pc = pc_t'(pc); complete_dur = ep_t'(dur);
    @(negedge clk);
    complete = 0;
  endtask

  task automatic branch(input int tgt);
    @(negedge clk);
    br_valid = 1; br_target = pc_t'(tgt);
    @(negedge clk);
    br_valid = 0;
  endtask

  task automatic epoch();
    @(negedge clk);
    epoch_end = 1;
    @(negedge clk);
    epoch_end = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    complete = 0; br_valid = 0; epoch_end = 0; complete_pc = '0; complete_dur = '0; br_target = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("not live after reset", live, 0);

    finish_chain('h155, 3);
    check("entry valid", 32'(dut.vld), 1);
    check("not live, countdown 0", live, 0);
    finish_chain('h155, 2);
    check("shorter keeps 3", 32'(dut.dur[0]), 3);
    finish_chain('h155, 6);
    check("longer replaces", 32'(dut.dur[0]), 6);
    check("still one entry", 32'(dut.vld), 1);

    branch('h154);
    check("no hit on other target", hit, 0);
    check("not live", live, 0);
    branch('h155);
    check("hit on matching target", hit, 1);
    check("live after entry", live, 1);
    n = 0;
    while (live && n < 40) begin
      epoch();
      n++;
    end
    check("live for duration epochs", n, 6);

    // fill with four more and replace one
    for (int i = 0; i < 4; i++) finish_chain('h10 + i, 1 + i);
    check("five entries", 32'(dut.vld), 5'b11111);
    check("no replacement yet", replaced, 0);
    finish_chain('h3FF, 4);
    check("replacement flagged", replaced, 1);
    branch('h3FF);
    check("new chain hit", hit, 1);
    check("new chain live", live, 1);
    branch('h155);
    check("replaced chain (round-robin victim 0) gone", hit, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
