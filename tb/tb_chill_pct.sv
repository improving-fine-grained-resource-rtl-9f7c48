// tb_chill_pct: self-checking test of the Pending Chains Table.
//
// Replays the kills of the chained-load example (kill r4 with full chain
// {r1,r4,r5}, then r5, then r1): a pending chain {r1,r5} is created with the
// PC and epoch of r4, shrinks to {r1}, and completes with duration = current
// epoch - start epoch. Then checks that a lone load creates nothing, that a
// chain bridging two pending entries merges them, that a sixth disjoint chain
// overflows a full table, and that the epoch difference wraps modulo 32.
module tb_chill_pct;
  import chill_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  kill_valid;
  dvec_t kill_chain;
  reg_t  kill_reg;
  pc_t   kill_pc;
  ep_t   kill_ep, cur_epoch;
  logic  created, merged, overflow, complete, active;
  pc_t   complete_pc;
  ep_t   complete_dur;
  logic [4:0] valid_mask;

  chill_pct dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic dvec_t bits(input int a, input int b = -1, input int c = -1);
    dvec_t v = '0;
    v[a] = 1'b1;
    if (b >= 0) v[b] = 1'b1;
    if (c >= 0) v[c] = 1'b1;
    return v;
  endfunction

  // issue one kill; outputs are checked in the following cycle
  task automatic kill(input dvec_t ch, input int r, input int pc, input int ep);
    @(negedge clk);
    kill_valid = 1; kill_chain = ch; kill_reg = reg_t'(r);
    kill_pc = pc_t'(pc); kill_ep = ep_t'(ep);
    @(negedge clk);
    kill_valid = 0;
  endtask

  task automatic expect_flags(input string tag, input bit c, input bit m, input bit o, input bit d);
    check({tag, " created"},  64'(created),  64'(c));
    check({tag, " merged"},   64'(merged),   64'(m));
    check({tag, " overflow"}, 64'(overflow), 64'(o));
    check({tag, " complete"}, 64'(complete), 64'(d));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kill_valid = 0; kill_chain = '0; kill_reg = '0; kill_pc = '0; kill_ep = '0;
    cur_epoch = 5'd7;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("empty after reset", 64'(active), 64'd0);

    // example chain
    kill(bits(1, 4, 5), 4, 'h155, 4);
    expect_flags("kill r4", 1, 0, 0, 0);
    check("one entry valid", 64'(valid_mask), 64'b00001);
    check("entry {r1,r5}", 64'(dut.vec[0]), bits(1, 5));
    check("entry pc", 64'(dut.pcs[0]), 64'h155);
    check("active", 64'(active), 64'd1);
    kill(bits(5), 5, 'h0F0, 5);
    expect_flags("kill r5", 0, 1, 0, 0);
    check("entry {r1}", 64'(dut.vec[0]), bits(1));
    cur_epoch = 5'd9;
    kill(bits(1), 1, 'h2A, 3);
    expect_flags("kill r1", 0, 1, 0, 1);
    check("complete pc", 64'(complete_pc), 64'h155);
    check("complete dur", 64'(complete_dur), 64'd5);
    check("empty again", 64'(active), 64'd0);

    // lone LLL: nothing happens
    kill(bits(9), 9, 1, 1);
    expect_flags("lone", 0, 0, 0, 0);
    check("still empty", 64'(active), 64'd0);

    // two chains, then a bridging chain merges them
    kill(bits(10, 11), 10, 'h11, 2);
    expect_flags("chain A", 1, 0, 0, 0);
    kill(bits(20, 21), 20, 'h22, 3);
    expect_flags("chain B", 1, 0, 0, 0);
    check("two entries", 64'(valid_mask), 64'b00011);
    kill(bits(11, 21, 30), 30, 'h33, 4);
    expect_flags("bridge", 0, 1, 0, 0);
    check("merged into first", 64'(dut.vec[0]), bits(11, 21));
    check("second freed", 64'(valid_mask), 64'b00001);
    check("first keeps pc", 64'(dut.pcs[0]), 64'h11);

    // fill the table and overflow it
    for (int i = 0; i < 4; i++) begin
      kill(bits(40 + 2*i, 41 + 2*i), 40 + 2*i, 'h100 + i, i);
      expect_flags($sformatf("fill %0d", i), 1, 0, 0, 0);
    end
    check("table full", 64'(valid_mask), 64'b11111);
    kill(bits(60, 61), 60, 'h3FF, 0);
    expect_flags("overflow", 0, 0, 1, 0);

    // complete an entry with wrapping epoch difference
    cur_epoch = 5'd1;
    kill(bits(11, 21), 11, 0, 0);
    expect_flags("drain merged 1", 0, 1, 0, 0);
    kill(bits(21), 21, 0, 0);
    expect_flags("drain merged 2", 0, 1, 0, 1);
    check("wrapped duration", 64'(complete_dur), 64'((5'd1 - 5'd2) & 5'h1F));
    check("freed slot 0", 64'(valid_mask), 64'b11110);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
