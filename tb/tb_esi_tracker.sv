// tb_esi_tracker: self-checking test of the early-scheduled-instruction counter.
//
// Directed cases first: with the oldest waiting instruction at ROB index 5
// (head 0) an issue at index 7 is early and one at index 3 is not; the same
// holds across the wrap of the 128-entry ROB (head 120, waiting 125, issue at
// 2 is early); nothing is early while no instruction waits. Each marked entry
// must then count once, in its class, when it retires.
// A random phase follows: random head, waiting index, up to three issues and
// up to three retirements per cycle with random classes. The testbench keeps
// its own flag per ROB entry, decides "early" by integer age arithmetic modulo
// 128, and compares iss_early and the per-class counts every cycle. Every
// class must be counted at least once.
module tb_esi_tracker;
  import chill_pkg::*;

  localparam int ROB = 128;
  localparam int IW  = 3;
  localparam int RW  = 3;

  logic       clk = 0, rst_n = 0;
  logic [6:0] rob_head, wait_idx;
  logic       wait_valid;
  logic [IW-1:0] iss_valid;
  logic [6:0] iss_idx [IW];
  logic [RW-1:0] ret_valid;
  logic [6:0] ret_idx [RW];
  esi_cls_e   ret_cls [RW];
  logic [3:0] esi_inc [NESI-1];
  logic [IW-1:0] iss_early;

  esi_tracker dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  bit m_early [ROB];
  int seen [NESI-1];

  function automatic int age(input int idx, input int head);
    return (idx - head + ROB) % ROB;
  endfunction

  task automatic idle();
    wait_valid = 0; iss_valid = '0; ret_valid = '0;
    for (int i = 0; i < IW; i++) iss_idx[i] = '0;
    for (int j = 0; j < RW; j++) begin ret_idx[j] = '0; ret_cls[j] = ESI_INT; end
  endtask

  // one cycle: inputs applied after the falling edge, checked just before the
  // rising edge, model updated at the edge
  task automatic cycle();
    int exp_inc [NESI-1];
    bit e;
    #4;
    for (int c = 0; c < NESI-1; c++) exp_inc[c] = 0;
    for (int j = 0; j < RW; j++)
      if (ret_valid[j] && m_early[ret_idx[j]]) exp_inc[int'(ret_cls[j])]++;
    for (int c = 0; c < NESI-1; c++) begin
      check($sformatf("count class %0d", c), esi_inc[c], exp_inc[c]);
      seen[c] += exp_inc[c];
    end
    for (int i = 0; i < IW; i++) begin
      e = iss_valid[i] && wait_valid && (age(iss_idx[i], rob_head) > age(wait_idx, rob_head));
      check($sformatf("issue %0d early", i), iss_early[i], e);
    end
    @(posedge clk);
    for (int i = 0; i < IW; i++)
      if (iss_valid[i])
        m_early[iss_idx[i]] = wait_valid && (age(iss_idx[i], rob_head) > age(wait_idx, rob_head));
    @(negedge clk);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < ROB; i++) m_early[i] = 0;
    for (int c = 0; c < NESI-1; c++) seen[c] = 0;
    idle(); rob_head = 0; wait_idx = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // directed: head 0, oldest waiting at 5
    idle(); rob_head = 7'd0; wait_valid = 1; wait_idx = 7'd5;
    iss_valid = 3'b011; iss_idx[0] = 7'd7; iss_idx[1] = 7'd3;
    #1 check("index 7 behind waiting 5 is early", iss_early[0], 1);
    check("index 3 ahead of waiting 5 is not", iss_early[1], 0);
    cycle();
    // directed: across the wrap
    idle(); rob_head = 7'd120; wait_valid = 1; wait_idx = 7'd125;
    iss_valid = 3'b011; iss_idx[0] = 7'd2; iss_idx[1] = 7'd122;
    #1 check("index 2 after wrap is early", iss_early[0], 1);
    check("index 122 is not", iss_early[1], 0);
    cycle();
    // directed: nobody waiting
    idle(); rob_head = 7'd0; iss_valid = 3'b001; iss_idx[0] = 7'd40;
    #1 check("no waiting instruction, no ESI", iss_early[0], 0);
    cycle();
    // retire 7 (early, fp) and 3 (not early, int) and 2 (early, control)
    idle(); ret_valid = 3'b111;
    ret_idx[0] = 7'd7; ret_cls[0] = ESI_FP;
    ret_idx[1] = 7'd3; ret_cls[1] = ESI_INT;
    ret_idx[2] = 7'd2; ret_cls[2] = ESI_CNTL;
    #1 check("fp count", esi_inc[ESI_FP], 1);
    check("int count", esi_inc[ESI_INT], 0);
    check("control count", esi_inc[ESI_CNTL], 1);
    cycle();

    // random phase
    for (int n = 0; n < 20000; n++) begin
      idle();
      rob_head   = 7'($urandom_range(0, ROB - 1));
      wait_valid = ($urandom_range(0, 4) != 0);
      wait_idx   = 7'(rob_head + $urandom_range(0, 40));
      for (int i = 0; i < IW; i++) begin
        iss_valid[i] = ($urandom_range(0, 2) != 0);
        iss_idx[i]   = 7'(rob_head + $urandom_range(0, 60));
      end
      // distinct issue slots never name the same entry
      if (iss_idx[1] == iss_idx[0]) iss_valid[1] = 0;
      if (iss_idx[2] == iss_idx[0] || iss_idx[2] == iss_idx[1]) iss_valid[2] = 0;
      for (int j = 0; j < RW; j++) begin
        ret_valid[j] = ($urandom_range(0, 1) != 0);
        ret_idx[j]   = 7'(rob_head + j);
        ret_cls[j]   = esi_cls_e'($urandom_range(0, NESI - 2));
      end
      cycle();
    end
    for (int c = 0; c < NESI-1; c++) check($sformatf("class %0d counted", c), seen[c] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
