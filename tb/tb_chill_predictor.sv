// tb_chill_predictor: self-checking test of the CHILL epoch decision.
//
// Random epochs of 3..8 cycles with random shadow, pending-chain-created and
// chain-entered pulses, random live/active levels and random reactive
// choices. A reference model in the testbench applies the decision rules
// (CHILL event -> OoO and counter to max when coming from in-order; live
// chains -> counter threshold on OoO, hold on in-order; cold-start shadow ->
// OoO; otherwise reactive) and the 4-bit saturating shadow counter; core,
// reason and counter are compared after every epoch, and every reason must
// occur. One directed case checks that the counter falling from 8 to 7
// moves a live-chain program from the OoO to the in-order core.
module tb_chill_predictor;
  import chill_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic epoch_end, shadow, pct_created, cct_hit, pct_active, cct_live, reactive_ooo, switched;
  core_e core;
  why_e  why;
  logic [3:0] sat;

  chill_predictor dut (.*);

  int checks = 0, failures = 0;
  int why_cnt [6];
  int switches = 0;

  core_e m_core;
  int    m_sat;
  why_e  m_why;

  always @(posedge clk) if (switched) switches++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic model(input bit sh, input bit ev, input bit act, input bit re);
    int s;
    s = sh ? (m_sat < 15 ? m_sat + 1 : 15) : (m_sat > 0 ? m_sat - 1 : 0);
    if (ev) begin
      if (m_core == CORE_INO) s = 15;
      m_core = CORE_OOO; m_why = WHY_CHILL_EVENT;
    end else if (act) begin
      if (m_core == CORE_OOO) begin
        if (s <= 7) begin m_core = CORE_INO; m_why = WHY_SAT_LOW; end
        else        begin m_why = WHY_SAT_HIGH; end
      end else m_why = WHY_INO_HOLD;
    end else if (sh) begin
      m_core = CORE_OOO; m_why = WHY_COLD_START;
    end else begin
      m_core = re ? CORE_OOO : CORE_INO; m_why = WHY_REACTIVE;
    end
    m_sat = s;
  endtask

  task automatic run_epoch(input int len, input int p_sh, input int p_cr, input int p_hit,
                           input bit act_lvl, input bit re);
    bit sh = 0, ev = 0;
    for (int c = 0; c < len; c++) begin
      @(negedge clk);
      shadow      = ($urandom_range(0, 99) < p_sh);
      pct_created = ($urandom_range(0, 99) < p_cr);
      cct_hit     = ($urandom_range(0, 99) < p_hit);
      pct_active  = act_lvl;
      cct_live    = 1'b0;
      reactive_ooo = re;
      epoch_end   = (c == len - 1);
      sh |= shadow;
      ev |= pct_created | cct_hit;
    end
    @(negedge clk);
    epoch_end = 0; shadow = 0; pct_created = 0; cct_hit = 0;
    model(sh, ev, act_lvl, re);
    check("core", core, m_core);
    check("why", why, m_why);
    check("sat", sat, m_sat);
    why_cnt[why]++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    epoch_end = 0; shadow = 0; pct_created = 0; cct_hit = 0;
    pct_active = 0; cct_live = 0; reactive_ooo = 0;
    m_core = CORE_OOO; m_sat = 0; m_why = WHY_REACTIVE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // directed: one shadow epoch with a live chain leaves the counter at 1,
    // below half, so the program goes in-order; a CHILL event brings it back
    // to the OoO core with the counter at 15; seven quiet epochs count down
    // to 8 (stay), the eighth to 7 (leave).
    run_epoch(4, 100, 0, 0, 1, 1);
    check("directed low counter: in-order", core, CORE_INO);
    run_epoch(4, 0, 100, 0, 1, 0);
    check("directed chill event from in-order: max", sat, 15);
    check("directed back on OoO", core, CORE_OOO);
    for (int i = 0; i < 7; i++) run_epoch(4, 0, 0, 0, 1, 0);
    check("directed sat 8", sat, 8);
    check("directed still OoO", core, CORE_OOO);
    run_epoch(4, 0, 0, 0, 1, 1);
    check("directed sat 7", sat, 7);
    check("directed moved to in-order", core, CORE_INO);

    for (int n = 0; n < 600; n++)
      run_epoch($urandom_range(3, 8), $urandom_range(0, 30), $urandom_range(0, 8),
                $urandom_range(0, 8), $urandom_range(0, 1), $urandom_range(0, 1));

    for (int i = 0; i < 6; i++) check($sformatf("reason %0d occurred", i), why_cnt[i] > 0, 1);
    check("core switches occurred", switches > 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
