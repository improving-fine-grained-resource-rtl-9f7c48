// tb_chill_cdt: self-checking test of the Current Dependencies Table.
//
// Part 1 replays the eight-instruction example of chained loads
//   ld r1; add r2=r1,r3; add r3=r2,r4; ld r4=[r1]; ld r5=[r4];
//   add r6=r4,r7; add r7=r6,r8; add r8=r5,r4
// and checks the rows against the hand-worked table (r1..r8 =
// 1,1,1,1001,11001,1001,1001,11001). It then kills r4, r5 or r1 (by a
// plain write to that register) from that state and checks the current
// full chain (11001 in all three cases) and the rows left behind. It also
// checks that a kill holds in_ready low for 23 cycles (22 walk cycles of
// three rows each, plus the accept cycle).
// Part 2 drives random signatures over a few registers and compares every
// row and every kill with a reference model kept in the testbench.
module tb_chill_cdt;
  import chill_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  sig_t in_sig;
  pc_t  cur_pc;
  ep_t  cur_epoch;
  logic kill_valid, shadow, lll_seen;
  dvec_t kill_chain, dbg_row;
  reg_t kill_reg, dbg_idx;
  pc_t  kill_pc;
  ep_t  kill_ep;

  chill_cdt dut (.*);

  int checks = 0, failures = 0;

  // The worked example prints vectors with register 1 as the rightmost
  // digit; this design keeps register N at bit N (bit 0 is register 0).
  function automatic logic [63:0] FIG(input logic [63:0] v);
    return v << 1;
  endfunction
  int kills_seen = 0, shadows_seen = 0;

  // reference model
  dvec_t m_rows [NREG];
  pc_t   m_pc   [NREG];
  ep_t   m_ep   [NREG];
  dvec_t exp_chain;
  reg_t  exp_reg;
  pc_t   exp_pc;
  ep_t   exp_ep;
  logic  exp_kill;

  always @(posedge clk) begin
    if (kill_valid) kills_seen++;
    if (shadow) shadows_seen++;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic dvec_t mrd(input reg_t r);
    return (r == 0) ? '0 : m_rows[r];
  endfunction

  // apply one signature to the reference model
  task automatic model(input sig_t s);
    dvec_t k, nr;
    exp_kill = 0;
    if (s.dst != 0 && m_rows[s.dst][s.dst]) begin
      exp_kill  = 1;
      k         = m_rows[s.dst];
      exp_chain = '0;
      exp_reg   = s.dst;
      exp_pc    = m_pc[s.dst];
      exp_ep    = m_ep[s.dst];
      for (int i = 0; i < NREG; i++) if (m_rows[i][s.dst]) exp_chain |= m_rows[i];
      for (int i = 0; i < NREG; i++) if ((m_rows[i] & k) == k) m_rows[i] &= ~k;
    end
    if (s.dst != 0) begin
      nr = mrd(s.src1) | mrd(s.src2) | m_rows[s.dst];
      if (s.lll) begin
        nr[s.dst] = 1'b1;
        m_pc[s.dst] = cur_pc;
        m_ep[s.dst] = cur_epoch;
      end
      m_rows[s.dst] = nr;
    end
  endtask

  // send one signature, wait until it is fully absorbed, check kill output
  task automatic send(input sig_t s, output int busy);
    bit got_kill;
    model(s);
    @(negedge clk);
    in_valid = 1;
    in_sig   = s;
    @(posedge clk);
    #1 in_valid = 0;
    busy = 0;
    got_kill = 0;
    while (!in_ready) begin
      if (kill_valid) begin
        got_kill = 1;
        check("kill chain", kill_chain, exp_chain);
        check("kill reg", 64'(kill_reg), 64'(exp_reg));
        check("kill pc", 64'(kill_pc), 64'(exp_pc));
        check("kill ep", 64'(kill_ep), 64'(exp_ep));
      end
      busy++;
      @(posedge clk);
      #1;
    end
    check("kill occurred as predicted", 64'(got_kill), 64'(exp_kill));
  endtask

  task automatic check_rows(input string tag);
    for (int i = 0; i < NREG; i++) begin
      dbg_idx = reg_t'(i);
      #1;
      check($sformatf("%s row %0d", tag, i), dbg_row, m_rows[i]);
    end
  endtask

  function automatic sig_t mk(input int d, input int a, input int b, input bit l);
    sig_t s;
    s.dst = reg_t'(d); s.src1 = reg_t'(a); s.src2 = reg_t'(b); s.lll = l;
    return s;
  endfunction

  task automatic do_reset();
    rst_n = 0;
    in_valid = 0;
    in_sig = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NREG; i++) begin m_rows[i] = '0; m_pc[i] = '0; m_ep[i] = '0; end
  endtask

  task automatic example();
    int b;
    cur_pc = 10'h2A; cur_epoch = 5'd3;
    send(mk(1, 0, 0, 1), b);   // A ld r1 imm
    send(mk(2, 1, 3, 0), b);   // B
    send(mk(3, 2, 4, 0), b);   // C
    cur_pc = 10'h155; cur_epoch = 5'd4;
    send(mk(4, 1, 0, 1), b);   // D ld r4 r1
    cur_pc = 10'h0F0; cur_epoch = 5'd5;
    send(mk(5, 4, 0, 1), b);   // E ld r5 r4
    send(mk(6, 4, 7, 0), b);   // F
    send(mk(7, 6, 8, 0), b);   // G
    send(mk(8, 5, 4, 0), b);   // H
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    logic [63:0] fig_a [1:8];
    fig_a[1] = FIG('b1); fig_a[2] = FIG('b1); fig_a[3] = FIG('b1); fig_a[4] = FIG('b1001);
    fig_a[5] = FIG('b11001); fig_a[6] = FIG('b1001); fig_a[7] = FIG('b1001); fig_a[8] = FIG('b11001);
    dbg_idx = '0; cur_pc = '0; cur_epoch = '0; in_valid = 0; in_sig = '0;

    // ---- column a and kill of r4 (column b)
    do_reset();
    example();
    for (int i = 1; i <= 8; i++) begin
      dbg_idx = reg_t'(i); #1;
      check($sformatf("example row r%0d", i), dbg_row, fig_a[i]);
    end
    send(mk(4, 0, 0, 0), b);   // plain write to r4 kills it
    check("kill r4 busy cycles", 64'(b), 64'(23));
    check("kill r4 chain", kill_chain, FIG(64'b11001));
    dbg_idx = 8; #1 check("b r8", dbg_row, FIG(64'b10000));
    dbg_idx = 7; #1 check("b r7", dbg_row, FIG(64'b0));
    dbg_idx = 5; #1 check("b r5", dbg_row, FIG(64'b10000));
    dbg_idx = 4; #1 check("b r4", dbg_row, FIG(64'b0));
    dbg_idx = 1; #1 check("b r1", dbg_row, FIG(64'b1));
    check_rows("after r4 kill");

    // ---- kill of r5 from column a (column c)
    do_reset();
    example();
    send(mk(5, 0, 0, 0), b);
    check("kill r5 chain", kill_chain, FIG(64'b11001));
    dbg_idx = 8; #1 check("c r8", dbg_row, FIG(64'b0));
    dbg_idx = 7; #1 check("c r7", dbg_row, FIG(64'b1001));
    dbg_idx = 4; #1 check("c r4", dbg_row, FIG(64'b1001));
    check_rows("after r5 kill");

    // ---- kill of r1 from column a (column d)
    do_reset();
    example();
    send(mk(1, 0, 0, 0), b);
    check("kill r1 chain", kill_chain, FIG(64'b11001));
    dbg_idx = 8; #1 check("d r8", dbg_row, FIG(64'b11000));
    dbg_idx = 6; #1 check("d r6", dbg_row, FIG(64'b1000));
    dbg_idx = 2; #1 check("d r2", dbg_row, FIG(64'b0));
    check_rows("after r1 kill");

    // ---- random signatures against the model
    do_reset();
    for (int n = 0; n < 400; n++) begin
      cur_pc = pc_t'($urandom);
      cur_epoch = ep_t'($urandom);
      send(mk($urandom_range(0, 9), $urandom_range(0, 9), $urandom_range(0, 9),
              ($urandom_range(0, 3) == 0)), b);
      if (n % 50 == 49) check_rows($sformatf("random %0d", n));
    end
    check("some kills happened", 64'(kills_seen > 20), 64'(1));
    check("some shadows happened", 64'(shadows_seen > 20), 64'(1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
