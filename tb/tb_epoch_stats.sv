// tb_epoch_stats: self-checking test of the epoch counter.
//
// Retires a random 0..3 instructions per cycle with random event increments,
// keeps its own count, and checks that epoch_end fires exactly when 512
// instructions have accumulated (the overshoot carried into the next epoch),
// that the snapshot holds the event sums and the cycle count of the epoch and
// that the 5-bit epoch number wraps. Also checks saturation of a counter.
module tb_epoch_stats;
  import chill_pkg::*;
  localparam int NF = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] retire_cnt;
  logic [3:0] ev_inc [NF];
  logic       epoch_end;
  ep_t        epoch_num;
  feat_t      snap_feat [NF];
  feat_t      snap_cycles;

  epoch_stats #(.NFEAT(NF)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int icnt = 0, cyc = 0, epochs = 0;
    int sums [NF];
    int exp_sums [NF];
    int exp_cyc;
    bit pend;
    retire_cnt = 0;
    for (int i = 0; i < NF; i++) begin ev_inc[i] = 0; sums[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    pend = 0;
    for (int n = 0; n < 12000; n++) begin
      @(negedge clk);
      // check outputs of the previous cycle
      check("epoch_end timing", epoch_end, pend);
      if (pend) begin
        epochs++;
        check("epoch number", epoch_num, epochs % 32);
        check("cycles", snap_cycles, exp_cyc);
        for (int i = 0; i < NF; i++) check("event sum", snap_feat[i], exp_sums[i]);
      end
      retire_cnt = 2'($urandom_range(0, 3));
      for (int i = 0; i < NF; i++) ev_inc[i] = 4'($urandom_range(0, 3));
      icnt += retire_cnt;
      cyc++;
      for (int i = 0; i < NF; i++) sums[i] += ev_inc[i];
      pend = (icnt >= 512);
      if (pend) begin
        icnt -= 512;
        exp_cyc = cyc;
        cyc = 0;
        for (int i = 0; i < NF; i++) begin exp_sums[i] = sums[i]; sums[i] = 0; end
      end
    end
    check("many epochs", epochs > 32, 1);

    // saturation: a long epoch with large increments
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    retire_cnt = 0;
    for (int i = 0; i < NF; i++) ev_inc[i] = 4'd15;
    repeat (5000) @(negedge clk);
    retire_cnt = 0;
    for (int k = 0; k < 511; k++) begin retire_cnt = 1; @(negedge clk); end
    retire_cnt = 1;
    @(negedge clk);
    retire_cnt = 0;
    @(negedge clk);
    check("saturated count", snap_feat[0], 65535);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
