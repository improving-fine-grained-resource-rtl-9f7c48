// tb_pi_controller: self-checking test of the PI correction.
//
// Feeds a random error every epoch and checks out = base + alpha*S + beta*err
// (Q8.8 gains, floor rounding) where S is the sum of the previous five
// errors, kept by the testbench in its own queue. Also checks that the
// history does not move when update is low.
module tb_pi_controller;
  import chill_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   update;
  cpi_t   base, err, out, past_sum;
  gains_t g;

  pi_controller #(.HIST(5)) dut (.*);

  int checks = 0, failures = 0;
  longint hist [$];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint fdiv256(input longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, e;
    update = 0; base = 0; err = 0; g = '0;
    repeat (5) hist.push_back(0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      base    = cpi_t'($urandom_range(0, 4000));
      err     = cpi_t'(int'($urandom_range(0, 2000)) - 1000);
      g.alpha = coef_t'(int'($urandom_range(0, 512)) - 256);
      g.beta  = coef_t'(int'($urandom_range(0, 512)) - 256);
      update  = ($urandom_range(0, 3) != 0);
      #1;
      s = 0;
      foreach (hist[i]) s += hist[i];
      e = longint'(base) + fdiv256(longint'(g.alpha) * s) + fdiv256(longint'(g.beta) * longint'(err));
      check("past sum", past_sum, s);
      check("output", out, e);
      if (update) begin
        hist.push_front(longint'(err));
        void'(hist.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
