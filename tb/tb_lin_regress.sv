// tb_lin_regress: self-checking test of the regression evaluator.
//
// Drives random counts, signed Q8.8 weights and constants and compares the
// estimate with k + floor(sum(w*x)/256 per term) computed in the testbench
// with plain integer arithmetic. A few hand-worked cases are checked first.
module tb_lin_regress;
  import chill_pkg::*;
  localparam int N = 6;

  feat_t [N-1:0] x;
  coef_t [N-1:0] w;
  cpi_t          k, est;

  lin_regress #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint fdiv256(input longint v);
    // floor division by 256
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  initial begin
    longint e;
    // 1.5 * 100 + 0.25 * 40 + 10 = 170
    x = '0; w = '0;
    x[0] = 100; w[0] = 16'sd384;
    x[3] = 40;  w[3] = 16'sd64;
    k = 24'sd10;
    #1 check("hand case 1", est, 170);
    // -2.0 * 300 - 5 = -605
    x = '0; w = '0;
    x[5] = 300; w[5] = -16'sd512;
    k = -24'sd5;
    #1 check("hand case 2", est, -605);

    for (int n = 0; n < 2000; n++) begin
      e = 0;
      for (int i = 0; i < N; i++) begin
        x[i] = feat_t'($urandom);
        w[i] = coef_t'($urandom);
        e += fdiv256(longint'(w[i]) * longint'(x[i]));
      end
      k = cpi_t'($urandom_range(0, 20000)) - 24'sd10000;
      e += longint'(k);
      e = longint'(cpi_t'(e));   // 24-bit wrap of the result
      #1 check("random", est, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
