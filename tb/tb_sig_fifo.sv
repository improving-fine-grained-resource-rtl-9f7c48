// tb_sig_fifo: self-checking test of the signature buffer.
//
// Fills the buffer to its full depth of 89 entries and checks that it then
// refuses pushes (in_ready low, overflow pulse), drains it in order, and runs
// random simultaneous pushes and pops against a queue model. Checks that data
// pushed into an empty buffer is visible one cycle later.
module tb_sig_fifo;
  localparam int DEPTH = 89;
  localparam int W = 19;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, overflow;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] level;

  sig_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("empty", out_valid, 0);

    // one push, visible next cycle
    @(negedge clk); in_valid = 1; in_data = 19'h1ABCD;
    @(negedge clk); in_valid = 0;
    check("latency 1 valid", out_valid, 1);
    check("latency 1 data", out_data, 19'h1ABCD);
    @(negedge clk); out_ready = 1;
    @(negedge clk); out_ready = 0;
    check("empty again", out_valid, 0);

    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      check("ready while not full", in_ready, 1);
      in_valid = 1; in_data = W'(i * 7 + 3);
    end
    @(negedge clk);
    check("full level", level, DEPTH);
    check("not ready when full", in_ready, 0);
    check("overflow flagged", overflow, 1);
    in_valid = 0;
    for (int i = 0; i < DEPTH; i++) begin
      check("drain order", out_data, W'(i * 7 + 3));
      out_ready = 1;
      @(negedge clk);
    end
    out_ready = 0;
    check("drained", out_valid, 0);

    // random traffic
    for (int n = 0; n < 3000; n++) begin
      in_valid  = ($urandom_range(0, 99) < 55);
      out_ready = ($urandom_range(0, 99) < 50);
      in_data   = W'($urandom);
      @(posedge clk);
      if (out_valid && out_ready) begin
        check("random data", out_data, q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
      check("random level", level, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
