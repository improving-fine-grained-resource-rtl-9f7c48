// sig_fifo: instruction signature buffer in front of the CHILL tracker.
//
// Retiring instructions hand their 19-bit signature (destination, two sources,
// long-latency-load flag) to this first-in first-out buffer, so that the
// tracker can fall behind the cores while it walks the dependence table for a
// kill and catch up during ordinary instructions. The depth of 89 entries is
// the worst-case backlog the original analysis found; what happens when the
// buffer is full is not specified there, so this design back-pressures the
// producer (in_ready low) and counts the cycles on which a push was refused.
//
// Interface: valid/ready on both sides; a word moves when valid and ready are
// both high on a rising clock edge. Data written is readable on the next
// cycle (out_valid rises one cycle after the first push). Synchronous,
// active-low reset empties the buffer. The storage array is not reset.
module sig_fifo #(
  parameter int unsigned DEPTH = 89,
  parameter int unsigned W     = 19
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic         overflow      // a push was refused this cycle
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rd_ptr];
  assign level     = cnt;
  assign overflow  = in_valid && !in_ready;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= nxt(wr_ptr);
      if (pop)  rd_ptr <= nxt(rd_ptr);
      case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  a_level_bound: assert property (@(posedge clk) disable iff (!rst_n) 32'(cnt) <= DEPTH);
endmodule
