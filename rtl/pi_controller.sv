// pi_controller: proportional-integral correction of a regression estimate.
//
// out = base + alpha * (sum of the last HIST errors) + beta * err
// where err is the error of the current epoch and alpha, beta are Q8.8 gains.
// On each epoch end (when 'update' is high) err is pushed into a HIST-deep
// history and the oldest error drops out, so the integral term always covers
// the HIST epochs before the current one (5 in the original branch-impact
// controller). The history depth, the saturation-free arithmetic and the
// reset of the history to zero are this design's choices.
//
// Timing: out is combinational in base/err/gains; the history advances on
// the rising edge when update is high.
module pi_controller
  import chill_pkg::*;
#(
  parameter int unsigned HIST = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   update,
  input  cpi_t   base,
  input  cpi_t   err,
  input  gains_t g,
  output cpi_t   out,
  output cpi_t   past_sum
);
  cpi_t hist [HIST];

  always_comb begin
    past_sum = '0;
    for (int i = 0; i < HIST; i++) past_sum = past_sum + hist[i];
    out = base + gmul(g.alpha, past_sum) + gmul(g.beta, err);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end else if (update) begin
      hist[0] <= err;
      for (int i = 1; i < HIST; i++) hist[i] <= hist[i-1];
    end
  end
endmodule
