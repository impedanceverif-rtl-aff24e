// wd_detector: Wasserstein test for one frequency point.
//
// For two empirical distributions of the same size N, the 1-Wasserstein
// distance is the mean absolute difference of their sorted samples:
//   WD = (1/N) * sum_k |g_(k) - t_(k)|,
// g the genuine (enrolled) and t the measured samples. The block receives
// the sorted pairs one per clock on `valid`, accumulates the sum (saturating
// at SUM_W bits) and raises `over` while sum > N * WD_THRESH_MOHM, i.e.
// while WD exceeds the threshold, without a division. `clear` restarts the
// sum. `sum` is N times the distance, in milliohm.
//
// The metric and the global threshold of 3 milliohm follow the published
// analysis; computing it on chip, by this streaming form, is this design's
// own.
module wd_detector #(
  parameter int unsigned N              = 105,
  parameter int unsigned W              = 16,
  parameter int unsigned SUM_W          = 24,
  parameter int unsigned WD_THRESH_MOHM = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic [W-1:0]     g,
  input  logic [W-1:0]     t,
  output logic [SUM_W-1:0] sum,
  output logic             over
);

  localparam logic [SUM_W-1:0] LIMIT = SUM_W'(N * WD_THRESH_MOHM);

  logic [W-1:0]   absdiff;
  logic [SUM_W:0] nxt;

  assign absdiff = (g >= t) ? g - t : t - g;
  assign nxt     = {1'b0, sum} + (SUM_W+1)'(absdiff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sum <= '0;
    else if (clear)  sum <= '0;
    else if (valid)  sum <= nxt[SUM_W] ? '1 : nxt[SUM_W-1:0];
  end

  assign over = (sum > LIMIT);

endmodule
