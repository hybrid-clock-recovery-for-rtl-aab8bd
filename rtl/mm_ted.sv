// Modified Mueller & Mueller timing error detector.
//
// The classic Mueller & Mueller detector multiplies the equalized signal by the
// decided symbols. This version works on the raw, un-equalized samples and uses
// only the sign of each sample as its "decision", one sample per symbol:
//
//     e_k = sign(y[k-1]) * y[k]  -  sign(y[k]) * y[k-1]
//
// with sign(y) = +1 for y >= 0 and -1 for y < 0. Its mean is zero when the
// samples sit at the symmetric point of the pulse (the eye centre) and grows
// with the timing offset: negative when sampling late on a symmetric pulse,
// positive when sampling early.
//
// Interface: each clock brings P symbol-spaced samples, y[0] oldest. The last
// sample of the previous clock is kept so that the first error of the word
// also has its predecessor. The P errors are summed into one error per clock.
// Timing: err is registered, one clock after the samples. After reset the
// stored previous sample is zero (its sign counts as +1).
//
// The error law is the document's; the parallel form, the summation of the P
// errors and the widths are this design's.
module mm_ted #(
  parameter int unsigned P     = hcr_pkg::SYM_PER_CLK,
  parameter int unsigned W     = hcr_pkg::SAMPLE_W,
  parameter int unsigned ERR_W = hcr_pkg::ted_err_w(W, P)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [W-1:0]     y   [P],
  output logic signed [ERR_W-1:0] err
);
  logic signed [W-1:0]     y_last;
  logic signed [ERR_W-1:0] sum;

  always_comb begin
    logic signed [W-1:0]     prev, cur;
    logic signed [ERR_W-1:0] t_cur, t_prev;
    sum = '0;
    for (int i = 0; i < int'(P); i++) begin
      cur  = y[i];
      prev = (i == 0) ? y_last : y[i-1];
      // sign(prev) * cur
      t_cur  = prev[W-1] ? -ERR_W'(cur)  : ERR_W'(cur);
      // sign(cur) * prev
      t_prev = cur[W-1]  ? -ERR_W'(prev) : ERR_W'(prev);
      sum = sum + t_cur - t_prev;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_last <= '0;
      err    <= '0;
    end else begin
      y_last <= y[P-1];
      err    <= sum;
    end
  end
endmodule
