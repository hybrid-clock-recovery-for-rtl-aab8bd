// Convergence (lock) flag of the clock recovery loop.
//
// The TED error is summed over windows of 2^WIN_LOG2 clocks. A window whose
// summed error lies within +/-THRESH counts as converged; HOLD converged
// windows in a row set the flag, and any window outside the bound clears the
// flag and the count at once. Averaging over a window lets the bound be tight
// on the mean timing error while the error of single symbols, which is large
// on a closed eye, is ignored.
//
// Interface: err is the per-clock TED error; locked is registered and changes
// only at window ends. Reset clears everything.
//
// That a flag is raised when the TED error stays bounded follows the
// document; the windowing, the bound and the hold count are this design's.
module lock_detector #(
  parameter int unsigned ERR_W    = hcr_pkg::ted_err_w(hcr_pkg::SAMPLE_W, hcr_pkg::SYM_PER_CLK),
  parameter int unsigned WIN_LOG2 = 8,
  parameter int unsigned THRESH   = 8192,
  parameter int unsigned HOLD     = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ERR_W-1:0] err,
  output logic                    locked
);
  localparam int unsigned SUM_W = ERR_W + WIN_LOG2 + 1;
  localparam int unsigned CNT_W = $clog2(HOLD + 1);

  logic        [WIN_LOG2-1:0] phase;
  logic signed [SUM_W-1:0]    win_sum, next_sum;
  logic        [CNT_W-1:0]    good;
  logic                       in_bound;

  assign next_sum = win_sum + SUM_W'(err);
  assign in_bound = (next_sum <= $signed(SUM_W'(THRESH))) &&
                    (next_sum >= -$signed(SUM_W'(THRESH)));

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= '0;
      win_sum <= '0;
      good    <= '0;
      locked  <= 1'b0;
    end else begin
      phase <= phase + 1'b1;
      if (&phase) begin
        win_sum <= '0;
        if (in_bound) begin
          if (good < CNT_W'(HOLD)) good <= good + 1'b1;
          if (good >= CNT_W'(HOLD - 1)) locked <= 1'b1;
        end else begin
          good   <= '0;
          locked <= 1'b0;
        end
      end else begin
        win_sum <= next_sum;
      end
    end
  end
endmodule
