// Proportional-integral loop filter of the second-order clock recovery PLL.
//
// The analogue prototype F(s) = K1 + K2/s is mapped onto two shift-only paths
// and no multipliers:
//   - proportional path: x >>> K1_SHIFT, then two register delays;
//   - integral path:     x >>> K2_SHIFT, one register delay, then a register
//                        accumulator q <= q + b;
//   - output:            registered sum of the two paths.
// A step at the input therefore reaches the output after three clocks; the
// proportional part arrives at once with it and the integral part adds
// in[n] >> K2_SHIFT per clock from then on.
//
// Number format: the input is a signed integer (the TED error). Internally
// every value carries FRAC_W fraction bits so that the small integral gain
// (2^-13) loses nothing. The accumulator and the output sum saturate at the
// signed OUT_W-bit range of the output, and the output is the integer part
// (rounded toward minus infinity) of the sum. After reset the accumulator
// holds ACC_INIT (an integer in output units): the start point from which the
// loop scans toward lock. The default is mid-range; the top level sets it so
// that the oscillator starts at one end of its pull range.
//
// The path structure and the shifts (1 and 13) follow the document; the
// fraction bits, the saturation and the start value are this design's.
module loop_filter #(
  parameter int unsigned IN_W     = hcr_pkg::ted_err_w(hcr_pkg::SAMPLE_W, hcr_pkg::SYM_PER_CLK),
  parameter int unsigned OUT_W    = hcr_pkg::DAC_W,
  parameter int unsigned K1_SHIFT = hcr_pkg::K1_SHIFT,
  parameter int unsigned K2_SHIFT = hcr_pkg::K2_SHIFT,
  parameter int unsigned FRAC_W   = hcr_pkg::K2_SHIFT,
  parameter int          ACC_INIT = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  in,
  output logic signed [OUT_W-1:0] out
);
  localparam int unsigned SW = ((IN_W > OUT_W) ? IN_W : OUT_W) + FRAC_W + 2;
  typedef logic signed [SW-1:0] fx_t;

  localparam fx_t MAXV = (fx_t'(1) <<< (OUT_W - 1 + FRAC_W)) - fx_t'(1);
  localparam fx_t MINV = -(fx_t'(1) <<< (OUT_W - 1 + FRAC_W));
  localparam fx_t INIT = fx_t'(ACC_INIT) <<< FRAC_W;

  function automatic fx_t sat(fx_t v);
    if (v > MAXV)      return MAXV;
    else if (v < MINV) return MINV;
    else               return v;
  endfunction

  fx_t x_fx;
  fx_t p_d1, p_d2;   // K1 path, z^-2
  fx_t i_d1;         // K2 path, z^-1
  fx_t acc;          // accumulator, z^-1
  fx_t y;            // adder output, z^-1

  assign x_fx = fx_t'(in) <<< FRAC_W;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_d1 <= '0;
      p_d2 <= '0;
      i_d1 <= '0;
      acc  <= INIT;
      y    <= INIT;
    end else begin
      p_d1 <= x_fx >>> K1_SHIFT;
      p_d2 <= p_d1;
      i_d1 <= x_fx >>> K2_SHIFT;
      acc  <= sat(acc + i_d1);
      y    <= sat(p_d2 + acc);
    end
  end

  assign out = OUT_W'(y >>> FRAC_W);
endmodule
