// Digital half of a hybrid analog-digital clock recovery PLL for a 1.1 Gbit/s
// 2-PAM receiver over plastic optical fibre.
//
// Loop: ADC (2 samples/symbol) -> sample select (1 sample/symbol) -> modified
// Mueller & Mueller TED -> PI loop filter -> delta-sigma modulator -> dac_out.
// Outside the FPGA, dac_out is smoothed by an RC filter into the control
// voltage of a VCXO, and the VCXO clocks the ADC, which closes the loop. The
// TED needs no equalized signal and no decided symbols: it uses the signs of
// the raw samples, so the clock locks on a closed eye.
//
// Interface: each 275 MHz clock brings 2*P signed samples in adc_samples,
// oldest first, alternating the sample at the symbol instant (even index)
// and the one half a symbol later (odd index). TED_PHASE picks which of the two
// the TED sees. The same samples leave registered on eq_samples toward the
// equalizer, which is not part of this design. ctrl_code is the DAC code,
// locked the convergence flag, ted_err the TED output.
//
// Loop polarity: the loop filter of the document is F(s) = -[K1 + K2/s]. The
// minus sign is applied here, in the map from the signed filter output x to
// the offset-binary DAC code: code = 127 - x. A larger code means a higher
// control voltage and so a higher VCXO frequency. After reset the loop starts
// at START_CODE; the default, the full-scale code, puts the VCXO at the upper
// end of its pull range, so the loop scans downward toward the line rate.
//
// Latency from a sample word to a change of dac_out: TED 1 clock, loop filter
// 3 clocks, modulator 1 clock.
//
// Following the document: the blocks, their order, the TED law, the filter
// shifts, the 8-bit delta-sigma DAC and the clock rates. This design's own:
// the widths, the sample select, the DAC code map and start code, and the
// lock detector limits.
module hcr_top
  import hcr_pkg::*;
#(
  parameter int unsigned P          = SYM_PER_CLK,
  parameter int unsigned W          = SAMPLE_W,
  parameter int unsigned TED_PHASE  = 0,
  parameter int unsigned START_CODE = 2**DAC_W - 1,
  parameter int unsigned ERR_W      = ted_err_w(W, P)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [W-1:0]     adc_samples [2*P],
  output logic signed [W-1:0]     eq_samples  [2*P],
  output logic                    dac_out,
  output logic                    locked,
  output logic signed [ERR_W-1:0] ted_err,
  output logic [DAC_W-1:0]        ctrl_code
);
  logic signed [W-1:0]     ted_in [P];
  logic signed [DAC_W-1:0] lf_out;

  // One sample per symbol for the timing error detector.
  always_comb begin
    for (int i = 0; i < int'(P); i++) ted_in[i] = adc_samples[2*i + int'(TED_PHASE)];
  end

  mm_ted #(.P(P), .W(W), .ERR_W(ERR_W)) u_ted (
    .clk, .rst, .y(ted_in), .err(ted_err)
  );

  loop_filter #(
    .IN_W(ERR_W), .OUT_W(DAC_W), .K1_SHIFT(K1_SHIFT), .K2_SHIFT(K2_SHIFT),
    .FRAC_W(K2_SHIFT), .ACC_INIT(2**(DAC_W-1) - 1 - int'(START_CODE))
  ) u_lf (
    .clk, .rst, .in(ted_err), .out(lf_out)
  );

  // code = (2^(DAC_W-1) - 1) - x : negation and offset binary in one step.
  assign ctrl_code = DAC_W'(2**(DAC_W-1) - 1) - DAC_W'(lf_out);

  dsm_dac #(.N(DAC_W)) u_dac (
    .clk, .rst, .din(ctrl_code), .dac_out
  );

  lock_detector #(.ERR_W(ERR_W)) u_lock (
    .clk, .rst, .err(ted_err), .locked
  );

  // Samples toward the equalizer, one register stage.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(2*P); i++) eq_samples[i] <= '0;
    end else begin
      eq_samples <= adc_samples;
    end
  end
endmodule
