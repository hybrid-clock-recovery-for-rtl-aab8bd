// Shared constants of the hybrid clock recovery loop.
//
// The receive datapath runs at the 275 MHz FPGA clock while the line carries
// 2-PAM symbols at 1.0991 Gbit/s, so each clock handles four symbols. The ADC
// samples twice per symbol (2.2 GS/s, double data rate), giving eight samples
// per FPGA clock. The loop filter shifts (1 and 13) are the ones of the
// published loop filter; the sample width, the 8-bit DAC code and the lock
// detector limits are choices of this design.
package hcr_pkg;
  localparam int unsigned SYM_PER_CLK = 4;   // 1.0991 Gbit/s / 275 MHz
  localparam int unsigned SAMPLE_W    = 8;   // ADC resolution (design choice)
  localparam int unsigned DAC_W       = 8;   // delta-sigma DAC input code width
  localparam int unsigned K1_SHIFT    = 1;   // proportional gain 2^-1
  localparam int unsigned K2_SHIFT    = 13;  // integral gain 2^-13

  // Width of the per-clock TED error: one symbol error spans SAMPLE_W+2 bits,
  // the sum over SYM_PER_CLK symbols adds log2(SYM_PER_CLK) bits.
  function automatic int unsigned ted_err_w(int unsigned sw, int unsigned p);
    return sw + 2 + $clog2(p);
  endfunction
endpackage
