// Behavioural model (not synthesizable) of the voltage-controlled crystal
// oscillator that clocks the ADC. Linear tuning: the frequency moves by
// PULL_PPM over the full control range (vctl 0..1), centred on a nominal
// frequency that is offset_ppm away from the transmitter's. Output: the ratio
// of the receiver clock frequency to the transmitter's. A 99 kHz/V gain over a
// 3.3 V swing at 1.1 GHz is close to the 300 ppm default.
module vcxo_model #(
  parameter real PULL_PPM = 300.0
) (
  input  real vctl,
  input  real offset_ppm,
  output real rate
);
  always_comb rate = 1.0 + 1.0e-6 * (offset_ppm + PULL_PPM * (vctl - 0.5));
endmodule
