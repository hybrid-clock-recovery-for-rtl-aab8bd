// Behavioural model (not synthesizable) of the external RC low-pass filter
// that turns the delta-sigma bit stream into the VCXO control voltage.
// A first-order filter updated once per FPGA clock:
//   v <= v + ALPHA * (din - v),  ALPHA = T_clk / (R C),
// with the voltage normalised to the output swing (0..1). The default ALPHA
// (time constant of 256 clocks) is a choice for short simulations.
module rc_filter_model #(
  parameter real ALPHA = 1.0 / 256.0,
  parameter real V0    = 0.5
) (
  input  logic clk,
  input  logic din,
  output real  vout
);
  initial vout = V0;
  always @(posedge clk) vout <= vout + ALPHA * ((din ? 1.0 : 0.0) - vout);
endmodule
