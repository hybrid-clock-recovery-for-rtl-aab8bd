// First-order delta-sigma modulator, the digital half of the control DAC.
//
// Each clock the N-bit input code is added to an N-bit phase accumulator; the
// carry out of that addition is the output bit. Over any 2^N consecutive
// clocks with a constant code the output holds exactly `code` ones, so after
// an external RC low-pass the voltage is code/2^N of the output swing. The
// loop keeps the quantisation error in the accumulator and pushes its energy
// to high frequencies, where the RC filter removes it.
//
// Interface: din is an unsigned code (offset binary), sampled every clock;
// dac_out is registered, one clock behind the addition. Reset clears the
// accumulator and the output. The document takes this modulator, an 8-bit
// input and an external RC filter, from a vendor application note and runs it
// at the 275 MHz FPGA clock; the accumulator form written here is this
// design's.
module dsm_dac #(
  parameter int unsigned N = hcr_pkg::DAC_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] din,
  output logic         dac_out
);
  logic [N-1:0] acc;
  logic [N:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, din};

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      dac_out <= 1'b0;
    end else begin
      acc     <= sum[N-1:0];
      dac_out <= sum[N];
    end
  end
endmodule
