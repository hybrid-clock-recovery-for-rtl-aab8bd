// Self-checking testbench of the delta-sigma DAC modulator.
//
// For a set of fixed codes, including 0, 1, mid-scale and full-scale, counts
// the ones the modulator puts out over windows of 256 clocks: a first-order
// modulator with an 8-bit accumulator must give exactly `code` ones in every
// window. Also checks that mid-scale alternates 0/1 (the finest spacing), that
// no window of code 1 holds more than one pulse, and the output stays low
// during and right after reset.
module dsm_dac_tb;
  localparam int N = 8;

  logic clk = 0, rst = 1;
  logic [N-1:0] din;
  logic dac_out;
  int checks = 0, failures = 0;

  dsm_dac dut (.clk, .rst, .din, .dac_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(int code, int nwin);
    int ones;
    din = N'(code);
    @(posedge clk);              // code enters the accumulator
    @(posedge clk);              // first output bit for this code
    for (int w = 0; w < nwin; w++) begin
      ones = 0;
      for (int k = 0; k < 256; k++) begin
        #1 ones += int'(dac_out);
        @(posedge clk);
      end
      checks++;
      if (ones != code) begin
        failures++;
        $display("FAIL code %0d: %0d ones in 256 clocks", code, ones);
      end
    end
  endtask

  initial begin
    automatic int codes [8] = '{0, 1, 37, 128, 200, 254, 255, 77};
    din = 8'd200;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (dac_out !== 1'b0) begin failures++; $display("FAIL output high in reset"); end
    rst = 0;

    foreach (codes[i]) window(codes[i], 3);
    for (int r = 0; r < 30; r++) window($urandom_range(0, 255), 2);

    // Mid-scale: strict alternation.
    din = 8'd128;
    repeat (4) @(posedge clk);
    begin
      logic prev;
      #1 prev = dac_out;
      for (int k = 0; k < 64; k++) begin
        @(posedge clk); #1;
        checks++;
        if (dac_out == prev) begin failures++; $display("FAIL mid-scale does not alternate"); end
        prev = dac_out;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
