// Self-checking testbench of the proportional-integral loop filter.
//
// The reference works in units of 2^-13 (the integral gain), as integers:
//   out[m] = floor( (in[m-2] * 2^12 + A[m-2]) / 2^13 ), saturated to 8 bits,
// with A the accumulated sum of the inputs up to in[m-2], clamped to the
// 8-bit output range after every step. So the proportional path is checked to
// be in/2 and the integral path in/8192 per clock, without copying the
// module's shift-and-fraction arithmetic. Checks: the three-clock latency of an
// impulse, the ramp slope of a step, saturation of the accumulator at both
// ends, and long random runs. A second instance checks the start value.
module loop_filter_tb;
  localparam int IN_W  = 12;
  localparam int OUT_W = 8;
  localparam longint SCALE = 64'sd8192;          // 2^13
  localparam longint AMAX  = 128 * SCALE - 1;
  localparam longint AMIN  = -128 * SCALE;

  logic clk = 0, rst = 1;
  logic signed [IN_W-1:0]  in;
  logic signed [OUT_W-1:0] out, out_init;
  int checks = 0, failures = 0;

  loop_filter dut (.clk, .rst, .in, .out);
  loop_filter #(.ACC_INIT(-128)) dut_init (.clk, .rst, .in(in), .out(out_init));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state
  longint hist [3];     // inputs of the last clocks, hist[0] newest
  longint acc_r;        // sum of inputs up to in[m-2] (units 2^-13)

  function automatic longint clamp(longint v);
    if (v > AMAX) return AMAX;
    if (v < AMIN) return AMIN;
    return v;
  endfunction

  function automatic longint floor_div(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  // One clock: drive v, advance the reference, compare after the edge.
  task automatic step(int v, bit check);
    longint exp_o;
    in = IN_W'(v);
    @(posedge clk); #1;
    // after this edge: out = in[m-2]/2 + A(up to and including in[m-2])
    acc_r   = clamp(acc_r + hist[1]);
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = longint'(v);
    exp_o = floor_div(clamp(hist[2] * (SCALE / 2) + acc_r), SCALE);
    if (check) begin
      checks++;
      if (longint'(out) != exp_o) begin
        failures++;
        if (failures < 10) $display("FAIL out=%0d expected %0d", out, exp_o);
      end
    end
  endtask

  task automatic do_reset();
    rst = 1; in = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    hist = '{0, 0, 0}; acc_r = 0;
  endtask

  initial begin
    int lat;
    in = '0;
    do_reset();

    // Start value of the second instance shows until the first input arrives.
    checks++;
    if (out_init != -128) begin failures++; $display("FAIL start value %0d", out_init); end

    // Impulse: the output must move on the third edge, not before.
    lat = 0;
    step(200, 1);
    for (int k = 1; k <= 5 && lat == 0; k++) begin
      if (out != 0) lat = k;
      step(0, 1);
    end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL impulse latency %0d clocks, expected 3", lat); end

    // Large step: the proportional term (500) saturates the output at once,
    // every clock compared with the reference.
    do_reset();
    for (int k = 0; k < 3000; k++) step(1000, 1);
    // Small step: jump of in/2, then a ramp of in/8192 per clock.
    do_reset();
    for (int k = 0; k < 2 * 8192 + 4; k++) step(4, 1);
    checks++;
    // 2 + 4*(16386-2)/8192 -> floor = 2 + 7 = 9 (integral 4*16384/8192 = 8)
    if (out != 9 && out != 10) begin failures++; $display("FAIL ramp end %0d", out); end

    // Saturation at the negative end, then recovery.
    do_reset();
    for (int k = 0; k < 400; k++) step(-2048, 1);
    checks++;
    if (out != -128) begin failures++; $display("FAIL negative saturation %0d", out); end
    for (int k = 0; k < 20000; k++) step(2047, 1);
    checks++;
    if (out != 127) begin failures++; $display("FAIL positive saturation %0d", out); end

    // Random runs with small and full-range inputs.
    do_reset();
    for (int k = 0; k < 60000; k++) begin
      int v;
      if ((k / 5000) % 2 == 0) v = $urandom_range(0, 200) - 100;
      else                     v = int'($signed(IN_W'($urandom)));
      step(v, 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
