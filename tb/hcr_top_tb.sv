// End-to-end testbench of the clock recovery loop, top level at its default
// parameters.
//
// The top is closed into a loop with behavioural models of the line and ADC,
// the RC filter and the VCXO. Each run resets the loop with the VCXO nominal
// frequency at some offset from the transmitter, so the loop must scan from
// its start point (the top of the VCXO range) down to the line rate and lock.
// Checks, per run: the DAC code starts at full scale; the convergence flag
// rises; once it is up the recovered clock matches the line rate within a few
// ppm on average and the symbol-instant samples sit within 0.1 UI of the
// symbol centre on average; the equalizer port carries the ADC samples one
// clock late; the delta-sigma stream density follows the DAC code. Runs for
// three frequency deviations from the start point check that convergence takes
// longer the larger the deviation. A step of the transmitter frequency while
// locked checks tracking. Finally the loop acquires and holds lock with each
// PRBS length of the holding-window measurements (2^7-1 ... 2^23-1). Mechanisms counted (each must happen): scan from the
// start point, flag raised, frequency step tracked, and a TED error large
// enough that the proportional path alone exceeds the DAC range.
module hcr_top_tb;
  localparam int P = 4;
  localparam int W = 8;

  logic clk = 0, rst = 1;
  logic signed [W-1:0]  adc_samples [2*P];
  logic signed [W-1:0]  eq_samples  [2*P];
  logic signed [W-1:0]  prev_adc    [2*P];
  logic                 dac_out, locked;
  logic signed [11:0]   ted_err;
  logic [7:0]           ctrl_code;
  real vctl, rate, phase_err, offset_ppm;
  int  prbs_order = 7;

  int checks = 0, failures = 0;
  int n_scan = 0, n_lock = 0, n_track = 0, n_psat = 0;
  longint cycle = 0;

  hcr_top dut (
    .clk, .rst, .adc_samples, .eq_samples, .dac_out, .locked, .ted_err, .ctrl_code
  );

  pof_adc_model #(.P(P), .W(W)) u_adc (.clk, .rate, .samples(adc_samples), .prbs_order, .phase_err);
  rc_filter_model u_rc (.clk, .din(dac_out), .vout(vctl));
  vcxo_model u_vcxo (.vctl, .offset_ppm, .rate);

  always #1.818 clk = ~clk;   // about 275 MHz
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Equalizer path: registered copy of the ADC word (not checked on the
  // first clock after reset, when the register still holds its reset value).
  logic rst_d = 1'b1;
  always @(posedge clk) begin
    rst_d <= rst;
    if (!rst && !rst_d) begin
      for (int i = 0; i < 2 * P; i++)
        if (eq_samples[i] != prev_adc[i]) begin
          failures++;
          if (failures < 10) $display("FAIL eq_samples[%0d] mismatch", i);
        end
    end
    prev_adc <= adc_samples;
  end

  // The filter's proportional term alone exceeds the DAC range when
  // |ted_err| > 255: the output saturates.
  always @(posedge clk) if (!rst && (ted_err > 255 || ted_err < -255)) n_psat++;

  // Reset, run until the flag rises; returns the number of clocks.
  task automatic acquire(real off, int limit, output int t_lock);
    int min_code;
    offset_ppm = off;
    rst = 1;
    repeat (4) @(posedge clk);
    #0.1 rst = 0;
    @(posedge clk); #0.1;
    check(ctrl_code == 8'd255, $sformatf("start code %0d, expected 255", ctrl_code));
    t_lock = -1;
    min_code = 255;
    for (int k = 0; k < limit && t_lock < 0; k++) begin
      @(posedge clk); #0.1;
      if (int'(ctrl_code) < min_code) min_code = int'(ctrl_code);
      if (locked) t_lock = k;
    end
    if (min_code < 250) n_scan++;
    check(t_lock >= 0, $sformatf("no lock at offset %0.1f ppm within %0d clocks", off, limit));
    if (t_lock >= 0) n_lock++;
  endtask

  // While locked: average frequency error (ppm) and timing offset (UI).
  task automatic measure(int n, string tag);
    real sum_f = 0.0, sum_p = 0.0;
    int  ones = 0, code_sum = 0, unl = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #0.1;
      sum_f += (rate - 1.0) * 1.0e6;
      sum_p += phase_err;
      ones += int'(dac_out);
      code_sum += int'(ctrl_code);
      if (!locked) unl++;
    end
    $display("%s: mean freq error %0.3f ppm, mean phase %0.4f UI, code %0.1f, unlocked %0d",
             tag, sum_f / n, sum_p / n, real'(code_sum) / n, unl);
    check(sum_f / n < 3.0 && sum_f / n > -3.0, {tag, ": recovered clock off the line rate"});
    check(sum_p / n < 0.1 && sum_p / n > -0.1, {tag, ": samples away from the symbol centre"});
    check(unl == 0, {tag, ": flag dropped while locked"});
    // density of the bit stream against the average code (256 clocks per period)
    check((real'(ones) / n - real'(code_sum) / n / 256.0) < 0.01 &&
          (real'(ones) / n - real'(code_sum) / n / 256.0) > -0.01, {tag, ": DAC density"});
  endtask

  initial begin
    int t1, t2, t3, t4;
    automatic int orders [5] = '{7, 11, 15, 20, 23};
    offset_ppm = 0.0;
    for (int i = 0; i < 2 * P; i++) prev_adc[i] = '0;

    // Deviation from start point 50, 150, 200 ppm (start = +150 ppm from nominal).
    acquire(-100.0, 1_000_000, t1);
    $display("offset -100 ppm: locked after %0d clocks", t1);
    measure(40000, "run A");

    // Transmitter frequency step while locked: the loop must follow.
    offset_ppm = -60.0;
    begin
      automatic int lost = 0, back = -1;
      for (int k = 0; k < 400000 && back < 0; k++) begin
        @(posedge clk); #0.1;
        if (!locked) lost = 1;
        if (k > 2000 && locked && (rate - 1.0) * 1.0e6 < 3.0 && (rate - 1.0) * 1.0e6 > -3.0) back = k;
      end
      check(back >= 0, "loop did not follow a 40 ppm step");
      if (back >= 0) n_track++;
      $display("step of 40 ppm: followed after %0d clocks (flag dropped: %0d)", back, lost);
    end
    measure(40000, "run A after step");

    acquire(0.0, 1_000_000, t2);
    $display("offset 0 ppm: locked after %0d clocks", t2);
    measure(20000, "run B");

    acquire(50.0, 2_000_000, t3);
    $display("offset +50 ppm: locked after %0d clocks", t3);
    measure(20000, "run C");

    check(t1 < t2 && t2 < t3, "convergence time does not grow with the deviation");

    // The PRBS lengths of the holding-window measurements: 2^7-1 to 2^23-1,
    // each acquired from 100 ppm below the start point.
    foreach (orders[i]) begin
      prbs_order = orders[i];
      acquire(-50.0, 1_000_000, t4);
      $display("PRBS 2^%0d-1: locked after %0d clocks", orders[i], t4);
      measure(20000, $sformatf("PRBS 2^%0d-1", orders[i]));
    end

    check(n_scan > 0, "scan from the start point never happened");
    check(n_lock > 0, "flag never raised");
    check(n_track > 0, "frequency step never tracked");
    check(n_psat > 0, "proportional path never saturated");
    $display("mechanisms: scan %0d, lock %0d, track %0d, proportional saturation %0d",
             n_scan, n_lock, n_track, n_psat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
