// Self-checking testbench of the Mueller & Mueller timing error detector.
//
// Drives random sample words, plus three hand-made cases, and compares the
// registered error with a reference computed here from the error law
// e_k = sign(y[k-1]) y[k] - sign(y[k]) y[k-1], summed over the word, with the
// previous word's last sample as predecessor of the first. Hand-made cases:
// samples exactly at the eye centre of an ISI-free signal (error 0), a late
// sample on a symmetric pulse (negative error), an early one (positive).
// Also checks the one-clock latency.
module mm_ted_tb;
  localparam int P = 4;
  localparam int W = 8;
  localparam int ERR_W = W + 2 + $clog2(P);

  logic clk = 0, rst = 1;
  logic signed [W-1:0]     y [P];
  logic signed [ERR_W-1:0] err;
  int checks = 0, failures = 0;

  mm_ted dut (.clk, .rst, .y, .err);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sgn(int v);
    return (v < 0) ? -1 : 1;
  endfunction

  int last;      // reference copy of the last sample of the previous word

  function automatic int ref_err(int prev0, int s [P]);
    int e = 0, pr;
    for (int i = 0; i < P; i++) begin
      pr = (i == 0) ? prev0 : s[i-1];
      e += sgn(pr) * s[i] - sgn(s[i]) * pr;
    end
    return e;
  endfunction

  task automatic apply(int s [P], output int got);
    for (int i = 0; i < P; i++) y[i] = W'(s[i]);
    @(posedge clk); #1;
    got = int'(err);
  endtask

  task automatic check_word(int s [P], string what);
    int exp_e, got;
    exp_e = ref_err(last, s);
    apply(s, got);
    checks++;
    if (got != exp_e) begin
      failures++;
      $display("FAIL %s: err=%0d expected %0d", what, got, exp_e);
    end
    last = s[P-1];
  endtask

  initial begin
    int s [P];
    for (int i = 0; i < P; i++) y[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    last = 0;

    // Eye centre, no ISI: every sample is +/-A, error must be exactly 0.
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < P; i++) s[i] = ($urandom_range(0, 1) != 0) ? 100 : -100;
      check_word(s, "eye centre");
      checks++;
      if (n > 0 && int'(err) != 0) begin failures++; $display("FAIL centre error not zero"); end
    end

    // Late sampling on a symmetric pulse: the sample is pulled toward the
    // next symbol, y_k = 60 a_k + 20 a_{k+1}. Data +,+,-,- repeating; the
    // predecessor belongs to a -1 followed by a +1.
    s = '{60 + 20, 60 - 20, -60 - 20, -60 + 20};
    last = -40;
    begin
      int got;
      y[0] = W'(-40); y[1] = '0; y[2] = '0; y[3] = W'(-40);
      @(posedge clk); #1;
      apply(s, got);
      checks++;
      if (got >= 0) begin failures++; $display("FAIL late sample gave err=%0d, expected < 0", got); end
      checks++;
      if (got != ref_err(-40, s)) begin failures++; $display("FAIL late value %0d", got); end
    end
    last = s[P-1];

    // Early sampling of the same +,+,-,- data: y_k = 60 a_k + 20 a_{k-1}.
    begin
      int got;
      s = '{60 + -20, 60 + 20, -60 + 20, -60 - 20};
      // the predecessor belongs to a -1 that follows a -1
      y[0] = '0; y[1] = '0; y[2] = '0; y[3] = W'(-80);
      @(posedge clk); #1;
      apply(s, got);
      checks++;
      if (got <= 0) begin failures++; $display("FAIL early sample gave err=%0d, expected > 0", got); end
      checks++;
      if (got != ref_err(-80, s)) begin failures++; $display("FAIL early value %0d", got); end
      last = s[P-1];
    end

    // Random words, including full-scale values.
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < P; i++) s[i] = int'($signed(W'($urandom)));
      if (n % 97 == 0) s = '{-128, 127, -128, 127};
      check_word(s, "random");
    end

    // Latency: the error appears one clock after the word, not in the same clock.
    begin
      int got;
      s = '{0, 0, 0, 0};
      for (int i = 0; i < P; i++) y[i] = '0;
      @(posedge clk); @(posedge clk); #1;
      y[0] = W'(50); y[1] = W'(-50); y[2] = W'(50); y[3] = W'(-50);
      #1;
      checks++;
      if (err != 0) begin failures++; $display("FAIL err changed before the clock"); end
      @(posedge clk); #1;
      checks++;
      if (int'(err) != ref_err(0, '{50, -50, 50, -50})) begin
        failures++; $display("FAIL latency check err=%0d", err);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
