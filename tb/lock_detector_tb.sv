// Self-checking testbench of the convergence flag.
//
// Runs the detector with its default window (256 clocks), bound (8192) and
// hold count (16). A reference tracks window sums and the number of good
// windows in a row and predicts the flag at every clock. Stimulus: small
// random errors (converged), large one-signed errors (not converged), mixed
// windows near the bound, and a short burst that breaks an established lock.
// Also checks how many clocks a clean error takes to raise the flag:
// 16 windows of 256 clocks.
module lock_detector_tb;
  localparam int ERR_W = 12;
  localparam int WIN   = 256;
  localparam int THR   = 8192;
  localparam int HOLD  = 16;

  logic clk = 0, rst = 1;
  logic signed [ERR_W-1:0] err;
  logic locked;
  int checks = 0, failures = 0;

  lock_detector dut (.clk, .rst, .err, .locked);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pos, wsum, goodw;
  bit exp_lock;

  task automatic drive(int v);
    err = ERR_W'(v);
    @(posedge clk); #1;
    wsum += v;
    pos++;
    if (pos == WIN) begin
      if (wsum <= THR && wsum >= -THR) begin
        goodw++;
        if (goodw >= HOLD) exp_lock = 1;
      end else begin
        goodw = 0;
        exp_lock = 0;
      end
      pos = 0;
      wsum = 0;
    end
    checks++;
    if (locked != exp_lock) begin
      failures++;
      if (failures < 10) $display("FAIL locked=%0d expected %0d (window %0d good)", locked, exp_lock, goodw);
    end
  endtask

  initial begin
    int first_lock;
    err = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    pos = 0; wsum = 0; goodw = 0; exp_lock = 0;
    first_lock = -1;

    // Clean error: lock after HOLD windows.
    for (int k = 0; k < 20 * WIN; k++) begin
      drive($urandom_range(0, 60) - 30);
      if (first_lock < 0 && locked) first_lock = k + 1;
    end
    checks++;
    if (first_lock != HOLD * WIN) begin
      failures++; $display("FAIL flag rose after %0d clocks, expected %0d", first_lock, HOLD * WIN);
    end

    // A window with a mean offset of +40 per clock (sum 10240) breaks the lock.
    for (int k = 0; k < 3 * WIN; k++) drive(40 + $urandom_range(0, 8) - 4);
    checks++;
    if (locked) begin failures++; $display("FAIL still locked on a biased error"); end

    // Windows whose sums land near the bound on both sides.
    for (int w = 0; w < 200; w++) begin
      automatic int bias = $urandom_range(0, 80) - 40;        // sum about 256*bias
      for (int k = 0; k < WIN; k++) drive(bias);
    end

    // Large zero-mean swings stay converged; full-scale one-signed does not.
    for (int k = 0; k < 20 * WIN; k++) drive((k % 2 == 0) ? 1000 : -1000);
    for (int k = 0; k < 2 * WIN; k++) drive(-2048);
    for (int k = 0; k < 20 * WIN; k++) drive($urandom_range(0, 10) - 5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
