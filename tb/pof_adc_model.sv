// Behavioural model (not synthesizable) of the received 2-PAM line signal and
// the double-data-rate ADC that samples it with the recovered clock.
//
// Transmitted symbols a_n = +/-1 come from a PRBS of order prbs_order (7, 11,
// 15, 20 or 23, with the usual generators x^7+x^6+1, x^11+x^9+1, x^15+x^14+1,
// x^20+x^3+1, x^23+x^18+1) and sit at t = n, time in transmitter symbol
// periods (UI). A change of prbs_order takes effect on new symbols.
// The fibre and the optical front end are modelled as a symmetric raised-cosine pulse
// p(t) = cos^2(pi t / PULSE_UI) for |t| < PULSE_UI/2; with the default 4 UI
// the neighbours weigh 0.5 each and the eye at the symbol centre is closed.
// The ADC takes two samples per receiver symbol period: at the receiver's
// symbol instant and half a period later. The receiver period in UI is
// 1/rate, where rate is the receiver clock frequency over the transmitter's.
// Each clock the model produces 2*P samples (even index: symbol instant),
// rounded to W bits with a little uniform noise, and reports the timing offset
// of the first even sample from the nearest symbol centre, in UI.
module pof_adc_model #(
  parameter int  P        = 4,
  parameter int  W        = 8,
  parameter real AMP      = 55.0,
  parameter real PULSE_UI = 4.0,
  parameter real T0       = 20.35,
  parameter real NOISE    = 2.0
) (
  input  logic                clk,
  input  real                 rate,
  output logic signed [W-1:0] samples [2*P],
  input  int                  prbs_order,
  output real                 phase_err
);
  localparam real PI = 3.14159265358979;

  // Symbols are generated in order into a ring of 64; symbols up to index
  // gen_n - 1 exist. The sampling instant only moves forward, so the ring
  // always holds the few symbols around it.
  bit          ring [64];
  longint      gen_n;
  logic [22:0] lfsr;
  real         t;

  function automatic bit lfsr_step();
    bit fb;
    case (prbs_order)
      11:      fb = lfsr[10] ^ lfsr[8];
      15:      fb = lfsr[14] ^ lfsr[13];
      20:      fb = lfsr[19] ^ lfsr[2];
      23:      fb = lfsr[22] ^ lfsr[17];
      default: fb = lfsr[6]  ^ lfsr[5];
    endcase
    lfsr = {lfsr[21:0], fb};
    return fb;
  endfunction

  task automatic fill(longint upto);
    while (gen_n <= upto) begin
      ring[gen_n[5:0]] = lfsr_step();
      gen_n++;
    end
  endtask

  initial begin
    lfsr  = '1;
    gen_n = longint'($floor(T0)) - 8;
    t = T0;
    for (int i = 0; i < 2 * P; i++) samples[i] = '0;
    phase_err = 0.0;
  end

  function automatic real sym(longint n);
    return ring[n[5:0]] ? 1.0 : -1.0;
  endfunction

  function automatic real signal_at(real ts);
    real    acc = 0.0, d;
    longint c = longint'($floor(ts));
    for (longint n = c - 3; n <= c + 3; n++) begin
      d = ts - real'(n);
      if (d > -PULSE_UI / 2.0 && d < PULSE_UI / 2.0)
        acc += sym(n) * $cos(PI * d / PULSE_UI) ** 2;
    end
    return acc;
  endfunction

  function automatic logic signed [W-1:0] quantize(real v);
    real    q = v + NOISE * (real'($urandom_range(0, 1000)) / 500.0 - 1.0);
    integer i = $rtoi(q >= 0.0 ? q + 0.5 : q - 0.5);
    if (i > 2**(W-1) - 1) i = 2**(W-1) - 1;
    if (i < -(2**(W-1))) i = -(2**(W-1));
    return W'(i);
  endfunction

  real period;

  always @(posedge clk) begin
    period = 1.0 / rate;
    fill(longint'($floor(t + P * period)) + 4);
    for (int i = 0; i < P; i++) begin
      samples[2*i]     <= quantize(AMP * signal_at(t + i * period));
      samples[2*i + 1] <= quantize(AMP * signal_at(t + (i + 0.5) * period));
    end
    phase_err <= t - $floor(t + 0.5);
    t = t + P * period;
  end
endmodule
