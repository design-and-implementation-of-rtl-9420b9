// tb_hpf_top: end-to-end, full-size testbench of the high-pass system
// (hpf_top with every parameter at its default).
//
// Clock 100 MHz. Three phases:
//  1. Full-rate burst: random 12-bit words, one per clock, as in the reference
//     gateway simulation.
//  2. Audio rate: one sample every 400 clocks (250 kS/s at 100 MHz), a sum of a
//     2 kHz tone (stopband) and a 40 kHz tone (passband), 900 LSB each. After the
//     filter has settled the output is correlated with both tones: the 40 kHz
//     tone must come through with gain 1 +/- 0.01, the 2 kHz tone must be
//     attenuated by more than 40 dB.
//  3. Full-scale square wave at fs/32 (7.8 kHz), whose harmonics reach into the
//     passband and give large sums, again one sample per clock.
// Every DAC word is compared with an independent model: direct-form convolution
// with the 121-tap response, rounded half up to 8 fraction bits, saturated to
// 22 bits; and each must appear 11 clocks after its ADC strobe.
// Mechanisms counted: back-to-back samples, idle clocks between samples (delay
// line held), outputs whose discarded fraction is non-zero (rounding) and
// exact half-LSB ties. The output saturation cannot be reached with this
// coefficient set (the largest possible sum is 2048 * sum|h| < 2^21 output
// LSBs); it is exercised in tb_gateway_out, and here dac_sat must stay low.
module tb_hpf_top;

  localparam int TAPS = fir_hpf_pkg::HPF_TAPS;
  localparam int NUNIQ = fir_hpf_pkg::HPF_NUNIQ;
  localparam int DATA_W = fir_hpf_pkg::HPF_DATA_W;
  localparam int OUT_W = fir_hpf_pkg::HPF_OUT_W;
  localparam int SHIFT = fir_hpf_pkg::HPF_COEF_FRAC - fir_hpf_pkg::HPF_OUT_FRAC;
  localparam real OUT_SCALE = 256.0;  // 2^OUT_FRAC
  localparam int LATENCY = 11;
  localparam int CLK_PER_SAMPLE = 400;  // 100 MHz / 250 kHz
  localparam real FS = 250.0e3;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adc_valid = 1'b0;
  logic [DATA_W-1:0] adc_data = '0;
  logic dac_valid, dac_sat;
  logic signed [OUT_W-1:0] dac_data;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_b2b = 0;
  int n_idle = 0;
  int n_round = 0;
  int n_tie = 0;
  int n_sat = 0;

  hpf_top dut (
    .clk,
    .rst_n,
    .adc_valid,
    .adc_data,
    .dac_valid,
    .dac_data,
    .dac_sat
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && !adc_valid) n_idle++;
    if (rst_n && dac_sat) n_sat++;
  end

  function automatic longint h(int k);
    return longint'(fir_hpf_pkg::HPF_COEF[(k < NUNIQ) ? k : TAPS - 1 - k]);
  endfunction

  longint hist [TAPS];
  longint exp_q [$];
  longint due_q [$];
  bit prev_sent = 0;

  // Output words captured during the audio-rate phase.
  bit capture = 0;
  real cap [$];

  task automatic model(input logic signed [DATA_W-1:0] s);
    longint acc;
    real r;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(s);
    acc = 0;
    for (int k = 0; k < TAPS; k++) acc += h(k) * hist[k];
    if ((acc & ((longint'(1) << SHIFT) - 1)) != 0) n_round++;
    if ((acc & ((longint'(1) << SHIFT) - 1)) == (longint'(1) << (SHIFT - 1))) n_tie++;
    r = $floor(real'(acc) / real'(longint'(1) << SHIFT) + 0.5);
    if (r > real'((longint'(1) << (OUT_W - 1)) - 1)) r = real'((longint'(1) << (OUT_W - 1)) - 1);
    if (r < -real'(longint'(1) << (OUT_W - 1))) r = -real'(longint'(1) << (OUT_W - 1));
    exp_q.push_back(longint'(r));
  endtask

  // One sample followed by `gap` idle clocks (gap = 0: the next sample follows
  // on the next clock).
  task automatic send(input logic signed [DATA_W-1:0] s, input int gap);
    if (prev_sent) n_b2b++;
    adc_valid <= 1'b1;
    adc_data <= s;
    model(s);
    @(posedge clk);
    due_q.push_back(cycle + 64'(LATENCY));
    prev_sent = (gap == 0);
    if (gap > 0) begin
      adc_valid <= 1'b0;
      repeat (gap) @(posedge clk);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && dac_valid) begin
      longint e, d;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected DAC word %0d at cycle %0d", dac_data, cycle);
      end else begin
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (longint'(dac_data) != e) begin
          failures++;
          $display("FAIL: DAC word %0d expected %0d (cycle %0d)", dac_data, e, cycle);
        end
        if (cycle != d) begin
          failures++;
          $display("FAIL: DAC word at cycle %0d, due at cycle %0d", cycle, d);
        end
      end
      if (capture) cap.push_back(real'(dac_data) / OUT_SCALE);
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Amplitude of the tone at f in the captured words (n whole periods).
  function automatic real tone_amp(real f);
    real c, s, w;
    c = 0.0;
    s = 0.0;
    w = 2.0 * PI * f / FS;
    foreach (cap[i]) begin
      c += cap[i] * $cos(w * i);
      s += cap[i] * $sin(w * i);
    end
    return 2.0 * $sqrt(c * c + s * s) / real'(cap.size());
  endfunction

  // Gain of the stored response at f, for the expected passband amplitude.
  function automatic real gain_at(real f);
    real re, im, w;
    re = 0.0;
    im = 0.0;
    w = 2.0 * PI * f / FS;
    for (int k = 0; k < TAPS; k++) begin
      re += real'(h(k)) * $cos(w * k);
      im -= real'(h(k)) * $sin(w * k);
    end
    return $sqrt(re * re + im * im) / 32768.0;
  endfunction

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam real A = 900.0;
    real lo, hi, g40;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. full-rate burst
    repeat (500) send(DATA_W'($urandom), 0);
    send(DATA_W'($urandom), 20);

    // 2. audio rate, two tones; capture samples 200 .. 1199 of this phase
    for (int n = 0; n < 1200 + 20; n++) begin
      real x;
      x = A * $sin(2.0 * PI * 2.0e3 * n / FS) + A * $sin(2.0 * PI * 40.0e3 * n / FS + 0.3);
      // outputs of samples 200..1199 arrive LATENCY clocks after their strobe,
      // well inside the 400-clock sample period
      capture = (n >= 200 && n < 1200);
      send(DATA_W'($rtoi(x >= 0.0 ? x + 0.5 : x - 0.5)), CLK_PER_SAMPLE - 1);
    end
    capture = 0;

    // 3. full-scale square wave at fs/32, back to back
    for (int n = 0; n < 640; n++) send(((n / 16) % 2 == 0) ? 12'h7ff : 12'h800, 0);
    send(12'h000, LATENCY + 4);

    // tone measurement
    lo = tone_amp(2.0e3);
    hi = tone_amp(40.0e3);
    g40 = gain_at(40.0e3);
    $display("2 kHz out %f (in %f): %f dB", lo, A, 20.0 * $log10(lo / A));
    $display("40 kHz out %f (in %f): gain %f, response %f", hi, A, hi / A, g40);
    check(cap.size() == 1000, $sformatf("captured %0d words, expected 1000", cap.size()));
    check(20.0 * $log10(lo / A) < -40.0, "2 kHz tone not attenuated by 40 dB");
    check(hi / A > 0.99 && hi / A < 1.01, "40 kHz tone gain outside 1 +/- 0.01");
    check(hi / A > g40 - 0.005 && hi / A < g40 + 0.005, "40 kHz tone gain differs from the response");

    check(exp_q.size() == 0, $sformatf("%0d DAC words missing", exp_q.size()));
    $display("back-to-back samples %0d, idle clocks %0d, rounded outputs %0d, ties %0d, saturated %0d",
             n_b2b, n_idle, n_round, n_tie, n_sat);
    check(n_b2b > 0, "no back-to-back samples");
    check(n_idle > 0, "no idle clocks between samples");
    check(n_round > 0, "no output needed rounding");
    check(n_sat == 0, "DAC word saturated although the sum cannot leave the range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
