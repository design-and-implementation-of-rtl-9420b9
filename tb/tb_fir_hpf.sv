// tb_fir_hpf: self-checking testbench of the FIR high-pass core at its full size
// (121 taps, 12-bit samples, 16-bit coefficients).
//
// 1. Coefficient set: evaluates the frequency response of the stored
//    coefficients with $cos and checks it against the specification:
//    gain below -44 dB from 0 to 10 kHz, 1 +/- 0.01 from 15 to 125 kHz
//    (fs = 250 kHz), and checks the symmetric response has gain ~0 at DC.
// 2. Impulse: a unit impulse must reproduce h[0..120] in order.
// 3. Random samples at full rate and with random idle clocks, plus runs of
//    full-scale samples with the worst-case sign pattern; every output is
//    compared with a direct-form convolution over the sample history.
// 4. Latency: every output must appear exactly 9 clocks after its sample.
module tb_fir_hpf;

  localparam int TAPS = fir_hpf_pkg::HPF_TAPS;
  localparam int NUNIQ = fir_hpf_pkg::HPF_NUNIQ;
  localparam int DATA_W = fir_hpf_pkg::HPF_DATA_W;
  localparam int ACC_W = fir_hpf_pkg::HPF_ACC_W;
  localparam int LATENCY = 3 + $clog2(NUNIQ);
  localparam real FS = 250.0e3;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] out_data;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  fir_hpf dut (
    .clk,
    .rst_n,
    .in_valid,
    .in_data,
    .out_valid,
    .out_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Full 121-tap impulse response, unfolded from the stored half.
  function automatic longint h(int k);
    return longint'(fir_hpf_pkg::HPF_COEF[(k < NUNIQ) ? k : TAPS - 1 - k]);
  endfunction

  // Sample history (newest at index 0) and scoreboard.
  longint hist [TAPS];
  longint exp_q [$];
  longint due_q [$];

  task automatic push_sample(input logic signed [DATA_W-1:0] s);
    longint acc;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(s);
    acc = 0;
    for (int k = 0; k < TAPS; k++) acc += h(k) * hist[k];
    exp_q.push_back(acc);
  endtask

  // Drive one sample; the DUT accepts it at the next rising edge. in_valid stays
  // high until idle() lowers it.
  task automatic send(input logic signed [DATA_W-1:0] s);
    in_valid <= 1'b1;
    in_data <= s;
    push_sample(s);
    @(posedge clk);
    due_q.push_back(cycle + 64'(LATENCY));
  endtask

  // Leave in_valid low for n clocks (n = 0 keeps the stream back to back).
  task automatic idle(input int n);
    if (n > 0) begin
      in_valid <= 1'b0;
      repeat (n) @(posedge clk);
    end
  endtask

  // Output monitor: value and timing.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e, d;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %0d at cycle %0d", out_data, cycle);
      end else begin
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (longint'(out_data) != e) begin
          failures++;
          $display("FAIL: output %0d expected %0d (cycle %0d)", out_data, e, cycle);
        end
        checks++;
        if (cycle != d) begin
          failures++;
          $display("FAIL: output at cycle %0d, due at cycle %0d", cycle, d);
        end
      end
    end
  end

  // Magnitude of the frequency response of the stored coefficients at f.
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

  task automatic check_coefficients();
    real g, stop_max, pass_min, pass_max;
    stop_max = 0.0;
    pass_min = 10.0;
    pass_max = 0.0;
    for (int k = 0; k < NUNIQ; k++) begin
      checks++;
      if (h(k) != h(TAPS - 1 - k)) begin
        failures++;
        $display("FAIL: coefficient %0d not symmetric", k);
      end
    end
    for (real f = 0.0; f <= 10.0e3; f += 100.0) begin
      g = gain_at(f);
      if (g > stop_max) stop_max = g;
    end
    for (real f = 15.0e3; f <= 125.0e3; f += 250.0) begin
      g = gain_at(f);
      if (g < pass_min) pass_min = g;
      if (g > pass_max) pass_max = g;
    end
    $display("coefficients: stopband max %f dB, passband %f .. %f",
             20.0 * $log10(stop_max), pass_min, pass_max);
    checks++;
    if (20.0 * $log10(stop_max) > -44.0) begin
      failures++;
      $display("FAIL: stopband attenuation too small");
    end
    checks++;
    if (pass_min < 0.99 || pass_max > 1.01) begin
      failures++;
      $display("FAIL: passband ripple too large");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    check_coefficients();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Impulse response.
    send(12'sd1);
    repeat (TAPS - 1) send(12'sd0);
    idle(LATENCY + 2);

    // Random samples, back to back.
    repeat (600) send(DATA_W'($urandom));
    // Random samples with random gaps.
    repeat (600) begin
      send(DATA_W'($urandom));
      idle($urandom_range(0, 5));
    end
    // Full-scale samples matching the sign of each coefficient (largest sum).
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < TAPS; k++) begin
        logic signed [DATA_W-1:0] s;
        s = (h(TAPS - 1 - k) >= 0) ? 12'sh7ff : 12'sh800;
        if (r == 1) s = (h(TAPS - 1 - k) >= 0) ? 12'sh800 : 12'sh7ff;
        send(s);
      end
    end
    repeat (TAPS) send(DATA_W'($urandom));
    idle(LATENCY + 4);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
