// tb_gateway_out: self-checking testbench of the output gateway at its default
// widths (35-bit sum with 15 fraction bits in, 22-bit word with 8 fraction bits
// out). Random sums, sums that land exactly on half an output LSB, and sums far
// outside the output range are checked against real-valued rounding
// (floor(x / 2^7 + 0.5)) and saturation, with one clock of latency and a hold
// of the last word between strobes.
module tb_gateway_out;

  localparam int IN_W = fir_hpf_pkg::HPF_ACC_W;
  localparam int OUT_W = fir_hpf_pkg::HPF_OUT_W;
  localparam int SHIFT = fir_hpf_pkg::HPF_COEF_FRAC - fir_hpf_pkg::HPF_OUT_FRAC;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0] in_data = '0;
  logic out_valid, out_sat;
  logic signed [OUT_W-1:0] out_data;

  int checks = 0;
  int failures = 0;
  int n_sat = 0;
  int n_half = 0;

  gateway_out dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .out_sat);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v;
    bit exp_s;
    real maxv, minv, r;
    maxv = real'((longint'(1) << (OUT_W - 1)) - 1);
    minv = -real'(longint'(1) << (OUT_W - 1));
    exp_v = 0;
    exp_s = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 6000; n++) begin
      bit v;
      longint x;
      v = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0: x = longint'($signed(IN_W'({$urandom, $urandom})));  // anywhere, saturates often
        1: x = longint'($signed(30'($urandom)));  // inside the output range
        2: x = (longint'($signed(24'($urandom))) <<< SHIFT) + (longint'(1) <<< (SHIFT - 1));  // exact halves
        default: x = longint'($signed(29'($urandom)));  // near the limits
      endcase
      in_valid <= v;
      in_data <= IN_W'(x);
      @(posedge clk);
      #1;
      if (v) begin
        r = $floor(real'(x) / real'(longint'(1) << SHIFT) + 0.5);
        exp_s = (r > maxv) || (r < minv);
        if (r > maxv) r = maxv;
        if (r < minv) r = minv;
        exp_v = longint'(r);
        if (exp_s) n_sat++;
        if ((x & ((longint'(1) << SHIFT) - 1)) == (longint'(1) << (SHIFT - 1))) n_half++;
      end
      check(out_valid == v, "valid strobe not delayed by one clock");
      check(longint'(out_data) == exp_v, $sformatf("output %0d expected %0d (in %0d)", out_data, exp_v, x));
      check(out_sat == exp_s, "saturation flag wrong");
    end
    check(n_sat > 100, "too few saturating samples");
    check(n_half > 100, "too few exact half-LSB samples");
    $display("saturated %0d, exact halves %0d", n_sat, n_half);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
