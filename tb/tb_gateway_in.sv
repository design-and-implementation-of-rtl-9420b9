// tb_gateway_in: self-checking testbench of the input gateway.
//
// Two instances run side by side, one taking two's-complement words and one
// taking offset-binary words. Random words arrive with random strobes; the
// testbench checks one clock of latency, the conversion (offset binary: value
// minus 2^(W-1)) and that the sample holds while no strobe is present.
module tb_gateway_in;

  localparam int W = fir_hpf_pkg::HPF_DATA_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adc_valid = 1'b0;
  logic [W-1:0] adc_data = '0;
  logic v_tc, v_ob;
  logic signed [W-1:0] d_tc, d_ob;

  int checks = 0;
  int failures = 0;

  gateway_in #(.DATA_W(W), .OFFSET_BINARY(1'b0)) dut_tc (
    .clk, .rst_n, .adc_valid, .adc_data, .smp_valid(v_tc), .smp_data(d_tc)
  );
  gateway_in #(.DATA_W(W), .OFFSET_BINARY(1'b1)) dut_ob (
    .clk, .rst_n, .adc_valid, .adc_data, .smp_valid(v_ob), .smp_data(d_ob)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_tc, last_ob;
    last_tc = 0;
    last_ob = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      bit v;
      logic [W-1:0] w;
      v = ($urandom_range(0, 2) != 0);
      w = (n < 4) ? W'(n == 0 ? 0 : n == 1 ? (1 << (W - 1)) : n == 2 ? ((1 << W) - 1) : ((1 << (W - 1)) - 1))
                  : W'($urandom);
      adc_valid <= v;
      adc_data <= w;
      @(posedge clk);
      #1;
      if (v) begin
        // two's complement: the word read as signed
        last_tc = (int'(w) >= (1 << (W - 1))) ? int'(w) - (1 << W) : int'(w);
        // offset binary: the word read as unsigned, minus half scale
        last_ob = int'(w) - (1 << (W - 1));
      end
      check(v_tc == v && v_ob == v, "valid strobe not delayed by one clock");
      check(int'(d_tc) == last_tc, $sformatf("two's complement sample %0d, expected %0d", d_tc, last_tc));
      check(int'(d_ob) == last_ob, $sformatf("offset binary sample %0d, expected %0d", d_ob, last_ob));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
