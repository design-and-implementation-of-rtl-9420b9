// gateway_in: entry point of the filter's fixed-point domain.
//
// What it does: takes the raw converter word and its sample strobe, turns the
// word into a signed two's-complement sample and registers both, so that the
// filter sees a clean, clock-aligned sample stream.
//
// How it works: with OFFSET_BINARY = 1 the converter is taken to deliver offset
// binary (0 = most negative, 2^(W-1) = zero), and inverting the top bit gives
// two's complement. With OFFSET_BINARY = 0 (default) the word is already two's
// complement and is taken as it is. The output register loads only when
// adc_valid is high and holds its value otherwise.
//
// Interface: adc_valid/adc_data in, smp_valid/smp_data out.
// Timing: one clock of latency; smp_valid is a one-clock pulse per sample.
//
// That the converter words enter as fixed-point binary follows the published
// design. The register, the strobe, the optional offset-binary conversion and
// the asynchronous active-low reset are this design's own choices.
module gateway_in #(
  parameter int DATA_W = fir_hpf_pkg::HPF_DATA_W,
  parameter bit OFFSET_BINARY = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adc_valid,
  input  logic [DATA_W-1:0]        adc_data,
  output logic                     smp_valid,
  output logic signed [DATA_W-1:0] smp_data
);

  logic signed [DATA_W-1:0] conv;

  always_comb begin
    conv = adc_data;
    if (OFFSET_BINARY) conv[DATA_W-1] = ~adc_data[DATA_W-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_valid <= 1'b0;
      smp_data  <= '0;
    end else begin
      smp_valid <= adc_valid;
      if (adc_valid) smp_data <= conv;
    end
  end

endmodule
