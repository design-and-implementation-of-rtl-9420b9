// hpf_top: FPGA part of the audio high-pass system, ADC word in, DAC word out.
//
// What it does: the samples of an audio ADC pass through the input gateway,
// the order-120 equiripple linear-phase FIR high-pass filter (fs = 250 kHz,
// stopband edge 10 kHz, passband edge 15 kHz) and the output gateway, and leave
// as a rounded, saturated word for a DAC. Low-frequency content (below 10 kHz)
// is suppressed by more than 45 dB; content above 15 kHz passes with unit gain.
//
// How it works: gateway_in -> fir_hpf -> gateway_out, connected by valid
// strobes. The converters themselves sit outside the FPGA; their interfaces
// are reduced here to a parallel word with a one-clock sample strobe.
//
// Interface: adc_valid/adc_data (DATA_W-bit two's complement, or offset binary
// if ADC_OFFSET_BINARY = 1), dac_valid/dac_data (OUT_W-bit two's complement,
// OUT_FRAC fraction bits, same scale as the input), dac_sat flags a saturated
// output sample.
// Timing: dac_valid follows adc_valid by LATENCY = 11 clocks with the defaults
// (1 gateway_in + 9 filter + 1 gateway_out). A sample may be offered every
// clock; at 100 MHz and 250 kS/s there are 400 clocks per sample.
//
// The chain of blocks and the filter specification follow the published
// design; the word widths, strobes and converter-side word formats are this
// design's own choices.
module hpf_top
#(
  parameter int DATA_W = fir_hpf_pkg::HPF_DATA_W,
  parameter int OUT_W = fir_hpf_pkg::HPF_OUT_W,
  parameter int OUT_FRAC = fir_hpf_pkg::HPF_OUT_FRAC,
  parameter bit ADC_OFFSET_BINARY = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic [DATA_W-1:0]       adc_data,
  output logic                    dac_valid,
  output logic signed [OUT_W-1:0] dac_data,
  output logic                    dac_sat
);

  localparam int TAPS = fir_hpf_pkg::HPF_TAPS;
  localparam int COEF_W = fir_hpf_pkg::HPF_COEF_W;
  localparam int FACC_W = DATA_W + 1 + COEF_W + $clog2((TAPS + 1) / 2);

  logic                     smp_valid;
  logic signed [DATA_W-1:0] smp_data;
  logic                     acc_valid;
  logic signed [FACC_W-1:0] acc_data;

  gateway_in #(
    .DATA_W(DATA_W),
    .OFFSET_BINARY(ADC_OFFSET_BINARY)
  ) u_gw_in (
    .clk,
    .rst_n,
    .adc_valid,
    .adc_data,
    .smp_valid,
    .smp_data
  );

  fir_hpf #(
    .TAPS(TAPS),
    .DATA_W(DATA_W),
    .COEF_W(COEF_W),
    .COEF(fir_hpf_pkg::HPF_COEF),
    .ACC_W(FACC_W)
  ) u_fir (
    .clk,
    .rst_n,
    .in_valid(smp_valid),
    .in_data(smp_data),
    .out_valid(acc_valid),
    .out_data(acc_data)
  );

  gateway_out #(
    .IN_W(FACC_W),
    .IN_FRAC(fir_hpf_pkg::HPF_COEF_FRAC),
    .OUT_W(OUT_W),
    .OUT_FRAC(OUT_FRAC)
  ) u_gw_out (
    .clk,
    .rst_n,
    .in_valid(acc_valid),
    .in_data(acc_data),
    .out_valid(dac_valid),
    .out_data(dac_data),
    .out_sat(dac_sat)
  );

endmodule
