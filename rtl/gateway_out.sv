// gateway_out: exit point of the filter's fixed-point domain, with output buffering.
//
// What it does: reduces the filter's full-precision sum (IN_W bits, IN_FRAC
// fraction bits) to the output word (OUT_W bits, OUT_FRAC fraction bits) and
// holds it in a register for the converter side.
//
// How it works: the IN_FRAC - OUT_FRAC low bits are dropped with round half up
// (add half an output LSB, then shift right arithmetically). If the rounded value
// does not fit in OUT_W bits it saturates to the largest or smallest output
// word instead of wrapping. The output register loads only when in_valid is
// high and holds the last result between samples, as a DAC input would need.
//
// Interface: in_valid/in_data in, out_valid/out_data/out_sat out; out_sat flags
// a saturated sample.
// Timing: one clock of latency.
//
// That the result leaves through a buffered output stage follows the published
// design. Widths, rounding mode, saturation and the reset are this design's
// own choices. Requires IN_FRAC > OUT_FRAC.
module gateway_out #(
  parameter int IN_W = fir_hpf_pkg::HPF_ACC_W,
  parameter int IN_FRAC = fir_hpf_pkg::HPF_COEF_FRAC,
  parameter int OUT_W = fir_hpf_pkg::HPF_OUT_W,
  parameter int OUT_FRAC = fir_hpf_pkg::HPF_OUT_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    out_sat
);

  localparam int SHIFT = IN_FRAC - OUT_FRAC;
  localparam int WIDE = IN_W + 1;  // one guard bit for the rounding add

  typedef logic signed [WIDE-1:0] wide_t;

  localparam wide_t HALF = wide_t'(1) <<< (SHIFT - 1);
  localparam wide_t MAXV = wide_t'({1'b0, {(OUT_W-1){1'b1}}});
  localparam wide_t MINV = -MAXV - wide_t'(1);

  if (SHIFT < 1) begin : g_bad_shift
    $error("gateway_out: IN_FRAC must exceed OUT_FRAC");
  end
  if (OUT_W > IN_W - SHIFT + 1) begin : g_bad_width
    $error("gateway_out: OUT_W wider than the rounded input");
  end

  wide_t rounded;
  logic  hi, lo;

  always_comb begin
    rounded = (wide_t'(in_data) + HALF) >>> SHIFT;
    hi = rounded > MAXV;
    lo = rounded < MINV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sat <= hi | lo;
        if (hi) out_data <= {1'b0, {(OUT_W-1){1'b1}}};
        else if (lo) out_data <= {1'b1, {(OUT_W-1){1'b0}}};
        else out_data <= rounded[OUT_W-1:0];
      end
    end
  end

endmodule
