// fir_hpf: fully parallel, pipelined linear-phase FIR filter (the equiripple high-pass core).
//
// What it does: y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k] with a symmetric impulse
// response h[k] = h[TAPS-1-k] (type I, odd TAPS). With the default coefficient set
// from fir_hpf_pkg this is the order-120 equiripple high-pass for fs = 250 kHz
// (stopband 0-10 kHz, passband 15-125 kHz).
//
// How it works: a TAPS-deep delay line shifts once per accepted sample. Because
// the response is symmetric, each pair of samples that share a coefficient is
// added first (pre-adder), so only (TAPS+1)/2 constant multiplications are
// needed. The products are summed by a balanced binary adder tree with a
// register after every level. The delay line moves only when in_valid is high,
// so samples may arrive every clock (as in the reference simulation) or at the
// audio rate with idle clocks in between; the stages behind the delay line run
// every clock and carry a valid flag alongside the data.
//
// Interface: in_valid/in_data present one sample; out_valid/out_data give the
// full-precision sum, ACC_W bits with COEF_FRAC fraction bits (the coefficient
// scaling), so out_data = sum of h_int[k] * x[n-k] exactly, no rounding.
//
// Timing: out_valid rises LATENCY = 3 + clog2((TAPS+1)/2) clocks (9 with the
// defaults) after the clock edge that accepted the sample. One result per
// accepted sample; throughput one sample per clock.
//
// The filter order, the linear-phase structure and the sample rate follow the
// published design. The direct form with pre-adders, the pipelining, the
// valid-flag handshake, the word widths and the asynchronous active-low reset
// are this design's own choices.
module fir_hpf
#(
  parameter int TAPS = fir_hpf_pkg::HPF_TAPS,
  parameter int DATA_W = fir_hpf_pkg::HPF_DATA_W,
  parameter int COEF_W = fir_hpf_pkg::HPF_COEF_W,
  parameter logic signed [COEF_W-1:0] COEF [(TAPS+1)/2] = fir_hpf_pkg::HPF_COEF,
  parameter int ACC_W = DATA_W + 1 + COEF_W + $clog2((TAPS + 1) / 2)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0]  out_data
);

  localparam int NUNIQ = (TAPS + 1) / 2;
  localparam int LEVELS = (NUNIQ > 1) ? $clog2(NUNIQ) : 1;
  localparam int NPAD = 1 << LEVELS;  // leaves of the adder tree
  localparam int NNODE = 2 * NPAD - 1;  // heap-ordered tree: node i has children 2i+1, 2i+2
  localparam int LATENCY = 3 + LEVELS;

  typedef logic signed [DATA_W-1:0] smp_t;
  typedef logic signed [DATA_W:0] pre_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  if (TAPS % 2 != 1) begin : g_bad_taps
    $error("fir_hpf: TAPS must be odd for a type I linear-phase filter");
  end

  // Coefficient of tree leaf i; leaves past the last coefficient are zero.
  function automatic acc_t leaf_coef(int i);
    return (i < NUNIQ) ? acc_t'(COEF[i]) : '0;
  endfunction

  smp_t dly [TAPS];  // dly[k] = x[n-k]
  pre_t pre [NPAD];  // pre-added sample pairs
  acc_t node [NNODE];  // adder tree, leaves hold the products
  logic [LATENCY-1:0] vld;  // valid flag of each stage

  // Delay line: shifts only on an accepted sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dly[k] <= '0;
    end else if (in_valid) begin
      dly[0] <= in_data;
      for (int k = 1; k < TAPS; k++) dly[k] <= dly[k-1];
    end
  end

  // Pre-adders: x[n-k] + x[n-(TAPS-1-k)]; the centre tap has no partner.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPAD; i++) pre[i] <= '0;
    end else begin
      for (int i = 0; i < NPAD; i++) begin
        if (i < NUNIQ - 1) pre[i] <= pre_t'(dly[i]) + pre_t'(dly[TAPS-1-i]);
        else if (i == NUNIQ - 1) pre[i] <= pre_t'(dly[i]);
        else pre[i] <= '0;
      end
    end
  end

  // Constant multipliers (tree leaves) and the pipelined adder tree.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NNODE; i++) node[i] <= '0;
    end else begin
      for (int i = 0; i < NPAD; i++) node[NPAD-1+i] <= acc_t'(pre[i]) * leaf_coef(i);
      for (int i = 0; i < NPAD - 1; i++) node[i] <= node[2*i+1] + node[2*i+2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else vld <= {vld[LATENCY-2:0], in_valid};
  end

  assign out_valid = vld[LATENCY-1];
  assign out_data = node[0];

endmodule
