// fir_hpf_pkg: shared types, sizes and the coefficient set of the high-pass filter.
//
// The filter is a linear-phase (type I, symmetric) equiripple FIR of order 120,
// i.e. 121 taps, for a 250 kHz sample rate. Only the first 61 coefficients
// h[0..60] are stored; h[120-k] = h[k], and h[60] is the centre tap.
//
// Coefficient set: minimax (Parks-McClellan / Remez exchange) design with
//   stopband 0 .. 10 kHz, desired gain 0, weight 1
//   passband 15 .. 125 kHz, desired gain 1, weight 1
//   order 120, sample rate 250 kHz, frequency grid density 16
// each coefficient then rounded to a signed 16-bit Q1.15 word: HPF_COEF[k] = round(h[k] * 2^15).
// After quantisation the stopband gain stays below -45 dB and the passband gain
// inside 1 +/- 0.006. The order, band edges, sample rate and grid density are the
// published specification; the equal weights, the 16-bit coefficient word and
// the Q1.15 scaling are this design's choice.
//
// Sample words are 12-bit two's complement, as in the reference simulation.
package fir_hpf_pkg;

  localparam int HPF_DATA_W = 12;   // input sample width
  localparam int HPF_COEF_W = 16;   // coefficient width (Q1.15)
  localparam int HPF_COEF_FRAC = 15;  // fraction bits of a coefficient
  localparam int HPF_TAPS = 121;    // filter order 120
  localparam int HPF_NUNIQ = (HPF_TAPS + 1) / 2;  // distinct coefficients of a symmetric filter
  localparam int HPF_ACC_W = HPF_DATA_W + 1 + HPF_COEF_W + $clog2(HPF_NUNIQ);  // full-precision sum (35)
  localparam int HPF_OUT_W = 22;    // output word handed to the DAC side
  localparam int HPF_OUT_FRAC = 8;  // fraction bits kept in the output word

  typedef logic signed [HPF_DATA_W-1:0] sample_t;
  typedef logic signed [HPF_COEF_W-1:0] coef_t;

  localparam coef_t HPF_COEF [HPF_NUNIQ] = '{
       -67,     35,     35,     39,     43,     46,     46,     42,
        33,     19,      1,    -20,    -42,    -63,    -80,    -90,
       -92,    -84,    -66,    -37,     -1,     41,     84,    123,
       155,    173,    176,    159,    123,     69,      1,    -76,
      -155,   -228,   -285,   -320,   -324,   -294,   -228,   -129,
        -1,    144,    296,    439,    557,    633,    653,    606,
       482,    280,      1,   -345,   -745,  -1180,  -1628,  -2065,
     -2464,  -2803,  -3062,  -3223,  29490
  };

endpackage
