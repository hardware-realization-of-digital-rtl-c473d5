// walsh_pkg: shared types, sizes and Walsh-series coefficient tables for the
// Walsh-function waveform generators.
//
// A periodic function f(x) on [0,1) is written as the Walsh series
//   f(x) ~ sum_n A_n * psi(n,x),   A_n = integral_0^1 f(x) psi(n,x) dx
// where psi(n,x) is the Walsh function of index n in Paley (dyadic) order:
// the product of the Rademacher functions R_(i+1) for every bit i set in n.
// Keeping the first 2^N terms gives, on each of the 2^N equal sub-intervals
// of the period, exactly the mean of f over that sub-interval.
//
// Number format: coefficients and output samples are 16-bit two's
// complement with 14 fraction bits (Q2.14), so +1.0 = 16384 and the full
// swing of an amplitude-1 wave (-1.0 .. +1.0) fits with headroom. Each table
// entry is round(A_n * 2^14), A_n worked out with Eq. 8 for amplitude 1.
//   Sine      f(x) = sin(2*pi*x)
//   Triangle  f(x) = 4x (x<=1/4), 2-4x (1/4..3/4), 4(x-1) (x>=3/4)
//   Trapezoid f(x) = 4x (x<=1/4), 1 (1/4..3/4), 4-4x (x>=3/4)
// The triangle and trapezoid coefficients are exact in this format; the
// sine ones carry at most half an LSB of rounding each. The tables hold the
// first 64 coefficients (six Rademacher functions); a generator built with
// fewer Rademacher functions uses only the leading 2^N entries, which is the
// same truncated series. All entries not listed are zero.
package walsh_pkg;

  // Largest supported number of Rademacher functions and Walsh terms.
  localparam int unsigned MAX_RAD   = 6;
  localparam int unsigned MAX_TERMS = 1 << MAX_RAD;

  // Sample and coefficient format.
  localparam int unsigned COEF_W = 16;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t                    coef_table_t [MAX_TERMS];

  typedef enum logic [1:0] {
    WAVE_SINE      = 2'd0,
    WAVE_TRIANGLE  = 2'd1,
    WAVE_TRAPEZOID = 2'd2
  } wave_e;

  localparam coef_table_t SINE_COEF = '{
     1: 16'sd10430,  7: -16'sd4320, 11: -16'sd2075, 13: -16'sd859,
    19: -16'sd1027, 21: -16'sd426,  25: -16'sd204,  31:  16'sd85,
    35: -16'sd512,  37: -16'sd212,  41: -16'sd102,  47:  16'sd42,
    49: -16'sd50,   55:  16'sd21,   59:  16'sd10,   61:  16'sd4,
    default: 16'sd0
  };

  localparam coef_table_t TRIANGLE_COEF = '{
     1:  16'sd8192,  7: -16'sd4096, 11: -16'sd2048, 19: -16'sd1024,
    35: -16'sd512,
    default: 16'sd0
  };

  localparam coef_table_t TRAPEZOID_COEF = '{
     0:  16'sd12288,  3: -16'sd4096,  5: -16'sd2048,  6: -16'sd2048,
     9: -16'sd1024,  10: -16'sd1024, 17: -16'sd512,  18: -16'sd512,
    33: -16'sd256,   34: -16'sd256,
    default: 16'sd0
  };

  function automatic coef_table_t wave_table(wave_e wave);
    case (wave)
      WAVE_TRIANGLE:  return TRIANGLE_COEF;
      WAVE_TRAPEZOID: return TRAPEZOID_COEF;
      default:        return SINE_COEF;
    endcase
  endfunction

endpackage
