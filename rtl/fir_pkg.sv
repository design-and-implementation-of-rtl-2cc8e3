// fir_pkg: shared widths, types and the constant coefficient tables of the
// 2-parallel (2-unfolded) broadcast FIR filters.
//
// Data widths follow the filter's component list: 8-bit signed input samples,
// 8-bit signed coefficients, 8x8 multipliers with 16-bit products, and 16-bit
// adders and delay registers. Sums are 16-bit two's complement and wrap.
//
// Coefficient tables are indexed from the multiplier farthest from the output
// (tap 0, "a" in the filter drawings, whose product passes through the most
// delays) to the multiplier at the output (tap N-1, no delay). The impulse
// response is therefore h[k] = COEF[N-1-k]; all three sets are symmetric, so
// the order does not change the response.
//
//   COEF_2TAP  = 102, 102 and
//   COEF_11TAP = -15, -13, 7, 38, 66, 78, 66, 38, 7, -13, -15:
//                the original 8-bit low-pass values, recovered from the
//                published simulation outputs of the two filters (for the
//                input 20, 20, -20, -20, ... both tables reproduce every
//                published output, e.g. 2040 = 102 * 20 and -300 = -15 * 20).
//                sum|h| of the 11-tap set is 356, so inputs near full scale
//                can make its 16-bit sums wrap.
//   COEF_4TAP  = 2, 64, 64, 2: this design's own low-pass set, since the
//                original values were not published: Hamming-windowed sinc,
//                h[n] = round(64 * s[n] / max|s|) with
//                s[n] = sin(2 pi fc (n - M/2)) / (pi (n - M/2)) * (0.54 - 0.46 cos(2 pi n / M)),
//                M = N - 1, fc = 0.25 of the input sample rate.
package fir_pkg;

  localparam int X_W   = 8;   // input sample width
  localparam int C_W   = 8;   // coefficient width
  localparam int ACC_W = 16;  // product, adder and delay register width

  typedef logic signed [X_W-1:0]   sample_t;
  typedef logic signed [C_W-1:0]   coef_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Packed tables: element i is tap i (written highest tap first).
  localparam logic [1:0][C_W-1:0] COEF_2TAP = {8'sd102, 8'sd102};

  localparam logic [3:0][C_W-1:0] COEF_4TAP = {8'sd2, 8'sd64, 8'sd64, 8'sd2};

  localparam logic [10:0][C_W-1:0] COEF_11TAP = {
    -8'sd15, -8'sd13, 8'sd7, 8'sd38, 8'sd66, 8'sd78,
     8'sd66, 8'sd38, 8'sd7, -8'sd13, -8'sd15
  };

endpackage
