// dwt_pkg: word formats, lifting constants and the pair-stream type shared by
// the 9/7 lifting DWT.
//
// Samples are signed two's-complement fixed-point words of DW bits with FB
// fractional bits (an 8-bit pixel p enters as p * 2^FB). Lifting constants are
// signed CW-bit words with CF fractional bits. The constants are the scaled
// lifting factors of the rearranged 9/7 equations:
//   d1 = A*d0 + (s0[i] + s0[i+1])          A  = 1/alpha
//   s1 = B*s0 + (d1[i-1] + d1[i]) / 16     B  = 1/(16 alpha beta)
//   d2 = C*d1 + (s1[i] + s1[i+1]) / 2      C  = 1/(32 beta gamma)
//   s2 = D*s1 + (d2[i-1] + d2[i]) / 2      D  = 1/(4 gamma delta)
//   s  = K0*s2,  d = K1*d2                 K0 = 64 alpha beta gamma delta K
//                                          K1 = 32 alpha beta gamma / K
// with alpha..delta the Daubechies 9/7 lifting factors and K = 1.230174.
// The decimal values A..K1 are the published ones; each integer below is
// round(value * 2^CF). The word widths are this design's choice.
package dwt_pkg;

  localparam int DW = 24;  // sample word width
  localparam int FB = 8;   // fractional bits in a sample word
  localparam int CW = 16;  // coefficient word width
  localparam int CF = 13;  // fractional bits in a coefficient word

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;

  localparam coef_t COEF_A  = -16'sd5165;  // -0.630463
  localparam coef_t COEF_B  =  16'sd6093;  //  0.743750
  localparam coef_t COEF_C  = -16'sd5473;  // -0.668067
  localparam coef_t COEF_D  =  16'sd5230;  //  0.638443
  localparam coef_t COEF_K0 =  16'sd21223; //  2.590697
  localparam coef_t COEF_K1 =  16'sd15810; //  1.929981

  // Cycles from a pair entering the 1-D lifting core to its result leaving it.
  localparam int CORE_LAT = 7;

  // Right shifts applied to the neighbour sum of each lifting step.
  localparam int SH_P1 = 0;
  localparam int SH_U1 = 4;
  localparam int SH_P2 = 1;
  localparam int SH_U2 = 1;

  // One even/odd sample pair of a line travelling down the lifting pipeline.
  // first/last mark the first and last pair of a line (for symmetric
  // extension at the line ends).
  typedef struct packed {
    logic    v;
    logic    first;
    logic    last;
    sample_t s;   // even (low-pass) branch
    sample_t d;   // odd (high-pass) branch
  } pair_t;

  // Radix-2 Booth recoding of one multiplier bit pair {b[i], b[i-1]}.
  typedef enum logic [1:0] {
    BOOTH_NONE = 2'd0,  // 00 or 11: shift only
    BOOTH_ADD  = 2'd1,  // 01: end of a string of ones, add multiplicand
    BOOTH_SUB  = 2'd2   // 10: start of a string of ones, subtract multiplicand
  } booth_op_e;

endpackage
