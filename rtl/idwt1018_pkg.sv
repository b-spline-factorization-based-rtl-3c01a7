// idwt1018_pkg -- constants shared by the B-spline factorized inverse DWT of
// the (10,18) wavelet filter bank.
//
// The synthesis filters of the (10,18) bank factor into a B-spline part and a
// short symmetric "distributed" part:
//   Ht(z) = (1+z^-1)^9 / 8 * Q(z),  Q(z) = v1 + v2 z^-1 + v3 z^-2 + v4 z^-3 + v5 z^-4
//                                         + v4 z^-5 + v3 z^-6 + v2 z^-7 + v1 z^-8
//   Gt(z) = (1-z^-1)^5 / 4 * R(z),  R(z) = z^-4 (v6 + v7 z^-1 + v8 z^-2 + v7 z^-3 + v6 z^-4)
// The real values of v1..v8 and the two B-spline orders come from the
// published factorization. The fixed-point format (a signed word with CFRAC
// fractional bits, rounded to nearest) is this design's choice; quant() does
// the conversion at elaboration time, so no table is stored anywhere.
package idwt1018_pkg;

  // Distributed-part coefficients of the (10,18) synthesis bank.
  localparam real V1 =  0.0076535;
  localparam real V2 = -0.0687398;
  localparam real V3 =  0.2681664;
  localparam real V4 = -0.6004576;
  localparam real V5 =  0.808888;
  localparam real V6 = -0.1154104;
  localparam real V7 = -0.57672;
  localparam real V8 = -1.0994;

  // Orders of the two B-spline parts and the power-of-two denominators that
  // are realised as right shifts inside the B-spline chains.
  localparam int GAMMA_H = 9;   // (1+z^-1)^9
  localparam int GAMMA_G = 5;   // (1-z^-1)^5
  localparam int DEN_H_LOG2 = 3; // divide by 8
  localparam int DEN_G_LOG2 = 2; // divide by 4

  // How the four polyphase filters of the distributed part are built.
  //   FIR_SERIAL   : transposed form, one register per tap, Tm+Ta per filter
  //   FIR_PARALLEL : direct form, one delay line shared by the even and odd
  //                  filter of a channel, pre-adders for the symmetric taps
  typedef enum logic {
    FIR_SERIAL   = 1'b0,
    FIR_PARALLEL = 1'b1
  } fir_style_e;

  // Real coefficient -> signed fixed point with `frac` fractional bits,
  // rounded to nearest.
  function automatic int quant(real v, int frac);
    return int'(v * (2.0 ** frac));
  endfunction

endpackage
