// ica_pkg: shared widths, fixed-point formats and constants of the
// 4-channel Infomax ICA processor and of the brain-heart monitoring chip.
//
// Fixed-point formats (value = integer / 2^FRAC):
//   raw EEG sample     10-bit unsigned integer (ADC code 0..1023)
//   channel mean       Q10.6 unsigned, 16 bits  (sum of 64 samples >> 6 keeps 6 fraction bits)
//   centered sample    Q10.6 signed,   17 bits
//   covariance         Q.6   signed,   32 bits
//   whitened data z, u Q7.8  signed,   16 bits  (matches the u[15:0] bit use of the lookup unit)
//   unmixing W         Q3.12 signed,   16 bits
//   f(u) = 1 - 2g(u)   Q1.14 signed,   16 bits
//   T accumulator      Q.16  signed,   32 bits
//   whitening P        Q.24  signed,   32 bits
//   eigenvectors E     Q.28  signed,   32 bits
// The document fixes the 16-bit multipliers, 32-bit adders, the 10-bit input
// and the 16-bit output; the fraction positions are this design's choice.
package ica_pkg;

  localparam int unsigned NCH      = 4;    // channels
  localparam int unsigned ADC_W    = 10;   // EEG_IN[9:0]
  localparam int unsigned HALF_WIN = 32;   // half-window, samples per bank
  localparam int unsigned WIN      = 64;   // window size
  localparam int unsigned NBANK    = 3;    // IBU banks
  localparam int unsigned MAX_ITER = 512;  // lim_ite_num

  localparam int unsigned DW       = 16;   // data word of multipliers, z, u, W, output
  localparam int unsigned AW       = 32;   // adder width
  localparam int unsigned W_FRAC   = 12;
  localparam int unsigned Z_FRAC   = 8;
  localparam int unsigned F_FRAC   = 14;
  localparam int unsigned T_FRAC   = 16;
  localparam int unsigned P_FRAC   = 24;
  localparam int unsigned M_FRAC   = 6;
  localparam int unsigned E_FRAC   = 28;

  // Learning rate 7.4768e-4 as Q.24: round(7.4768e-4 * 2^24) = 12544.
  localparam logic signed [DW-1:0] R_LEARN_Q24 = 16'sd12544;

  typedef logic        [ADC_W-1:0] sample_t;
  typedef sample_t     [NCH-1:0]   sample4_t;     // one sample of each channel
  typedef logic signed [DW-1:0]    word_t;
  typedef word_t       [NCH-1:0]   vec4_t;
  typedef vec4_t       [NCH-1:0]   mat4_t;        // [row][col]
  typedef logic signed [AW-1:0]    acc_t;
  typedef acc_t        [NCH-1:0]   accvec4_t;
  typedef accvec4_t    [NCH-1:0]   accmat4_t;
  typedef logic        [15:0]      mean_t;        // Q10.6 unsigned
  typedef mean_t       [NCH-1:0]   mean4_t;
  typedef logic signed [16:0]      xzm_t;         // Q10.6 signed
  typedef xzm_t        [NCH-1:0]   xzm4_t;

  // Saturate a wide signed value to a 16-bit word.
  function automatic word_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7fff;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return word_t'(v);
  endfunction

  // Saturate a wide signed value to a 32-bit word.
  function automatic acc_t sat32(input logic signed [63:0] v);
    if (v > 64'sd2147483647)       return 32'sh7fffffff;
    else if (v < -64'sd2147483648) return 32'sh80000000;
    else                           return acc_t'(v);
  endfunction

endpackage
