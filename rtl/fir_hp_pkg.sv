// fir_hp_pkg: constants shared by the high-pass distributed-arithmetic FIR filter.
//
// The filter is an order-17 (18-tap) high-pass FIR designed with a Kaiser window
// for 8 MHz sampling and a 1.5 MHz cutoff. Its 16-bit coefficients are listed
// below as two's-complement integers; read as Q1.15 fractions they are the
// impulse response h(0)..h(17). They are antisymmetric, h(17-i) = -h(i), which
// makes this a type 4 FIR filter. Input samples are 16 bits and the output is
// kept at full precision in 33 bits. The coefficient values, the widths and the
// tap count come from the filter's specification; the typedefs are this
// design's own.
package fir_hp_pkg;

  localparam int TAPS   = 18;  // order 17
  localparam int IN_W   = 16;  // input data bit width
  localparam int COEF_W = 16;  // coefficient word length
  localparam int OUT_W  = 33;  // output data bit width
  localparam int NLUT   = 3;   // the DA table is split into three LUTs
  localparam int LUT_W  = 17;  // LUT word width (see rom_lut)

  typedef logic signed [IN_W-1:0]   sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [OUT_W-1:0]  result_t;

  localparam coef_t H [TAPS] = '{
    16'sh03cd, 16'sh045e, 16'shfece, 16'shf8d2, 16'shfafd, 16'sh067d,
    16'sh101f, 16'sh055d, 16'shbb54, 16'sh44ac, 16'shfaa3, 16'shefe1,
    16'shf983, 16'sh0503, 16'sh072e, 16'sh0132, 16'shfba2, 16'shfc33
  };

endpackage
