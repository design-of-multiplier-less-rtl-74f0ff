// Shared sizes, coefficients and LUT-content function for the 32-tap
// bit-serial distributed-arithmetic (DA) low-pass FIR filter.
//
// Number formats: input samples, coefficients and output samples are all
// signed 16-bit Q1.15 words. A tap group of LUT_IN taps shares one LUT whose
// 2**LUT_IN entries hold every partial sum of the group's coefficients, so a
// LUT word needs clog2(LUT_IN) bits more than a coefficient.
//
// The 32 taps, 16-bit input/output words and the 4-input partition follow the
// filter as described (32 taps, 16-bit hexadecimal samples, an eight-tap
// example built from two 4-input LUTs). The coefficient values are this
// design's own: an equiripple 32-tap low-pass with pass band 0-9.6 kHz and
// stop band 12-24 kHz at 48 kHz sampling, quantised to Q1.15 and scaled so
// their sum is 34484/32768 (DC gain 1.0524). With that gain a constant input
// of 1234h settles to 1328h and a constant F234h settles to F17Bh.
package fir_da_pkg;

  localparam int unsigned NTAPS   = 32;  // filter length
  localparam int unsigned XW      = 16;  // input sample width (Q1.15)
  localparam int unsigned CW      = 16;  // coefficient width (Q1.15)
  localparam int unsigned YW      = 16;  // output sample width (Q1.15)
  localparam int unsigned LUT_IN  = 4;   // taps per LUT (address bits)
  localparam int unsigned NGROUPS = NTAPS / LUT_IN;
  localparam int unsigned LUT_W   = CW + $clog2(LUT_IN);  // LUT word width
  localparam int unsigned ACC_W   = LUT_W + XW;           // accumulator width
  localparam int unsigned SUM_W   = ACC_W + $clog2(NGROUPS); // final sum width
  localparam int unsigned FRAC    = 15;  // fractional bits of x and of h

  typedef logic signed [XW-1:0]    sample_t;
  typedef logic signed [CW-1:0]    coef_t;
  typedef logic signed [LUT_W-1:0] lut_word_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [SUM_W-1:0] sum_t;

  typedef coef_t coef_array_t [NTAPS];

  // Tap 0 multiplies the newest sample. The set is symmetric (linear phase).
  localparam coef_array_t COEFS = '{
      16'sd272,   16'sd74,    -16'sd559,  -16'sd937,
     -16'sd312,   16'sd645,    16'sd439,  -16'sd833,
     -16'sd1063,  16'sd675,    16'sd1868, -16'sd166,
     -16'sd3201, -16'sd1415,   16'sd6810,  16'sd14945,
      16'sd14945, 16'sd6810,  -16'sd1415, -16'sd3201,
     -16'sd166,   16'sd1868,   16'sd675,  -16'sd1063,
     -16'sd833,   16'sd439,    16'sd645,  -16'sd312,
     -16'sd937,  -16'sd559,    16'sd74,    16'sd272
  };

  // LUT entry for one address: the sum of the coefficients whose address bit
  // is set. Address bit j selects coefficient c[j].
  function automatic lut_word_t lut_entry(input coef_t c [LUT_IN],
                                          input int unsigned addr);
    lut_word_t s;
    s = '0;
    for (int unsigned j = 0; j < LUT_IN; j++)
      if (addr[j]) s += lut_word_t'(c[j]);
    return s;
  endfunction

endpackage
