// nt_filter_pkg: word widths, fixed-point types, half-band coefficients and
// arithmetic helpers shared by the stages of the noise-thermometer decimation
// filter (CIC /16, half-band /2, half-band /2; 40 MHz in, 625 kHz out).
//
// Numbers that come from the filter specification: 8-bit input, third-order
// CIC with R=16 and M=1, 20-bit CIC registers, 12-bit stage outputs, and the
// half-band branch coefficients (0.001b, 0.1001b, 0.01001b, 0.11b).
// Design choices of this implementation: the half-band stages compute in a
// 24-bit word (4 guard bits above the 12-bit sample, 8 fraction bits below
// it), coefficients are held as 8-bit unsigned fractions, products are
// truncated toward minus infinity, and each half-band stage output is
// rounded half-up and saturated back to 12 bits.
package nt_filter_pkg;

  // ---- CIC stage --------------------------------------------------------
  localparam int unsigned ADC_W     = 8;   // B_in
  localparam int unsigned CIC_N     = 3;   // number of integrator/comb stages
  localparam int unsigned CIC_R     = 16;  // decimation factor
  localparam int unsigned CIC_M     = 1;   // differential delay
  localparam int unsigned CIC_ACC_W = 20;  // B_out = B_in + N*log2(R*M)
  localparam int unsigned SAMPLE_W  = 12;  // word between stages

  // ---- half-band stages -------------------------------------------------
  localparam int unsigned COEF_FRAC  = 8;  // fraction bits of a coefficient
  localparam int unsigned HB_GUARD_W = 4;  // headroom above full scale
  localparam int unsigned HB_FRAC_W  = 8;  // bits kept below the sample LSB
  localparam int unsigned HB_W       = SAMPLE_W + HB_GUARD_W + HB_FRAC_W;

  typedef logic signed [ADC_W-1:0]    adc_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [HB_W-1:0]     hb_word_t;
  typedef logic [COEF_FRAC-1:0]       coef_t;   // value = coef / 2**COEF_FRAC

  // Branch coefficients of the two-coefficient half-band filters.
  localparam coef_t H1_A  = 8'b0010_0000;  // 0.001b   = 0.125
  localparam coef_t H1_B  = 8'b1001_0000;  // 0.1001b  = 0.5625
  localparam coef_t H2_A0 = 8'b0010_0000;  // 0.001b   = 0.125
  localparam coef_t H2_B0 = 8'b1001_0000;  // 0.1001b  = 0.5625
  localparam coef_t H2_A1 = 8'b0100_1000;  // 0.01001b = 0.28125
  localparam coef_t H2_B1 = 8'b1100_0000;  // 0.11b    = 0.75

  // Multiplier-free product x*c: one shifted copy of x per one-bit of c,
  // summed at full precision and truncated (floor) to the word grid.
  function automatic hb_word_t coef_mult(input hb_word_t x, input coef_t c);
    logic signed [HB_W+COEF_FRAC-1:0] xe;
    logic signed [HB_W+COEF_FRAC-1:0] acc;
    xe  = (HB_W+COEF_FRAC)'(x);
    acc = '0;
    for (int i = 0; i < int'(COEF_FRAC); i++) begin
      if (c[i]) acc = acc + (xe <<< i);
    end
    return hb_word_t'(acc >>> COEF_FRAC);
  endfunction

  // 12-bit sample to the internal half-band word.
  function automatic hb_word_t to_hb(input sample_t s);
    hb_word_t w;
    w = HB_W'(s);
    return w <<< HB_FRAC_W;
  endfunction

  // Internal half-band word back to a 12-bit sample: round half up, saturate.
  function automatic sample_t round_sat(input hb_word_t w);
    logic signed [HB_W:0] r;
    logic signed [HB_W:0] max_v;
    logic signed [HB_W:0] min_v;
    max_v = (HB_W+1)'((1 <<< (SAMPLE_W-1)) - 1);
    min_v = -max_v - 1;
    r = ((HB_W+1)'(w) + (HB_W+1)'(1 <<< (HB_FRAC_W-1))) >>> HB_FRAC_W;
    if (r > max_v)      return sample_t'(max_v);
    else if (r < min_v) return sample_t'(min_v);
    else                return sample_t'(r);
  endfunction

  // True when round_sat() had to clip its argument.
  function automatic logic would_saturate(input hb_word_t w);
    logic signed [HB_W:0] r;
    r = ((HB_W+1)'(w) + (HB_W+1)'(1 <<< (HB_FRAC_W-1))) >>> HB_FRAC_W;
    return (r > (HB_W+1)'((1 <<< (SAMPLE_W-1)) - 1)) ||
           (r < -(HB_W+1)'(1 <<< (SAMPLE_W-1)));
  endfunction

endpackage
