// nt_ref_pkg: floating-point and exact-integer reference models of the
// decimation filter stages, used by the testbenches to compute expected
// outputs independently of the RTL.
//
// The half-band models evaluate the transfer functions at the full input
// rate as plain difference equations in double precision,
//   A(z)  = (a + z^-D)/(1 + a z^-D):   y[n] = x[n-D] + a*(x[n] - y[n-D])
//   H(z)  = 0.5*[A_a(z^2) + z^-1 A_b(z^2)]
// and the testbench keeps every second output, so they share nothing with
// the polyphase structure of the RTL. The CIC model is a direct FIR
// convolution with the 46 taps of ((1 - z^-16)/(1 - z^-1))^3 in 64-bit
// integers, followed by the same truncation to 12 bits as the hardware.
package nt_ref_pkg;

  localparam int CIC_TAPS = 3 * 15 + 1;

  // Real all-pass section with delay D (1 or 2).
  class allpass_ref;
    real a;
    int  d;
    real xh [2];
    real yh [2];
    function new(real a_in, int d_in);
      a = a_in; d = d_in;
      xh[0] = 0.0; xh[1] = 0.0; yh[0] = 0.0; yh[1] = 0.0;
    endfunction
    function real step(real x);
      real y;
      y = xh[d-1] + a * (x - yh[d-1]);
      xh[1] = xh[0]; yh[1] = yh[0];
      xh[0] = x;     yh[0] = y;
      return y;
    endfunction
  endclass

  // Real two-path half-band filter at its full (input) rate.
  class hb_ref;
    allpass_ref pa, pb;
    real        xprev;
    function new(real a, real b);
      pa = new(a, 2);
      pb = new(b, 2);
      xprev = 0.0;
    endfunction
    function real step(real x);
      real y;
      y = 0.5 * (pa.step(x) + pb.step(xprev));
      xprev = x;
      return y;
    endfunction
  endclass

  // Exact CIC (N=3, R=16, M=1) as a FIR filter.
  class cic_ref;
    longint h    [CIC_TAPS];
    longint hist [CIC_TAPS];
    function new();
      longint box [16];
      longint t2 [31];
      foreach (box[i]) box[i] = 1;
      foreach (t2[i]) t2[i] = 0;
      foreach (h[i]) begin h[i] = 0; hist[i] = 0; end
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) t2[i+j] += box[i] * box[j];
      for (int i = 0; i < 31; i++)
        for (int j = 0; j < 16; j++) h[i+j] += t2[i] * box[j];
    endfunction
    // Push one input sample, return the full-precision filter output.
    function longint step(int x);
      longint acc;
      for (int i = CIC_TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'(x);
      acc = 0;
      for (int i = 0; i < CIC_TAPS; i++) acc += h[i] * hist[i];
      return acc;
    endfunction
  endclass

  function automatic int round_clamp12(real v, output bit clipped);
    int r;
    r = $rtoi($floor(v + 0.5));
    clipped = 1'b0;
    if (r > 2047)  begin r = 2047;  clipped = 1'b1; end
    if (r < -2048) begin r = -2048; clipped = 1'b1; end
    return r;
  endfunction

  // Whole channel: CIC /16 -> H1 /2 -> H2 /2, 12-bit words between stages.
  class chain_ref;
    cic_ref cic;
    hb_ref  h1, h2a, h2b;
    longint n_in;
    longint n_cic;
    longint n_hb1;
    int     sat_count;
    function new();
      cic = new();
      h1  = new(0.125, 0.5625);
      h2a = new(0.125, 0.5625);
      h2b = new(0.28125, 0.75);
      n_in = 0; n_cic = 0; n_hb1 = 0; sat_count = 0;
    endfunction
    // Push one ADC sample; returns 1 and the expected output when the
    // channel produces one.
    function bit step(int x, output int y);
      longint full;
      int     c, o1;
      real    r1, r2;
      bit     clip;
      bit     got;
      got = 1'b0;
      y = 0;
      full = cic.step(x);
      if (n_in % 16 == 15) begin
        c  = int'(full >>> 8);
        r1 = h1.step(real'(c));
        if (n_cic % 2 == 0) begin
          o1 = round_clamp12(r1, clip);
          if (clip) sat_count++;
          r2 = h2b.step(h2a.step(real'(o1)));
          if (n_hb1 % 2 == 0) begin
            y = round_clamp12(r2, clip);
            if (clip) sat_count++;
            got = 1'b1;
          end
          n_hb1++;
        end
        n_cic++;
      end
      n_in++;
      return got;
    endfunction
  endclass

endpackage
