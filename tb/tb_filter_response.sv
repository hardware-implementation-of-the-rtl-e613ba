// tb_filter_response: frequency-response measurement of one decimation
// channel against the filter specification (pass band 300 kHz, stop band
// 400 kHz, 60 dB), at the default sizes.
//
// Tones of amplitude 120 (8-bit ADC) are applied one after another at
// 40 MS/s. For each tone the 625 kS/s output is correlated with a complex
// exponential at the tone frequency, taken at the output sample instants,
// which gives the output amplitude even when the tone aliases. The
// expected amplitude is 16 * 120 * |H(f)|, with H the product of the CIC
// response ((1 - z^-16)/(1 - z^-1))^3 / 4096 and the two half-band transfer
// functions (H1 at 2.5 MS/s, H2 at 1.25 MS/s), evaluated here in double
// precision. Pass-band tones must match within 0.5 % + 2 LSB; stop-band
// tones must stay below the expected amplitude + 2 LSB. The measured
// attenuation of every tone is printed.
module tb_filter_response;
  import nt_filter_pkg::*;

  localparam real PI     = 3.141592653589793;
  localparam real FS     = 40.0e6;
  localparam real AMP    = 120.0;
  localparam int  SEG    = 64 * 1100;  // samples per tone
  localparam int  SETTLE = 100;        // outputs skipped per tone
  localparam int  NT     = 8;

  real freq   [NT] = '{100.0e3, 200.0e3, 250.0e3, 300.0e3, 400.0e3, 500.0e3, 1.0e6, 2.209e6};
  bit  inband [NT] = '{1, 1, 1, 1, 0, 0, 0, 0};

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  adc_t    in_data = '0;
  logic    out_valid;
  sample_t out_data;

  int     checks = 0, failures = 0;
  int     tone_i = 0;
  int     n_in = 0;
  int     k_out = 0;
  longint last_sample = 0;
  real    acc_re = 0.0, acc_im = 0.0, acc_n = 0.0, acc_dc = 0.0;

  decimation_channel dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    repeat (NT * SEG + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference response -----------------------------------------------
  typedef struct { real re; real im; } cplx_t;

  function automatic cplx_t cmul(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re * b.re - a.im * b.im;
    r.im = a.re * b.im + a.im * b.re;
    return r;
  endfunction

  function automatic cplx_t cdiv(cplx_t a, cplx_t b);
    cplx_t r;
    real   d;
    d = b.re * b.re + b.im * b.im;
    r.re = (a.re * b.re + a.im * b.im) / d;
    r.im = (a.im * b.re - a.re * b.im) / d;
    return r;
  endfunction

  function automatic cplx_t zpow(real w, int k);   // z^-k at angle w
    cplx_t r;
    r.re = $cos(w * k);
    r.im = -$sin(w * k);
    return r;
  endfunction

  // 0.5*[(a + z^-2)/(1 + a z^-2) + z^-1 (b + z^-2)/(1 + b z^-2)] at angle w
  function automatic cplx_t hb(real w, real a, real b);
    cplx_t z2, z1, na, da, nb, db, r, pa, pb;
    z2 = zpow(w, 2);
    z1 = zpow(w, 1);
    na.re = a + z2.re;       na.im = z2.im;
    da.re = 1.0 + a * z2.re; da.im = a * z2.im;
    nb.re = b + z2.re;       nb.im = z2.im;
    db.re = 1.0 + b * z2.re; db.im = b * z2.im;
    pa = cdiv(na, da);
    pb = cmul(z1, cdiv(nb, db));
    r.re = 0.5 * (pa.re + pb.re);
    r.im = 0.5 * (pa.im + pb.im);
    return r;
  endfunction

  function automatic real mag(cplx_t c);
    return $sqrt(c.re * c.re + c.im * c.im);
  endfunction

  function automatic real chain_gain(real f);
    real w, cic;
    w = 2.0 * PI * f / FS;
    // |sin(16 w/2) / sin(w/2)|^3 / 16^3
    if ($sin(w / 2.0) == 0.0) cic = 1.0;
    else cic = $pow($sin(8.0 * w) / (16.0 * $sin(w / 2.0)), 3.0);
    if (cic < 0.0) cic = -cic;
    return cic * mag(hb(16.0 * w, 0.125, 0.5625))
               * mag(hb(32.0 * w, 0.125, 0.5625)) * mag(hb(32.0 * w, 0.28125, 0.75));
  endfunction

  // ---- measurement -----------------------------------------------------------
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid) last_sample = longint'(n_in);
      if (out_valid) begin
        if (k_out >= SETTLE) begin
          real ph;
          // output belongs to the sample 64j+15, taken 4 clocks earlier
          ph = 2.0 * PI * freq[tone_i] * real'(last_sample - 3) / FS;
          acc_re += real'(out_data) * $cos(ph);
          acc_im += real'(out_data) * $sin(ph);
          acc_dc += real'(out_data);
          acc_n  += 1.0;
        end
        k_out++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < NT; t++) begin
      real got, exp_a, db;
      tone_i = t;
      k_out  = 0;
      acc_re = 0.0; acc_im = 0.0; acc_n = 0.0; acc_dc = 0.0;
      for (int n = 0; n < SEG; n++) begin
        @(negedge clk);
        in_valid = 1'b1;
        n_in     = t * SEG + n;
        in_data  = adc_t'($rtoi($floor(AMP * $sin(2.0 * PI * freq[t] * real'(n_in) / FS) + 0.5)));
      end
      @(negedge clk) in_valid = 1'b0;
      repeat (6) @(posedge clk);
      got   = 2.0 * $sqrt(acc_re * acc_re + acc_im * acc_im) / acc_n;
      exp_a = 16.0 * AMP * chain_gain(freq[t]);
      db    = 20.0 * $log10((got + 1.0e-9) / (16.0 * AMP));
      $display("f = %9.1f Hz: amplitude %8.2f LSB (%7.2f dB), expected %8.2f LSB (%7.2f dB)",
               freq[t], got, db, exp_a, 20.0 * $log10(exp_a / (16.0 * AMP) + 1.0e-12));
      checks++;
      if (inband[t]) begin
        if (got > exp_a * 1.005 + 2.0 || got < exp_a * 0.995 - 2.0) begin
          failures++;
          $display("  pass-band amplitude out of tolerance");
        end
      end else begin
        if (got > exp_a + 2.0) begin
          failures++;
          $display("  stop-band amplitude too high");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
