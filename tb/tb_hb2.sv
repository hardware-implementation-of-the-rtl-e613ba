// tb_hb2: self-checking test of the first half-band stage (12-bit in and
// out, decimation by 2, a = 0.001b, b = 0.1001b).
//
// Expected outputs come from the double-precision transfer function
// H1(z) = 0.5*[(a + z^-2)/(1 + a z^-2) + z^-1 (b + z^-2)/(1 + b z^-2)]
// at the input rate, kept for the even input samples, rounded and clamped
// to 12 bits; the RTL may differ by one LSB. Stimulus: random samples,
// full-scale square waves (whose overshoot must be saturated, and is
// counted), and a low-frequency sine, whose amplitude must pass unchanged
// (pass-band gain), and a tone at 3/8 of the input rate, which the
// half-band response must attenuate. The output must follow every even
// accepted sample by two clocks.
module tb_hb2;
  import nt_filter_pkg::*;
  import nt_ref_pkg::*;

  localparam int NS = 8000;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  sample_t in_data = '0;
  logic    out_valid;
  sample_t out_data;

  int checks = 0, failures = 0;
  int n_acc = 0, n_out = 0, n_sat = 0;
  int pass_peak = 0, stop_peak = 0;
  bit expect_out = 1'b0;
  bit expect_out_d = 1'b0;
  int expect_q [$];
  hb_ref model_a = new(0.125, 0.5625);
  hb_ref model_b = new(0.28125, 0.75);

  hb2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== expect_out_d) begin
        failures++;
        $display("timing mismatch after sample %0d", n_acc);
      end
      if (out_valid) begin
        int e, d;
        checks++;
        e = (expect_q.size() > 0) ? expect_q.pop_front() : 99999;
        d = int'(out_data) - e;
        if (d > 1 || d < -1) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d expected %0d", n_out, out_data, e);
        end
        // amplitude of the sine segments, after the filter has settled
        if (n_out >= 2100 && n_out < 2500 && int'(out_data) > pass_peak) pass_peak = int'(out_data);
        if (n_out >= 2700 && n_out < 3000 && int'(out_data) > stop_peak) stop_peak = int'(out_data);
        n_out++;
      end
      expect_out_d = expect_out;
      expect_out = 1'b0;
      if (in_valid) begin
        real r;
        bit  clip;
        int  e;
        r = model_b.step(model_a.step(real'(in_data)));
        if (n_acc % 2 == 0) begin
          e = round_clamp12(r, clip);
          if (clip) n_sat++;
          expect_q.push_back(e);
          expect_out = 1'b1;
        end
        n_acc++;
      end
    end
  end

  function automatic sample_t stim(int n);
    real pi = 3.141592653589793;
    if (n < 2000)      return sample_t'($urandom);
    else if (n < 4000) return ((n / 40) % 2 == 0) ? 12'sd2047 : -12'sd2048;
    else if (n < 5000) return sample_t'($rtoi(1500.0 * $sin(2.0 * pi * n / 64.0)));
    else if (n < 6000) return sample_t'($rtoi(1500.0 * $sin(2.0 * pi * n * 3.0 / 8.0)));
    else               return sample_t'($urandom);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NS; ) begin
      @(negedge clk);
      if ($urandom % 3 == 0) begin
        in_valid = 1'b0;
        in_data  = sample_t'($urandom);
      end else begin
        in_valid = 1'b1;
        in_data  = stim(n);
        n++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks += 4;
    if (n_out != NS / 2) begin failures++; $display("expected %0d outputs, got %0d", NS / 2, n_out); end
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    // sine at fs/64: |H2| = 1 (to 1e-3 dB)
    if (pass_peak < 1480 || pass_peak > 1502) begin failures++; $display("pass-band peak %0d", pass_peak); end
    // tone at 3fs/8: |H2| = -79 dB -> below one LSB
    if (stop_peak > 2) begin failures++; $display("stop-band peak %0d", stop_peak); end
    $display("hb2: saturated outputs %0d, pass peak %0d, stop peak %0d", n_sat, pass_peak, stop_peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
