// tb_nt_fpga_top: end-to-end test of the two-channel noise-thermometer
// filter at its default parameters (40 MS/s, 8-bit ADCs, decimation 64).
//
// Both channels are fed every clock, as from free-running ADCs, with
// different signals, and every output of each channel is compared (within
// 2 LSB) with an independent model of the chain (nt_ref_pkg::chain_ref).
// On top of that the test measures the filter specification:
//   - channel 0: a 100 kHz tone must come out with the pass-band gain
//     (16 x amplitude, -0.07 dB) and a 500 kHz tone, in the stop band,
//     at least 60 dB down;
//   - channel 1: a full-scale square wave must drive the half-band stages
//     into saturation, and a 250 kHz tone must pass;
// and counts how often each mechanism happened: outputs per channel (one
// per 64 samples, 4 clocks after sample 64j+15), CIC integrator
// wrap-arounds (tracked on a 64-bit copy of the last integrator) and
// saturated half-band outputs. A mechanism that never happened is a failure.
module tb_nt_fpga_top;
  import nt_filter_pkg::*;
  import nt_ref_pkg::*;

  localparam int  NS  = 120000;
  localparam int  LAT = 4;
  localparam real PI  = 3.141592653589793;
  localparam real FS  = 40.0e6;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    adc_valid = 1'b0;
  adc_t    adc_data  [2];
  logic    out_valid [2];
  sample_t out_data  [2];

  int       checks = 0, failures = 0;
  int       n_in = 0;
  int       n_out [2] = '{0, 0};
  int       n_wrap [2] = '{0, 0};
  longint   integ [2][3];
  int       expect_q [2][$];
  chain_ref model [2];
  int       pass0_peak = 0, pass1_peak = 0;
  int       stop0_max = -4096, stop0_min = 4096;

  nt_fpga_top dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    repeat (NS + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic adc_t tone(int n, real f, real amp);
    return adc_t'($rtoi($floor(amp * $sin(2.0 * PI * f * n / FS) + 0.5)));
  endfunction

  function automatic adc_t stim(int c, int n);
    if (c == 0) begin
      if (n < 48000)      return tone(n, 100.0e3, 120.0);
      else if (n < 96000) return tone(n, 500.0e3, 120.0);
      else                return adc_t'($urandom);
    end else begin
      if (n < 40000)      return ((n / 4000) % 2 == 0) ? 8'sd127 : -8'sd128;
      else if (n < 96000) return tone(n, 250.0e3, 100.0);
      else                return adc_t'($urandom);
    end
  endfunction

  // Expected outputs, their timing and the integrator wrap count.
  longint cycle = 0;
  longint due_q [$];
  always @(posedge clk) begin
    if (rst_n) begin
      bit due;
      due = (due_q.size() > 0) && (due_q[0] == cycle);
      if (due) void'(due_q.pop_front());
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (out_valid[c] !== due) begin
          failures++;
          $display("ch%0d timing mismatch at cycle %0d", c, cycle);
        end
        if (out_valid[c]) begin
          int e, d, v, k;
          checks++;
          v = int'(out_data[c]);
          k = n_out[c];
          e = (expect_q[c].size() > 0) ? expect_q[c].pop_front() : 99999;
          d = v - e;
          if (d > 2 || d < -2) begin
            failures++;
            if (failures < 10) $display("ch%0d out %0d: got %0d expected %0d", c, k, v, e);
          end
          if (c == 0 && k >= 200 && k < 740 && v > pass0_peak) pass0_peak = v;
          if (c == 0 && k >= 900 && k < 1490) begin
            if (v > stop0_max) stop0_max = v;
            if (v < stop0_min) stop0_min = v;
          end
          if (c == 1 && k >= 800 && k < 1490 && v > pass1_peak) pass1_peak = v;
          n_out[c]++;
        end
      end
      if (adc_valid) begin
        bit got;
        got = 1'b0;
        for (int c = 0; c < 2; c++) begin
          int y;
          longint hi_bits;
          if (model[c].step(int'(adc_data[c]), y)) begin
            expect_q[c].push_back(y);
            got = 1'b1;
          end
          hi_bits  = integ[c][2] >>> CIC_ACC_W;
          integ[c][0] += longint'(adc_data[c]);
          integ[c][1] += integ[c][0];
          integ[c][2] += integ[c][1];
          if ((integ[c][2] >>> CIC_ACC_W) != hi_bits) n_wrap[c]++;
        end
        if (got) due_q.push_back(cycle + longint'(LAT));
      end
      cycle++;
    end
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      model[c] = new();
      adc_data[c] = '0;
      for (int k = 0; k < 3; k++) integ[c][k] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (n_in = 0; n_in < NS; n_in++) begin
      @(negedge clk);
      adc_valid   = 1'b1;
      adc_data[0] = stim(0, n_in);
      adc_data[1] = stim(1, n_in);
    end
    @(negedge clk) adc_valid = 1'b0;
    repeat (6) @(posedge clk);

    $display("outputs: ch0 %0d ch1 %0d (expected %0d each)", n_out[0], n_out[1], NS / 64);
    $display("integrator wrap-arounds: ch0 %0d ch1 %0d", n_wrap[0], n_wrap[1]);
    $display("saturated half-band outputs: ch0 %0d ch1 %0d", model[0].sat_count, model[1].sat_count);
    $display("ch0 100 kHz peak %0d, 500 kHz swing %0d..%0d; ch1 250 kHz peak %0d",
             pass0_peak, stop0_min, stop0_max, pass1_peak);
    for (int c = 0; c < 2; c++) begin
      checks += 2;
      if (n_out[c] != NS / 64) begin failures++; $display("ch%0d output count wrong", c); end
      if (n_wrap[c] == 0) begin failures++; $display("ch%0d integrators never wrapped", c); end
    end
    checks += 4;
    if (model[1].sat_count == 0) begin failures++; $display("saturation never exercised"); end
    // 100 kHz: 120 * 16 * 10^(-0.0724/20) = 1904
    if (pass0_peak < 1885 || pass0_peak > 1923) begin failures++; $display("ch0 pass-band gain wrong"); end
    // 500 kHz: at least 60 dB below 1920, i.e. within +-2 LSB of the mean
    if (stop0_max - stop0_min > 4) begin failures++; $display("ch0 stop-band attenuation too low"); end
    // 250 kHz: 100 * 16 * 10^(-0.55/20) = 1502 (whole chain -0.55 dB)
    if (pass1_peak < 1480 || pass1_peak > 1525) begin failures++; $display("ch1 pass-band gain wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
