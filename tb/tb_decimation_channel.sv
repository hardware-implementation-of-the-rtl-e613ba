// tb_decimation_channel: self-checking test of one complete decimation
// channel (CIC /16, HB1 /2, HB2 /2; 8-bit in, 12-bit out).
//
// Every output is compared with nt_ref_pkg::chain_ref: an exact integer CIC
// followed by double-precision half-band transfer functions, rounded and
// clamped to 12 bits between stages as in the hardware. The tolerance is
// 2 LSB, for rounding differences between the real and fixed-point models.
// Stimulus: random samples, full-scale square waves (saturating the
// half-band stages through their overshoot) and long full-scale DC runs
// (integrator wrap-around), with random gaps in in_valid. Timing: exactly
// one output per 64 accepted samples, seen 4 clocks after sample 64j+15.
module tb_decimation_channel;
  import nt_filter_pkg::*;
  import nt_ref_pkg::*;

  localparam int NS  = 64 * 400;
  localparam int LAT = 4;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  adc_t    in_data = '0;
  logic    out_valid;
  sample_t out_data;

  int     checks = 0, failures = 0;
  int     n_out = 0;
  longint cycle = 0;
  longint due_q [$];
  int     expect_q [$];
  chain_ref model = new();

  decimation_channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      bit due;
      due = (due_q.size() > 0) && (due_q[0] == cycle);
      if (due) void'(due_q.pop_front());
      checks++;
      if (out_valid !== due) begin
        failures++;
        $display("timing mismatch at cycle %0d", cycle);
      end
      if (out_valid) begin
        int e, d;
        checks++;
        e = (expect_q.size() > 0) ? expect_q.pop_front() : 99999;
        d = int'(out_data) - e;
        if (d > 2 || d < -2) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d expected %0d", n_out, out_data, e);
        end
        n_out++;
      end
      if (in_valid) begin
        int y;
        if (model.step(int'(in_data), y)) begin
          expect_q.push_back(y);
          due_q.push_back(cycle + longint'(LAT));
        end
      end
      cycle++;
    end
  end

  function automatic adc_t stim(int n);
    if (n < 6000)       return adc_t'($urandom);
    else if (n < 14000) return ((n / 1000) % 2 == 0) ? 8'sd127 : -8'sd128;
    else if (n < 20000) return -8'sd128;
    else                return adc_t'($urandom % 61) - 8'sd30;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NS; ) begin
      @(negedge clk);
      if ($urandom % 6 == 0) begin
        in_valid = 1'b0;
        in_data  = adc_t'($urandom);
      end else begin
        in_valid = 1'b1;
        in_data  = stim(n);
        n++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(posedge clk);
    checks += 2;
    if (n_out != NS / 64) begin failures++; $display("expected %0d outputs, got %0d", NS / 64, n_out); end
    if (model.sat_count == 0) begin failures++; $display("saturation never exercised"); end
    $display("channel: outputs %0d, saturated stage outputs %0d", n_out, model.sat_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
