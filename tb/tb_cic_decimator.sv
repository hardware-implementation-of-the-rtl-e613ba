// tb_cic_decimator: self-checking test of the third-order CIC decimator
// (R=16, M=1, 8-bit in, 20-bit registers, 12-bit out).
//
// Stimulus: full-scale positive and negative DC runs (which drive the
// integrators through many wrap-arounds), a full-scale square wave and
// random samples, with random one-clock gaps in in_valid. Every output is
// compared with a direct 46-tap FIR convolution of the input truncated to
// 12 bits (nt_ref_pkg::cic_ref). The test also checks that exactly one
// output appears per 16 accepted samples, one clock after the 16th.
module tb_cic_decimator;
  import nt_ref_pkg::*;

  localparam int NS = 6000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid = 1'b0;
  logic signed [7:0] in_data = '0;
  logic              out_valid;
  logic signed [11:0] out_data;

  int checks = 0, failures = 0;
  int n_acc = 0, n_out = 0;
  bit expect_out = 1'b0;
  int expect_q [$];
  cic_ref model = new();

  cic_decimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: model the accepted samples, check every output and its timing.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== expect_out) begin
        failures++;
        $display("timing mismatch at sample %0d: out_valid=%0b", n_acc, out_valid);
      end
      if (out_valid) begin
        checks++;
        if (expect_q.size() == 0) begin
          failures++;
        end else begin
          int e;
          e = expect_q.pop_front();
          if (int'(out_data) != e) begin
            failures++;
            if (failures < 10) $display("out %0d: got %0d expected %0d", n_out, out_data, e);
          end
        end
        n_out++;
      end
      expect_out = 1'b0;
      if (in_valid) begin
        longint full;
        full = model.step(int'(in_data));
        if (n_acc % 16 == 15) begin
          expect_q.push_back(int'(full >>> 8));
          expect_out = 1'b1;
        end
        n_acc++;
      end
    end
  end

  function automatic logic signed [7:0] stim(int n);
    if (n < 1000)      return 8'sd127;
    else if (n < 2000) return -8'sd128;
    else if (n < 3500) return ((n / 80) % 2 == 0) ? 8'sd127 : -8'sd128;
    else               return 8'($urandom);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NS; ) begin
      @(negedge clk);
      if (n > 300 && ($urandom % 5 == 0)) begin
        in_valid = 1'b0;
        in_data  = 8'($urandom);
      end else begin
        in_valid = 1'b1;
        in_data  = stim(n);
        n++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != NS / 16) begin
      failures++;
      $display("expected %0d outputs, got %0d", NS / 16, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
