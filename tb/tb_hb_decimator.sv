// tb_hb_decimator: self-checking test of the two-path polyphase half-band
// decimator with the first-stage coefficients (a = 0.125, b = 0.5625).
//
// The expected output is computed by running
// H(z) = 0.5*[A_a(z^2) + z^-1 A_b(z^2)] at the full input rate in double
// precision and keeping the outputs of the even input samples (0, 2, 4, ...),
// so the polyphase commutator of the RTL is checked against the plain
// transfer function. Tolerance: 32 internal LSBs (1/8 of a 12-bit sample
// LSB). The test also checks that out_valid follows every even accepted
// sample by exactly one clock and never appears otherwise, with random gaps
// in in_valid.
module tb_hb_decimator;
  import nt_filter_pkg::*;
  import nt_ref_pkg::*;

  localparam int  NS  = 6000;
  localparam real TOL = 32.0;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     in_valid = 1'b0;
  hb_word_t in_x = '0;
  logic     out_valid;
  hb_word_t out_y;

  int  checks = 0, failures = 0;
  int  n_acc = 0, n_out = 0;
  bit  expect_out = 1'b0;
  real expect_q [$];
  hb_ref model = new(0.125, 0.5625);

  hb_decimator #(.COEF_A(H1_A), .COEF_B(H1_B)) dut (.*);

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
      if (out_valid !== expect_out) begin
        failures++;
        $display("timing mismatch after sample %0d", n_acc);
      end
      if (out_valid) begin
        real e, d;
        checks++;
        e = (expect_q.size() > 0) ? expect_q.pop_front() : 1.0e9;
        d = real'(out_y) - e;
        if (d > TOL || d < -TOL) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d expected %f", n_out, out_y, e);
        end
        n_out++;
      end
      expect_out = 1'b0;
      if (in_valid) begin
        real r;
        r = model.step(real'(in_x));
        if (n_acc % 2 == 0) begin
          expect_q.push_back(r);
          expect_out = 1'b1;
        end
        n_acc++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NS; ) begin
      @(negedge clk);
      if ($urandom % 4 == 0) begin
        in_valid = 1'b0;
        in_x     = hb_word_t'($signed(20'($urandom)));
      end else begin
        in_valid = 1'b1;
        if ((n / 300) % 3 == 1) in_x = ((n / 25) % 2 == 0) ? to_hb(12'sd2047) : to_hb(-12'sd2048);
        else                    in_x = hb_word_t'($signed(20'($urandom)));
        n++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != NS / 2) begin
      failures++;
      $display("expected %0d outputs, got %0d", NS / 2, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
