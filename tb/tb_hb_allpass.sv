// tb_hb_allpass: self-checking test of the second-order all-pass section.
//
// Two instances are driven with the same random input stream (including
// full-scale bursts): one with D=1 and coefficient 0.1001b as used in the
// polyphase decimators, one with D=2 and coefficient 0.11b as used at the
// full rate. Each output is compared with the double-precision recursion
// y[n] = x[n-D] + a*(x[n] - y[n-D]); the tolerance (16 internal LSBs, 1/16
// of a 12-bit sample LSB) covers the accumulated truncation of the
// coefficient products. Random gaps in en check that state only moves on
// enabled clocks.
module tb_hb_allpass;
  import nt_filter_pkg::*;
  import nt_ref_pkg::*;

  localparam int  NS  = 4000;
  localparam real TOL = 16.0;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     en = 1'b0;
  hb_word_t x = '0;
  hb_word_t y1, y2;

  int checks = 0, failures = 0;
  allpass_ref m1 = new(0.5625, 1);
  allpass_ref m2 = new(0.75, 2);

  hb_allpass #(.COEF(H1_B),  .DELAY(1)) dut1 (.clk, .rst_n, .en, .x, .y(y1));
  hb_allpass #(.COEF(H2_B1), .DELAY(2)) dut2 (.clk, .rst_n, .en, .x, .y(y2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string name, hb_word_t got, real exp);
    real d;
    d = real'(got) - exp;
    checks++;
    if (d > TOL || d < -TOL) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %f", name, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NS; ) begin
      @(negedge clk);
      if ($urandom % 4 == 0) begin
        en = 1'b0;
        x  = hb_word_t'($signed(20'($urandom)));
      end else begin
        real xr;
        en = 1'b1;
        if ((n / 200) % 3 == 1) x = ((n / 20) % 2 == 0) ? to_hb(12'sd2047) : to_hb(-12'sd2048);
        else                    x = hb_word_t'($signed(20'($urandom)));
        xr = real'(x);
        #1;
        compare("D=1", y1, m1.step(xr));
        compare("D=2", y2, m2.step(xr));
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
