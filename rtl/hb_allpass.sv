// hb_allpass: second-order all-pass section of a two-path half-band filter.
//
// A(z) = (a + z^-D) / (1 + a z^-D), computed with a single coefficient
// product per sample:   y[n] = x[n-D] + a * (x[n] - y[n-D]).
// The coefficient is a constant with few one-bits, so the product is a
// handful of shifted additions (nt_filter_pkg::coef_mult), not a multiplier.
// D = 1 is the form used inside a polyphase decimator, where the all-pass in
// z^2 runs at the low rate; D = 2 is the form used at the full rate.
//
// Interface: y is combinational from x and the stored state; when en is high
// the clock edge shifts x and y into the D-deep delay lines. Words are the
// 24-bit internal half-band format of nt_filter_pkg.
// The structure (one multiplier, input and output delay lines) is the usual
// realisation of this all-pass; the word format, truncation of the product
// and synchronous reset to zero are choices of this implementation.
module hb_allpass
  import nt_filter_pkg::*;
#(
  parameter coef_t       COEF  = H1_A,
  parameter int unsigned DELAY = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  hb_word_t x,
  output hb_word_t y
);

  hb_word_t xd_q [DELAY];
  hb_word_t yd_q [DELAY];

  assign y = xd_q[DELAY-1] + coef_mult(x - yd_q[DELAY-1], COEF);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DELAY); i++) begin
        xd_q[i] <= '0;
        yd_q[i] <= '0;
      end
    end else if (en) begin
      for (int i = int'(DELAY) - 1; i > 0; i--) begin
        xd_q[i] <= xd_q[i-1];
        yd_q[i] <= yd_q[i-1];
      end
      xd_q[0] <= x;
      yd_q[0] <= y;
    end
  end

endmodule
