// hb_section: two-path IIR half-band low-pass filter at the full rate
// (no decimation), used as the first of the two cascaded sections of the
// second half-band stage.
//
// H(z) = 0.5 * [ A_a(z^2) + z^-1 A_b(z^2) ], A_c(z^2) = (c + z^-2)/(1 + c z^-2).
// Both branches see every input sample; branch b is fed through a one-sample
// delay. The all-pass sections therefore use D = 2.
//
// Interface: in_valid qualifies in_x; out_valid pulses the clock after each
// input sample with out_y (internal 24-bit half-band words). Latency one
// clock, output rate equal to the input rate.
// Running this section undecimated (and decimating only in the section after
// it) is a choice of this implementation: the cascade of two half-band
// filters is not itself a two-path polyphase filter.
module hb_section
  import nt_filter_pkg::*;
#(
  parameter coef_t COEF_A = H2_A0,
  parameter coef_t COEF_B = H2_B0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  hb_word_t in_x,
  output logic     out_valid,
  output hb_word_t out_y
);

  hb_word_t x_d1_q;     // z^-1 in front of branch b
  hb_word_t ya, yb;
  hb_word_t sum;

  hb_allpass #(.COEF(COEF_A), .DELAY(2)) u_ap_a (
    .clk, .rst_n, .en(in_valid), .x(in_x), .y(ya)
  );
  hb_allpass #(.COEF(COEF_B), .DELAY(2)) u_ap_b (
    .clk, .rst_n, .en(in_valid), .x(x_d1_q), .y(yb)
  );

  assign sum = ya + yb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_d1_q    <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_d1_q <= in_x;
        out_y  <= sum >>> 1;
      end
    end
  end

  // One output per input sample, one clock later.
  a_out_follows_in : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(in_valid));

endmodule
