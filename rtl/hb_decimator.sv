// hb_decimator: two-path polyphase IIR half-band low-pass filter that
// decimates by two.
//
// H(z) = 0.5 * [ A_a(z^2) + z^-1 A_b(z^2) ], A_c(z) = (c + z^-1)/(1 + c z^-1)
// at the low rate. A commutator sends the input samples alternately to the
// two branches: the first sample after reset and every second one after it
// ("even" samples x[2m]) go to branch a, the others (x[2m+1]) to branch b.
// Each branch is one hb_allpass with D = 1 clocked only by its own samples,
// so both all-pass sections run at half the input rate. When an even sample
// arrives the stage emits y[m] = (A_a{x[2m]} + A_b{x[2m-1]}) / 2, using the
// last branch-b output, which is held in a register.
//
// Interface: in_valid qualifies in_x; out_valid pulses the clock after every
// even input sample, with out_y (internal 24-bit half-band words of
// nt_filter_pkg). Latency one clock; output rate half the input rate.
// The two-path structure and the coefficients come from the filter design;
// the branch assignment of the first sample, the word format and the
// truncating halving are choices of this implementation.
module hb_decimator
  import nt_filter_pkg::*;
#(
  parameter coef_t COEF_A = H1_A,
  parameter coef_t COEF_B = H1_B
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  hb_word_t in_x,
  output logic     out_valid,
  output hb_word_t out_y
);

  logic     odd_q;      // next sample goes to branch b
  hb_word_t ya, yb;
  hb_word_t yb_q;       // latest branch-b output
  hb_word_t sum;

  hb_allpass #(.COEF(COEF_A), .DELAY(1)) u_ap_a (
    .clk, .rst_n, .en(in_valid && !odd_q), .x(in_x), .y(ya)
  );
  hb_allpass #(.COEF(COEF_B), .DELAY(1)) u_ap_b (
    .clk, .rst_n, .en(in_valid && odd_q), .x(in_x), .y(yb)
  );

  assign sum = ya + yb_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      odd_q     <= 1'b0;
      yb_q      <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        odd_q <= !odd_q;
        if (odd_q) begin
          yb_q <= yb;
        end else begin
          out_y     <= sum >>> 1;
          out_valid <= 1'b1;
        end
      end
    end
  end

  // Outputs follow even input samples only, so never on two clocks in a row.
  a_out_after_even : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> ($past(in_valid) && !$past(odd_q)));
  a_out_not_twice : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |=> !out_valid);

endmodule
