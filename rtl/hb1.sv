// hb1: first half-band stage, 2.5 MS/s in, 1.25 MS/s out.
//
// A fifth-order two-coefficient IIR half-band low-pass decimator,
// H1(z) = 0.5 * [ (a + z^-2)/(1 + a z^-2) + z^-1 (b + z^-2)/(1 + b z^-2) ],
// with a = 0.001b (0.125) and b = 0.1001b (0.5625). It improves the stop-band
// attenuation left by the CIC stage and halves the sample rate.
// The 12-bit input is widened to the internal half-band word, filtered by
// hb_decimator, and the result is rounded half-up and saturated back to
// 12 bits (the IIR impulse response overshoots, so a full-scale step can
// exceed full scale).
//
// Interface: in_valid/in_data at the CIC output rate; out_valid pulses the
// clock after every second input sample (the first after reset included).
// The coefficients and rates follow the filter design; the 12-bit output
// word and the rounding and saturation are choices of this implementation.
module hb1
  import nt_filter_pkg::*;
#(
  parameter coef_t COEF_A = H1_A,
  parameter coef_t COEF_B = H1_B
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);

  hb_word_t dec_y;

  hb_decimator #(.COEF_A(COEF_A), .COEF_B(COEF_B)) u_dec (
    .clk, .rst_n, .in_valid, .in_x(to_hb(in_data)), .out_valid, .out_y(dec_y)
  );

  assign out_data = round_sat(dec_y);

endmodule
