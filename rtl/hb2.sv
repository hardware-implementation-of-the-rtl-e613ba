// hb2: second half-band stage, 1.25 MS/s in, 625 kS/s out.
//
// Two two-coefficient half-band filters in cascade give the sharp final
// transition band:
//   H2(z) = H(z; a0, b0) * H(z; a1, b1),
//   H(z; a, b) = 0.5 * [ (a + z^-2)/(1 + a z^-2) + z^-1 (b + z^-2)/(1 + b z^-2) ]
// with a0 = 0.001b, b0 = 0.1001b, a1 = 0.01001b, b1 = 0.11b.
// The first section (hb_section) runs at the input rate; the second is a
// polyphase two-path decimator (hb_decimator) and halves the rate. The two
// sections are joined at the full internal word width; only the stage
// output is rounded half-up and saturated to 12 bits.
//
// Interface: in_valid/in_data at 1.25 MS/s; out_valid pulses once per two
// input samples, two clocks after the first of each pair (the first sample
// after reset included).
// The transfer function, coefficients and rates follow the filter design;
// the order of the two sections, the choice of which one decimates, and the
// word format are choices of this implementation.
module hb2
  import nt_filter_pkg::*;
#(
  parameter coef_t COEF_A0 = H2_A0,
  parameter coef_t COEF_B0 = H2_B0,
  parameter coef_t COEF_A1 = H2_A1,
  parameter coef_t COEF_B1 = H2_B1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);

  logic     sec_valid;
  hb_word_t sec_y;
  hb_word_t dec_y;

  hb_section #(.COEF_A(COEF_A0), .COEF_B(COEF_B0)) u_sec (
    .clk, .rst_n, .in_valid, .in_x(to_hb(in_data)),
    .out_valid(sec_valid), .out_y(sec_y)
  );

  hb_decimator #(.COEF_A(COEF_A1), .COEF_B(COEF_B1)) u_dec (
    .clk, .rst_n, .in_valid(sec_valid), .in_x(sec_y),
    .out_valid, .out_y(dec_y)
  );

  assign out_data = round_sat(dec_y);

endmodule
