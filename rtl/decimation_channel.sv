// decimation_channel: one complete multirate low-pass decimation filter,
// 40 MS/s 8-bit ADC samples in, 625 kS/s 12-bit samples out (decimation 64).
//
//   cic_decimator (N=3, R=16, M=1)  40 MS/s  -> 2.5 MS/s
//   hb1  (two-coefficient half-band) 2.5 MS/s -> 1.25 MS/s
//   hb2  (two cascaded half-bands)   1.25 MS/s -> 625 kS/s
//
// The multiplier-free CIC takes the large first decimation; the half-band IIR
// stages then shape the pass band (300 kHz) and stop band (400 kHz, 60 dB).
// The DC gain of the chain is 16: a full-scale 8-bit input maps to a
// full-scale 12-bit output.
//
// Interface: in_valid/in_data from the ADC (one sample per clock at most);
// out_valid pulses once per 64 accepted samples, 4 clocks after the 64th
// sample of each group when samples arrive every clock.
// The stage order, factors and widths follow the filter design; the
// valid-strobe handshake between stages is a choice of this implementation.
module decimation_channel
  import nt_filter_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  adc_t    in_data,
  output logic    out_valid,
  output sample_t out_data
);

  logic    cic_valid, hb1_valid;
  sample_t cic_data,  hb1_data;

  cic_decimator #(
    .IN_W(ADC_W), .N(CIC_N), .R(CIC_R), .M(CIC_M),
    .ACC_W(CIC_ACC_W), .OUT_W(SAMPLE_W)
  ) u_cic (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(cic_valid), .out_data(cic_data)
  );

  hb1 u_hb1 (
    .clk, .rst_n, .in_valid(cic_valid), .in_data(cic_data),
    .out_valid(hb1_valid), .out_data(hb1_data)
  );

  hb2 u_hb2 (
    .clk, .rst_n, .in_valid(hb1_valid), .in_data(hb1_data),
    .out_valid, .out_data
  );

endmodule
