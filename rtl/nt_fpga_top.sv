// nt_fpga_top: FPGA logic of a cross-correlation noise thermometer.
//
// The thermal noise of a sensing resistor is amplified in two independent
// channels and digitised by two 8-bit ADCs at 40 MS/s. Each channel is
// band-limited to 300 kHz and decimated by 64 to 625 kS/s by its own
// decimation_channel; the two filtered streams leave the device towards the
// PC interface, where their cross-correlation cancels the uncorrelated
// amplifier noise.
//
// Interface: both ADCs are sampled together, so one adc_valid qualifies
// both adc_data words. Each channel has its own out_valid/out_data; with
// identical input timing the two strobes coincide.
// Two filter channels in one device follow the system description; the
// PC/PCI interface and the correlator are outside this module and connect
// to out_valid/out_data.
module nt_fpga_top
  import nt_filter_pkg::*;
#(
  parameter int unsigned N_CH = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    adc_valid,
  input  adc_t    adc_data [N_CH],
  output logic    out_valid [N_CH],
  output sample_t out_data  [N_CH]
);

  for (genvar c = 0; c < int'(N_CH); c++) begin : g_ch
    decimation_channel u_ch (
      .clk, .rst_n,
      .in_valid (adc_valid),
      .in_data  (adc_data[c]),
      .out_valid(out_valid[c]),
      .out_data (out_data[c])
    );
  end

endmodule
