// cic_decimator: N-stage cascaded integrator-comb decimator (Hogenauer).
//
// H(z) = ((1 - z^-(R*M)) / (1 - z^-1))^N. N integrators run at the input
// rate, every R-th integrator result is passed to N comb sections running at
// the decimated rate, each subtracting its own input delayed by M decimated
// samples. All registers are ACC_W bits wide and wrap modulo 2**ACC_W; with
// ACC_W >= IN_W + N*log2(R*M) the wrap-around cancels in the combs and the
// result is exact. The output is the top OUT_W bits of the last comb.
// Defaults follow the filter specification: N=3, R=16, M=1, 8-bit input,
// 20-bit registers, 12-bit output. The DC gain (R*M)^N = 4096 is exactly
// 2**12, so a full-scale 8-bit input gives a full-scale 12-bit output.
//
// Interface: in_valid qualifies in_data (one sample per clock at most).
// out_valid pulses for one clock, the clock after the R-th accepted sample
// of each group (groups start at the first sample after reset).
// Design choices: synchronous active-low reset clearing all state; the
// integrator chain is combinational within one clock (no pipeline
// registers), so the transfer function has no extra delay.
module cic_decimator #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned N     = 3,
  parameter int unsigned R     = 16,
  parameter int unsigned M     = 1,
  parameter int unsigned ACC_W = 20,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  typedef logic signed [ACC_W-1:0] acc_t;
  localparam int unsigned PH_W = (R > 1) ? $clog2(R) : 1;

  if (ACC_W < IN_W + N * $clog2(R * M)) begin : g_width_check
    $error("cic_decimator: ACC_W too small for IN_W, N, R and M");
  end

  acc_t                integ_q [N];
  acc_t                integ_d [N];
  acc_t                comb_dly [N][M];   // M-sample delay line per comb
  acc_t                comb_d   [N];      // comb outputs
  logic [PH_W-1:0]     phase_q;
  logic                decim;

  // Integrators: each adds the freshly updated value of the one before it.
  always_comb begin
    integ_d[0] = integ_q[0] + acc_t'(in_data);
    for (int k = 1; k < int'(N); k++) begin
      integ_d[k] = integ_q[k] + integ_d[k-1];
    end
  end

  assign decim = in_valid && (phase_q == PH_W'(R - 1));

  // Combs on the decimated sample integ_d[N-1].
  always_comb begin
    comb_d[0] = integ_d[N-1] - comb_dly[0][M-1];
    for (int k = 1; k < int'(N); k++) begin
      comb_d[k] = comb_d[k-1] - comb_dly[k][M-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < int'(N); k++) begin
        integ_q[k] <= '0;
        for (int m = 0; m < int'(M); m++) comb_dly[k][m] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < int'(N); k++) integ_q[k] <= integ_d[k];
        phase_q <= decim ? '0 : phase_q + 1'b1;
      end
      if (decim) begin
        for (int k = 0; k < int'(N); k++) begin
          for (int m = int'(M) - 1; m > 0; m--) comb_dly[k][m] <= comb_dly[k][m-1];
          comb_dly[k][0] <= (k == 0) ? integ_d[N-1] : comb_d[k-1];
        end
        out_data  <= comb_d[N-1][ACC_W-1 -: OUT_W];
        out_valid <= 1'b1;
      end
    end
  end

  // An output sample is only ever produced by an accepted input sample.
  a_out_follows_in : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(in_valid));

endmodule
