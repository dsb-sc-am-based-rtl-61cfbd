// coherent_demod: coherent (synchronous) DSB-SC receiver.
//
// The received signal s(t) = m(t)*cos(wc t) is multiplied by a local
// oscillator at the carrier frequency, giving m/2 + m/2*cos(2 wc t). The
// product is decimated and low-pass filtered, which removes the terms at
// twice the carrier and leaves m/2 (the document's A_c*A_m/2 with the local
// oscillator at unit amplitude). The chain mixer -> down-sampler -> FIR
// follows the document's receiver model; the local oscillator is a DDS whose
// frequency (and so its phase, from reset) is set by lo_freq_i, with no
// carrier recovery: it must be synchronous with the transmitter's carrier.
//
// Interface: rx_i is the received Q1.(DW-1) sample, one per clock.
// demod_o/demod_valid are the filtered output at 1/DEC of the clock rate;
// mix_o is the mixer output. Timing: LO (1 clock of ROM latency), mixer
// register (1), down-sampler (1), FIR (1).
module coherent_demod #(
  parameter int unsigned DW        = sdr_pkg::SAMPLE_W,
  parameter int unsigned PW        = sdr_pkg::PHASE_W,
  parameter int unsigned AW        = sdr_pkg::LUT_AW,
  parameter int unsigned DEC       = 2,
  parameter int unsigned NTAPS     = 15,
  parameter int unsigned OUT_SHIFT = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] rx_i,
  input  logic [PW-1:0]        lo_freq_i,
  output logic signed [DW-1:0] mix_o,
  output logic                 demod_valid,
  output logic signed [DW-1:0] demod_o
);
  logic signed [DW-1:0] lo_cos, lo_sin, mix, ds_data;
  logic                 ds_valid;
  logic [PW-1:0]        lo_phase;

  dds #(.PHASE_W(PW), .LUT_AW(AW), .DW(DW)) u_lo (
    .clk (clk), .rst_n (rst_n), .phase_inc (lo_freq_i),
    .phase_o (lo_phase), .cos_o (lo_cos), .sin_o (lo_sin)
  );

  // mixer: the same rounded, registered product as the modulator
  dsbsc_modulator #(.DW(DW)) u_mix (
    .clk (clk), .rst_n (rst_n),
    .message_i (rx_i), .carrier_cos_i (lo_cos), .carrier_sin_i (lo_sin),
    .mod_i_o (mix), .mod_q_o ()
  );

  down_sample #(.DW(DW), .FACTOR(DEC)) u_ds (
    .clk (clk), .rst_n (rst_n),
    .in_valid (1'b1), .in_data (mix),
    .out_valid (ds_valid), .out_data (ds_data)
  );

  fir_lpf #(.DW(DW), .NTAPS(NTAPS), .OUT_SHIFT(OUT_SHIFT)) u_fir (
    .clk (clk), .rst_n (rst_n),
    .in_valid (ds_valid), .in_data (ds_data),
    .out_valid (demod_valid), .out_data (demod_o)
  );

  assign mix_o = mix;
endmodule
