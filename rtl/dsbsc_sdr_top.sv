// dsbsc_sdr_top: digital DSB-SC amplitude-modulation transmitter and two
// receivers, the FPGA part of a software-defined-radio link.
//
// Transmitter: a message DDS and a carrier DDS (cos and sin) feed the DSB-SC
// modulator, which forms s_I = m*cos(wc n) and s_Q = m*sin(wc n). s_I is the
// transmitted DSB-SC sample (tx_i_o, towards the RF transceiver's DAC side);
// s_Q is the quadrature copy handed to the Costas receiver.
//
// Receivers, side by side and both fed from the same received signal:
//   - coherent_demod: mixer with a local oscillator, decimation and a
//     low-pass FIR. It needs an oscillator synchronous with the carrier: with
//     equal tuning words (lo_freq_i = carrier_freq_i) the top releases its
//     reset one clock after the transmitter's, which cancels the modulator's
//     one-sample delay in loopback;
//   - costas_loop: carrier recovery by a second-order Costas loop, whose
//     in-phase channel is the recovered message.
// With loopback_i = 1 the receivers take the transmitter's own output, as in
// the document's simulation model; with loopback_i = 0 they take rx_i_i and
// rx_q_i, the samples from the transceiver's ADC side (the transceiver, the
// data converters and the DSP processor of the document's board sit outside
// this design).
//
// Besides the receivers' outputs, the top brings out the coherent mixer
// output and the recovered carrier (the Costas NCO's cos and sin).
//
// Frequencies are tuning words in 2^PHASE_W units per turn per clock. All
// samples are signed Q1.15 at one sample per clock except the coherent
// receiver's output, which is valid every DEC clocks (coh_valid_o).
module dsbsc_sdr_top
  import sdr_pkg::*;
#(
  parameter int unsigned DW    = SAMPLE_W,
  parameter int unsigned PW    = PHASE_W,
  parameter int unsigned AW    = LUT_AW,
  parameter int unsigned DEC   = 2,
  parameter int unsigned NTAPS = 15,
  parameter int          K1_Q  = 207513,   // 0.1979  * 2^20
  parameter int          K2_Q  = 6208      // 0.00592 * 2^20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // frequency plan
  input  logic [PW-1:0]        msg_freq_i,
  input  logic [PW-1:0]        carrier_freq_i,
  input  logic [PW-1:0]        lo_freq_i,
  input  logic [PW-1:0]        nco_freq_i,
  input  err_sel_e             err_sel_i,
  // receive path source and transceiver interface
  input  logic                 loopback_i,
  input  logic signed [DW-1:0] rx_i_i,
  input  logic signed [DW-1:0] rx_q_i,
  output logic signed [DW-1:0] message_o,
  output logic signed [DW-1:0] tx_i_o,
  output logic signed [DW-1:0] tx_q_o,
  // coherent receiver
  output logic                 coh_valid_o,
  output logic signed [DW-1:0] coh_demod_o,
  output logic signed [DW-1:0] coh_mix_o,
  // Costas receiver
  output logic signed [DW-1:0] costas_demod_o,
  output logic signed [DW-1:0] costas_quad_o,
  output logic signed [DW-1:0] costas_err_o,
  output logic signed [47:0]   costas_v_o,
  output logic [PW-1:0]        costas_phase_o,
  output logic signed [DW-1:0] costas_carrier_cos_o,
  output logic signed [DW-1:0] costas_carrier_sin_o
);
  logic signed [DW-1:0] msg_cos, car_cos, car_sin, s_i, s_q, r_i, r_q;

  // ---------------- transmitter ----------------
  dds #(.PHASE_W(PW), .LUT_AW(AW), .DW(DW)) u_msg_dds (
    .clk (clk), .rst_n (rst_n), .phase_inc (msg_freq_i),
    .phase_o (), .cos_o (msg_cos), .sin_o ()
  );

  dds #(.PHASE_W(PW), .LUT_AW(AW), .DW(DW)) u_carrier_dds (
    .clk (clk), .rst_n (rst_n), .phase_inc (carrier_freq_i),
    .phase_o (), .cos_o (car_cos), .sin_o (car_sin)
  );

  dsbsc_modulator #(.DW(DW)) u_mod (
    .clk (clk), .rst_n (rst_n),
    .message_i (msg_cos), .carrier_cos_i (car_cos), .carrier_sin_i (car_sin),
    .mod_i_o (s_i), .mod_q_o (s_q)
  );

  assign message_o = msg_cos;
  assign tx_i_o    = s_i;
  assign tx_q_o    = s_q;

  // ---------------- receive source ----------------
  always_comb begin
    r_i = loopback_i ? s_i : rx_i_i;
    r_q = loopback_i ? s_q : rx_q_i;
  end

  // ---------------- receivers ----------------
  // Carrier synchronisation of the coherent receiver: its local oscillator
  // leaves reset one clock after the transmitter's carrier DDS, so it runs
  // exactly one sample behind the carrier, matching the modulator's register
  // stage (phase difference zero at the mixer).
  logic coh_rst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) coh_rst_n <= 1'b0;
    else        coh_rst_n <= 1'b1;
  end

  coherent_demod #(.DW(DW), .PW(PW), .AW(AW), .DEC(DEC), .NTAPS(NTAPS)) u_coh (
    .clk (clk), .rst_n (coh_rst_n), .rx_i (r_i), .lo_freq_i (lo_freq_i),
    .mix_o (coh_mix_o), .demod_valid (coh_valid_o), .demod_o (coh_demod_o)
  );

  costas_loop #(.DW(DW), .PW(PW), .AW(AW), .K1_Q(K1_Q), .K2_Q(K2_Q), .VW(48)) u_costas (
    .clk (clk), .rst_n (rst_n),
    .in_i (r_i), .in_q (r_q), .nco_freq_i (nco_freq_i), .err_sel (err_sel_i),
    .demod_o (costas_demod_o), .quad_o (costas_quad_o), .err_o (costas_err_o),
    .v_o (costas_v_o), .nco_cos_o (costas_carrier_cos_o), .nco_sin_o (costas_carrier_sin_o),
    .nco_phase_o (costas_phase_o)
  );
endmodule
