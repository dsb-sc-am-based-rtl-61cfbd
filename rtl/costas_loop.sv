// costas_loop: second-order Costas loop for carrier recovery and coherent
// demodulation of a DSB-SC signal.
//
// The received sample is treated as a complex value (in_i + j*in_q). A
// complex multiplier (the phase detector) multiplies it by the conjugate NCO
// output cos(th) - j*sin(th), which rotates the carrier away: the real part
// is the in-phase channel I = m*cos(d) and the imaginary part the quadrature
// channel Q = m*sin(d), d being the carrier phase minus the NCO phase. The
// phase error is e = I*Q = (m^2/2)*sin(2d), which does not change sign with
// the message, so the loop can lock to a suppressed carrier. (err_sel =
// ERR_IMAG uses e = Q instead, the error named on the document's loop filter
// diagram; it only suits an input whose envelope keeps one sign.) The loop
// filter (K1 proportional, K2 integral) produces v(n), which is scaled from
// radians to phase-accumulator units and added to the nominal frequency
// word nco_freq_i (Omega_0) to steer the DDS. Once locked, I is the recovered
// message.
//
// Interface: in_i/in_q Q1.(DW-1); nco_freq_i in 2^PHASE_W units per turn per
// sample. Outputs: demod_o (I channel, the recovered message), quad_o (Q),
// err_o (phase detector output), v_o (loop filter output, radians with
// DW-1+COEF_FRAC fraction bits), nco_cos_o/nco_sin_o and nco_phase_o.
// Timing: one sample per clock. The NCO output lags its accumulator by one
// clock, so the loop has two clocks of delay around it; everything between
// the NCO and the accumulator input is combinational.
// The structure and K1/K2 follow the document; the fixed-point formats, the
// I*Q error and the radian-to-phase scaling are this design's choices.
module costas_loop
  import sdr_pkg::*;
#(
  parameter int unsigned DW        = SAMPLE_W,
  parameter int unsigned PW        = PHASE_W,
  parameter int unsigned AW        = LUT_AW,
  parameter int unsigned COEF_FRAC = 20,
  parameter int          K1_Q      = 207513,   // 0.1979  * 2^20
  parameter int          K2_Q      = 6208,     // 0.00592 * 2^20
  parameter int unsigned VW        = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  input  logic [PW-1:0]        nco_freq_i,
  input  err_sel_e             err_sel,
  output logic signed [DW-1:0] demod_o,
  output logic signed [DW-1:0] quad_o,
  output logic signed [DW-1:0] err_o,
  output logic signed [VW-1:0] v_o,
  output logic signed [DW-1:0] nco_cos_o,
  output logic signed [DW-1:0] nco_sin_o,
  output logic [PW-1:0]        nco_phase_o
);
  // v is in radians with VFRAC fraction bits; phase units are 2^PW per 2*pi.
  // adj = v * 2^PW / (2*pi) / 2^VFRAC = (v * RAD2PH) >>> SH,
  // RAD2PH = round(2^16 / (2*pi)).
  localparam int unsigned VFRAC  = DW - 1 + COEF_FRAC;
  localparam int unsigned SH     = VFRAC + 16 - PW;
  localparam longint      RAD2PH = 10430;

  logic signed [DW-1:0]   cos_v, sin_v, nsin_v, p_r, p_i, err;
  logic signed [2*DW-1:0] iq;
  logic signed [VW-1:0]   v;
  logic signed [VW+16:0]  adj_full;
  logic [PW-1:0]          phase_inc;

  // -sin(.) output of the NCO; the table never holds -1.0, so the negation
  // cannot overflow
  assign nsin_v = -sin_v;

  complex_mult #(.DW(DW)) u_pd (
    .a_r (in_i), .a_i (in_q),
    .b_r (cos_v), .b_i (nsin_v),
    .p_r (p_r), .p_i (p_i)
  );

  always_comb begin
    iq = p_r * p_i;
    if (err_sel == ERR_IMAG) err = p_i;
    else                     err = DW'(iq >>> (DW - 1));
  end

  loop_filter #(
    .DW(DW), .COEF_FRAC(COEF_FRAC), .K1_Q(K1_Q), .K2_Q(K2_Q), .OUT_W(VW)
  ) u_lf (
    .clk (clk), .rst_n (rst_n), .err_i (err), .v_o (v), .integ_o ()
  );

  always_comb begin
    adj_full  = (VW+17)'(v) * (VW+17)'(RAD2PH);
    phase_inc = nco_freq_i + PW'(adj_full >>> SH);
  end

  dds #(.PHASE_W(PW), .LUT_AW(AW), .DW(DW)) u_nco (
    .clk (clk), .rst_n (rst_n), .phase_inc (phase_inc),
    .phase_o (nco_phase_o), .cos_o (cos_v), .sin_o (sin_v)
  );

  assign demod_o   = p_r;
  assign quad_o    = p_i;
  assign err_o     = err;
  assign v_o       = v;
  assign nco_cos_o = cos_v;
  assign nco_sin_o = sin_v;

  initial begin
    assert (VFRAC + 16 > PW) else $error("costas_loop: phase scaling shift must be positive");
  end
endmodule
