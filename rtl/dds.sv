// dds: direct digital synthesizer producing a quadrature pair of sinusoids,
// used as message source, carrier source, receiver local oscillator and as
// the numerically controlled oscillator (the "VCO") of the Costas loop.
//
// It follows the DDS drawn in the document's second-order Costas loop: a
// phase accumulator (adder plus one-sample delay) that adds the tuning word
// every sample, and a ROM look-up table that turns the phase into cos and
// sin. The tuning word is an input so the Costas loop can add its loop
// filter output to the nominal frequency; a fixed oscillator ties it to a
// constant. Only the top LUT_AW phase bits address the table (phase
// truncation); no dither is applied.
//
// Interface: phase_inc is the per-sample phase step, in 2^PHASE_W units per
// turn, so f_out = phase_inc * f_clk / 2^PHASE_W. The accumulator resets to
// 0. Outputs are Q1.(DW-1) signed.
// Timing: cos_o/sin_o at clock n+1 show the phase held in the accumulator
// during cycle n (one cycle of ROM latency); phase_o is that accumulator.
// Widths are this design's choice; the document does not give them.
module dds #(
  parameter int unsigned PHASE_W = sdr_pkg::PHASE_W,
  parameter int unsigned LUT_AW  = sdr_pkg::LUT_AW,
  parameter int unsigned DW      = sdr_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PHASE_W-1:0]   phase_inc,
  output logic [PHASE_W-1:0]   phase_o,
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o
);
  logic [PHASE_W-1:0] phase_acc;
  logic [LUT_AW-1:0]  addr_sin, addr_cos;

  // phase accumulator: phase(n+1) = phase(n) + tuning word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_acc <= '0;
    else        phase_acc <= phase_acc + phase_inc;
  end

  // cos(x) = sin(x + quarter turn)
  assign addr_sin = phase_acc[PHASE_W-1 -: LUT_AW];
  assign addr_cos = addr_sin + LUT_AW'(2**(LUT_AW-2));
  assign phase_o  = phase_acc;

  sine_rom #(.AW(LUT_AW), .DW(DW)) u_rom (
    .clk    (clk),
    .addr_a (addr_cos),
    .addr_b (addr_sin),
    .rd_a   (cos_o),
    .rd_b   (sin_o)
  );
endmodule
