// dsbsc_modulator: double-sideband suppressed-carrier modulator.
//
// The modulated signal is the product of the message and the carrier,
// s = m * cos(wc t), as in the document's transmitter. The document's
// hardware model also forms the quadrature product m * sin(wc t) and hands
// both to the receiver's Costas loop as the in-phase and quadrature parts of
// the received signal; both products are formed here.
//
// Interface: message_i, carrier_cos_i, carrier_sin_i are Q1.15-style signed
// samples (DW bits). mod_i_o = m*cos and mod_q_o = m*sin, rounded back to DW
// bits (the product of two full-scale values is saturated).
// Timing: one registered stage (one sample of delay, matching the delay
// blocks placed after the modulator in the document's model); reset clears
// the outputs. Rounding and saturation are this design's choice.
module dsbsc_modulator #(
  parameter int unsigned DW = sdr_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] message_i,
  input  logic signed [DW-1:0] carrier_cos_i,
  input  logic signed [DW-1:0] carrier_sin_i,
  output logic signed [DW-1:0] mod_i_o,
  output logic signed [DW-1:0] mod_q_o
);
  localparam logic signed [2*DW:0] RND  = (2*DW+1)'(1) <<< (DW - 2);
  localparam logic signed [2*DW:0] MAXV = ((2*DW+1)'(1) <<< (DW - 1)) - 1;

  logic signed [2*DW-1:0] prod_i, prod_q;
  logic signed [DW-1:0]   next_i, next_q;

  function automatic logic signed [DW-1:0] scale(input logic signed [2*DW-1:0] p);
    logic signed [2*DW:0] r;
    r = ((2*DW+1)'(p) + RND) >>> (DW - 1);
    if (r > MAXV) return DW'(MAXV);    // only -1.0 * -1.0 can overflow
    return DW'(r);
  endfunction

  always_comb begin
    prod_i = message_i * carrier_cos_i;
    prod_q = message_i * carrier_sin_i;
    next_i = scale(prod_i);
    next_q = scale(prod_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mod_i_o <= '0;
      mod_q_o <= '0;
    end else begin
      mod_i_o <= next_i;
      mod_q_o <= next_q;
    end
  end
endmodule
