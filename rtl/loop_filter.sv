// loop_filter: proportional-plus-integral loop filter of the second-order
// Costas loop.
//
// Structure as in the document: the error e(n) goes through two constant
// gains. The K1 path is proportional; the K2 path feeds an accumulator
// (adder with a one-sample delay in its feedback), and the two are added:
//     vi(n) = K2*e(n) + vi(n-1)
//     v(n)  = K1*e(n) + vi(n)
// K1 = 0.1979 and K2 = 0.00592 are the gains printed in the document's loop
// filter diagram. Here they are fixed-point integers with COEF_FRAC fraction
// bits (K1_Q = round(K1 * 2^COEF_FRAC)); the conversion is this design's.
//
// Interface: err_i is signed Q1.(DW-1). v_o is signed with
// DW-1+COEF_FRAC fraction bits, OUT_W bits wide (wide enough that the
// integrator cannot wrap for any frequency offset the NCO can represent).
// Timing: v_o is combinational in err_i; the integrator register updates
// every clock and resets to zero.
module loop_filter #(
  parameter int unsigned DW        = sdr_pkg::SAMPLE_W,
  parameter int unsigned COEF_FRAC = 20,
  parameter int          K1_Q      = 207513,   // 0.1979  * 2^20
  parameter int          K2_Q      = 6208,     // 0.00592 * 2^20
  parameter int unsigned OUT_W     = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DW-1:0]    err_i,
  output logic signed [OUT_W-1:0] v_o,
  output logic signed [OUT_W-1:0] integ_o
);
  logic signed [OUT_W-1:0] prop, integ_in, vi, vi_q;

  always_comb begin
    prop     = OUT_W'(err_i) * OUT_W'(K1_Q);
    integ_in = OUT_W'(err_i) * OUT_W'(K2_Q);
    vi       = integ_in + vi_q;
    v_o      = prop + vi;
    integ_o  = vi_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vi_q <= '0;
    else        vi_q <= vi;
  end

  initial begin
    assert (COEF_FRAC + DW + 2 < OUT_W) else $error("loop_filter: OUT_W too small");
  end
endmodule
