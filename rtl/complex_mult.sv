// complex_mult: the phase detector of the Costas loop, a complex multiplier.
//
// p = a * b with p_r = a_r*b_r - a_i*b_i and p_i = a_r*b_i + a_i*b_r, built
// as the document draws it: four real multipliers, one subtractor for the
// real part and one adder for the imaginary part. In the loop, a is the
// received I/Q sample and b is the conjugate NCO output (cos, -sin), so p_r is
// the in-phase (I) channel and p_i the quadrature (Q) channel.
//
// Interface: DW-bit signed Q1.(DW-1) inputs; outputs are rounded back to DW
// bits and saturated. Timing: purely combinational (the loop's only delays
// are the NCO's). Rounding and saturation are this design's choice.
module complex_mult #(
  parameter int unsigned DW = sdr_pkg::SAMPLE_W
) (
  input  logic signed [DW-1:0] a_r,
  input  logic signed [DW-1:0] a_i,
  input  logic signed [DW-1:0] b_r,
  input  logic signed [DW-1:0] b_i,
  output logic signed [DW-1:0] p_r,
  output logic signed [DW-1:0] p_i
);
  localparam int unsigned PW = 2 * DW + 1;
  localparam logic signed [PW-1:0] RND  = PW'(1) <<< (DW - 2);
  localparam logic signed [PW-1:0] MAXV = (PW'(1) <<< (DW - 1)) - 1;
  localparam logic signed [PW-1:0] MINV = -(PW'(1) <<< (DW - 1));

  logic signed [2*DW-1:0] m_rr, m_ii, m_ri, m_ir;
  logic signed [PW-1:0]   sum_r, sum_i;

  function automatic logic signed [DW-1:0] scale(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + RND) >>> (DW - 1);
    if (r > MAXV) return DW'(MAXV);
    if (r < MINV) return DW'(MINV);
    return DW'(r);
  endfunction

  always_comb begin
    m_rr  = a_r * b_r;
    m_ii  = a_i * b_i;
    m_ri  = a_r * b_i;
    m_ir  = a_i * b_r;
    sum_r = PW'(m_rr) - PW'(m_ii);
    sum_i = PW'(m_ri) + PW'(m_ir);
    p_r   = scale(sum_r);
    p_i   = scale(sum_i);
  end
endmodule
