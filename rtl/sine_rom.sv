// sine_rom: the look-up table of the DDS. It holds one full period of a sine
// wave, 2^AW words of DW bits, and has two independent synchronous read ports
// so that one phase address yields both cos and sin in the same cycle.
//
// Word i holds round((2^(DW-1)-1) * sin(2*pi*(i+0.5)/2^AW)), computed while
// elaborating by sdr_pkg::sine_q (integer arithmetic only). Because of the
// half-step offset, cos at address a is the sine word at a + 2^AW/4.
//
// Timing: one clock of latency; rd_a/rd_b are registered (block-RAM style).
// The ROM itself follows the document (a DDS built from a phase accumulator
// and a ROM look-up table); its size and the half-step table are this
// design's choices.
module sine_rom #(
  parameter int unsigned AW = sdr_pkg::LUT_AW,
  parameter int unsigned DW = sdr_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic [AW-1:0]        addr_a,
  input  logic [AW-1:0]        addr_b,
  output logic signed [DW-1:0] rd_a,
  output logic signed [DW-1:0] rd_b
);
  typedef logic signed [DW-1:0] word_t;
  word_t table_mem [2**AW];

  // ROM contents, fixed at elaboration / configuration time
  initial begin
    for (int i = 0; i < 2**AW; i++)
      table_mem[i] = word_t'(sdr_pkg::sine_q(longint'(i), longint'(2**AW),
                                             (longint'(1) <<< (DW - 1)) - 1));
  end

  always_ff @(posedge clk) begin
    rd_a <= table_mem[addr_a];
    rd_b <= table_mem[addr_b];
  end
endmodule
