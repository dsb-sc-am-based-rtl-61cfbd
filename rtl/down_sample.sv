// down_sample: sample-rate decimator of the coherent receiver.
//
// Keeps the first of every FACTOR valid input samples and drops the others,
// lowering the rate seen by the low-pass FIR that follows. The document's
// receiver model places a down-sampler between the mixer and the FIR filter
// but gives no factor; FACTOR = 2 is this design's choice.
//
// Interface: in_valid/in_data at up to one sample per clock; out_valid pulses
// with out_data for every FACTOR-th input. Timing: one clock of latency
// (registered output); the phase counter resets to 0, so the first sample
// after reset is kept.
module down_sample #(
  parameter int unsigned DW     = sdr_pkg::SAMPLE_W,
  parameter int unsigned FACTOR = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);
  localparam int unsigned CW = (FACTOR > 1) ? $clog2(FACTOR) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == '0) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
        end
        cnt <= (cnt == CW'(FACTOR - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end
endmodule
