// fir_lpf: low-pass FIR filter of the coherent receiver, removing the
// components at twice the carrier frequency left by the mixer.
//
// Direct form: a NTAPS-deep delay line of input samples, each multiplied by
// its tap and summed; the sum is rounded and shifted right by OUT_SHIFT so
// the DC gain is one when the taps sum to 2^OUT_SHIFT. The document uses a
// generated FIR core whose taps came from a filter-design tool and are not
// published. The default taps here are a 15-tap triangular window,
// h[i] = min(i+1, 15-i), summing to 64: the cascade of two 8-sample moving
// averages, which has nulls at every multiple of 1/8 of the filter's sample
// rate (where the image at twice the carrier falls with the default
// frequency plan).
//
// Interface: in_valid/in_data; out_valid/out_data. Timing: one output per
// valid input, registered, one clock after the input. The delay line resets
// to zero.
module fir_lpf #(
  parameter int unsigned DW        = sdr_pkg::SAMPLE_W,
  parameter int unsigned NTAPS     = 15,
  parameter int unsigned OUT_SHIFT = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);
  localparam int unsigned AW = 2 * DW + $clog2(NTAPS) + 1;

  logic signed [DW-1:0] taps [NTAPS-1];
  logic signed [AW-1:0] acc, rounded;

  localparam logic signed [AW-1:0] MAXV = (AW'(1) <<< (DW - 1)) - 1;
  localparam logic signed [AW-1:0] MINV = -(AW'(1) <<< (DW - 1));

  // delay line of the NTAPS-1 previous samples: taps[0] is the newest
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS - 1; i++) taps[i] <= '0;
    end else if (in_valid) begin
      taps[0] <= in_data;
      for (int i = 1; i < NTAPS - 1; i++) taps[i] <= taps[i-1];
    end
  end

  // convolution with the new sample and the NTAPS-1 previous ones
  always_comb begin
    acc = AW'(in_data) * AW'(sdr_pkg::tri_tap(0, NTAPS));
    for (int i = 1; i < NTAPS; i++)
      acc += AW'(taps[i-1]) * AW'(sdr_pkg::tri_tap(i, NTAPS));
    rounded = (acc + (AW'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        out_data <= (rounded > MAXV) ? DW'(MAXV) :
                    (rounded < MINV) ? DW'(MINV) : DW'(rounded);
    end
  end
endmodule
