// tb_costas_settling: the Costas loop's acquisition run. A DSB-SC input with
// a message period of 920 samples (envelope lobes about 460 samples long),
// carrier at 1/16 of the sample rate and a 1 rad initial carrier phase
// offset is applied for 10000 samples, the length of the published
// phase-error plot, in which the error has died out after roughly 1200
// samples.
// The phase error is measured here as atan(Q/I) (folded into +/-pi/2, the
// Costas ambiguity) on samples whose envelope exceeds 0.1 full scale. The
// test requires the error to stay below 0.05 rad from sample 2000 on, and
// reports the last sample at which it was larger.
module tb_costas_settling;
  import sdr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  NSAMP = 10000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] in_i = '0, in_q = '0;
  logic [31:0] nco_freq_i = 32'h1000_0000;
  err_sel_e err_sel = ERR_IQ_PRODUCT;
  logic signed [15:0] demod_o, quad_o, err_o, nco_cos_o, nco_sin_o;
  logic signed [47:0] v_o;
  logic [31:0] nco_phase_o;
  int checks = 0, failures = 0, last_big = -1, measured = 0;
  real m, th, pe, peak_pe;

  costas_loop dut (.*);
  always #5 clk = ~clk;

  initial begin
    peak_pe = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      @(negedge clk);
      m  = 0.8 * $cos(2.0 * PI * real'(n) / 920.0);
      th = 2.0 * PI * real'(n) / 16.0 + 1.0;
      in_i = 16'($rtoi($floor(32767.0 * m * $cos(th) + 0.5)));
      in_q = 16'($rtoi($floor(32767.0 * m * $sin(th) + 0.5)));
      #1;
      if (m > 0.1 || m < -0.1) begin
        pe = (demod_o == 0) ? PI / 2.0 : $atan(real'(quad_o) / real'(demod_o));
        if (pe < 0.0) pe = -pe;
        if (pe > 0.05) last_big = n;
        if (n >= 2000) begin
          checks++;
          measured++;
          if (pe > 0.05) failures++;
          if (pe > peak_pe) peak_pe = pe;
        end
      end
    end
    $display("phase error last above 0.05 rad at sample %0d; peak after 2000: %f rad over %0d samples",
             last_big, peak_pe, measured);
    checks++;
    if (last_big >= 2000 || measured < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
