// tb_coherent_demod: feeds a DSB-SC signal m(n)*cos(wc n), with
// m(n) = 0.9*cos(2*pi*n/1024) and wc = 2*pi/16 (local oscillator tuning word
// 2^28), generated here in real arithmetic in step with the receiver's
// oscillator. The output must follow m/2 (the A_c*A_m/2 of the coherent
// detector) delayed by the chain latency: 3 clocks of registers plus the
// FIR's group delay of 7 decimated samples = 17 clocks, within 1% of full
// scale, with the carrier images removed. Also checks that an output is valid
// every second clock (decimation by 2) and the output peak amplitude.
module tb_coherent_demod;
  localparam int DW = 16, PW = 32;
  localparam real PI = 3.14159265358979323846;
  localparam int LAT = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] rx_i = '0, mix_o, demod_o;
  logic [PW-1:0] lo_freq_i = 32'h1000_0000;
  logic demod_valid;
  int checks = 0, failures = 0, nvalid = 0, peak = 0;

  coherent_demod dut (.*);
  always #5 clk = ~clk;

  function automatic real msg(int n);
    return 0.9 * $cos(2.0 * PI * real'(n) / 1024.0);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int j = 1; j <= 6000; j++) begin
      @(posedge clk);
      #1;
      // output after edge j
      if (demod_valid) begin
        nvalid++;
        if (j > 60) begin
          automatic int exp_v = $rtoi($floor(32767.0 * msg(j - LAT) / 2.0 + 0.5));
          checks++;
          if (int'(demod_o) > exp_v + 330 || int'(demod_o) < exp_v - 330) begin
            failures++;
            if (failures < 10) $display("FAIL clk %0d: got %0d expected %0d", j, demod_o, exp_v);
          end
          if (int'(demod_o) > peak) peak = int'(demod_o);
        end
      end
      @(negedge clk);
      // sample entering the mixer at edge j+1 meets LO phase (j-1)*wc
      rx_i = DW'($rtoi($floor(32767.0 * msg(j) * $cos(2.0 * PI * real'(j - 1) / 16.0) + 0.5)));
    end
    checks++;
    if (nvalid < 2990 || nvalid > 3010) begin
      failures++;
      $display("FAIL decimation: %0d outputs in 6000 clocks", nvalid);
    end
    checks++;
    if (peak < 14600 || peak > 14900) begin
      failures++;
      $display("FAIL peak %0d, expected about 0.45 full scale (14745)", peak);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
