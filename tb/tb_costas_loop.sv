// tb_costas_loop: carrier recovery tests for the Costas loop, with the
// received signal generated here in real arithmetic.
//  1. DSB-SC input m(n)*exp(j*(wc n + th0)), m = 0.5*cos(2*pi*n/1024),
//     carrier 2^-12 turn/sample above the NCO's nominal frequency
//     (tuning words 2^28 + 2^20 against 2^28) and th0 = 1 rad, I*Q error.
//     Checks: the loop locks (Q-channel power below 1% of I-channel power
//     over 512-sample windows) within 5000 samples and stays locked; the
//     recovered message matches +/-m with correlation above 0.99; the loop
//     filter output settles to the frequency offset (within 5%).
//  2. Unmodulated carrier (m = 0.5) with the imaginary-part error: the loop
//     locks with the I channel at +0.5 full scale.
module tb_costas_loop;
  import sdr_pkg::*;
  localparam int DW = 16, PW = 32;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] in_i = '0, in_q = '0;
  logic [PW-1:0] nco_freq_i = 32'h1000_0000;
  err_sel_e err_sel = ERR_IQ_PRODUCT;
  logic signed [DW-1:0] demod_o, quad_o, err_o, nco_cos_o, nco_sin_o;
  logic signed [47:0] v_o;
  logic [PW-1:0] nco_phase_o;
  int checks = 0, failures = 0;

  costas_loop dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // run n samples; returns sums over the run
  longint unsigned car_phase;
  int nsamp;
  task automatic run(int n, longint unsigned inc, real th0, bit modulated,
                     output real pi2, output real pq2, output real pxm, output real pm2);
    real m, th, mprev [$];
    pi2 = 0.0; pq2 = 0.0; pxm = 0.0; pm2 = 0.0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      m  = modulated ? 0.5 * $cos(2.0 * PI * real'(nsamp) / 1024.0) : 0.5;
      th = 2.0 * PI * real'(car_phase) / 4294967296.0 + th0;
      in_i = DW'($rtoi($floor(32767.0 * m * $cos(th) + 0.5)));
      in_q = DW'($rtoi($floor(32767.0 * m * $sin(th) + 0.5)));
      car_phase = (car_phase + inc) % 64'h1_0000_0000;
      nsamp++;
      #1;
      // demod_o is combinational in the current input sample
      pi2   += real'(demod_o) * real'(demod_o);
      pq2   += real'(quad_o) * real'(quad_o);
      pxm += real'(demod_o) * 32767.0 * m;
      pm2   += (32767.0 * m) * (32767.0 * m);
    end
  endtask

  real pi2, pq2, pxm, pm2, corr, adj;
  int lock_at;

  initial begin
    // ---------------- test 1: DSB-SC, frequency and phase offset ----------
    car_phase = 0; nsamp = 0; lock_at = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w < 40; w++) begin
      run(512, 64'h1000_0000 + 64'h0010_0000, 1.0, 1'b1, pi2, pq2, pxm, pm2);
      if (pq2 < 0.01 * pi2) begin
        if (lock_at < 0) lock_at = (w + 1) * 512;
      end else if (lock_at >= 0 && w >= 10) begin
        check($sformatf("stays locked (window %0d)", w), 1'b0);
      end
    end
    $display("lock reached by sample %0d", lock_at);
    check("locks within 5000 samples", lock_at > 0 && lock_at <= 5000);
    run(4096, 64'h1000_0000 + 64'h0010_0000, 1.0, 1'b1, pi2, pq2, pxm, pm2);
    corr = pxm / $sqrt(pi2 * pm2);
    $display("message correlation %f, Q/I power %f", corr, pq2 / pi2);
    check("recovered message", corr > 0.99 || corr < -0.99);
    check("Q channel small", pq2 < 0.01 * pi2);
    adj = real'(v_o) * 4294967296.0 / (2.0 * PI) / real'(64'd1 << 35);
    $display("loop filter frequency estimate %f (offset 1048576)", adj);
    check("frequency offset tracked", adj > 0.95 * 1048576.0 && adj < 1.05 * 1048576.0);

    // ---------------- test 2: plain carrier, imaginary-part error ---------
    @(negedge clk) rst_n = 1'b0;
    err_sel = ERR_IMAG;
    car_phase = 0; nsamp = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(8192, 64'h1000_0000 - 64'h0008_0000, -2.0, 1'b0, pi2, pq2, pxm, pm2);
    run(1024, 64'h1000_0000 - 64'h0008_0000, -2.0, 1'b0, pi2, pq2, pxm, pm2);
    $display("ERR_IMAG: mean I %f", $sqrt(pi2 / 1024.0));
    check("ERR_IMAG lock, I = +0.5", pxm / $sqrt(pi2 * pm2) > 0.999);
    check("ERR_IMAG Q small", pq2 < 0.001 * pi2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
