// tb_dsbsc_sdr_top: end-to-end test of the DSB-SC link at the default sizes.
//
// Phase A (loopback): message at 1/1024 and carrier at 1/16 of the clock
// rate; the coherent receiver's oscillator on the carrier frequency, the
// Costas NCO's nominal frequency 2^-13 turn/sample below the carrier.
//   - coherent receiver output must equal message/2, 18 clocks later, within
//     1% of full scale, at one output per two clocks (decimation);
//   - the Costas loop must acquire lock (Q power < 1% of I power) and its
//     I channel must match the message (|correlation| > 0.99).
// Phase B (external receive path, loopback off): the testbench plays the
// transceiver and supplies a different DSB-SC signal (message at 1/2048,
// carrier 2^-12 turn/sample above nominal, phase -1 rad); the Costas loop
// must re-lock and recover that message.
// Phase C (error mode switch): unmodulated carrier on the external path with
// the imaginary-part error; the loop must lock with I = +0.5 full scale.
// Each mechanism (coherent detection, decimation, Costas lock, external
// path, error-mode switch) is counted and must occur at least once.
module tb_dsbsc_sdr_top;
  import sdr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  COH_LAT = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] msg_freq_i = 32'h0040_0000, carrier_freq_i = 32'h1000_0000;
  logic [31:0] lo_freq_i = 32'h1000_0000, nco_freq_i = 32'h1000_0000 - 32'h0008_0000;
  err_sel_e err_sel_i = ERR_IQ_PRODUCT;
  logic loopback_i = 1'b1;
  logic signed [15:0] rx_i_i = '0, rx_q_i = '0;
  logic signed [15:0] message_o, tx_i_o, tx_q_o, coh_demod_o;
  logic signed [15:0] costas_demod_o, costas_quad_o, costas_err_o, coh_mix_o;
  logic signed [15:0] costas_carrier_cos_o, costas_carrier_sin_o;
  logic signed [47:0] costas_v_o;
  logic [31:0] costas_phase_o;
  logic coh_valid_o;

  dsbsc_sdr_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_coh = 0, n_dec = 0, n_lock = 0, n_ext = 0, n_mode = 0;
  int cyc = 0;
  int msg_hist [4096];

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // one clock; in external mode drive rx from the given envelope/phase
  longint unsigned ext_phase;
  logic signed [15:0] c_demod, c_quad;
  task automatic tick(real ext_m, longint unsigned ext_inc, real ext_th0);
    real th;
    @(negedge clk);
    if (!loopback_i) begin
      th = 2.0 * PI * real'(ext_phase) / 4294967296.0 + ext_th0;
      rx_i_i = 16'($rtoi($floor(32767.0 * ext_m * $cos(th) + 0.5)));
      rx_q_i = 16'($rtoi($floor(32767.0 * ext_m * $sin(th) + 0.5)));
      ext_phase = (ext_phase + ext_inc) % 64'h1_0000_0000;
    end
    // Costas outputs for the sample the loop takes at the coming edge
    #1;
    c_demod = costas_demod_o;
    c_quad  = costas_quad_o;
    @(posedge clk); #1;
    cyc++;
    msg_hist[cyc % 4096] = int'(message_o);
  endtask

  // accumulate Costas statistics over n clocks against a reference envelope
  real pi2, pq2, pxm, pm2;
  task automatic costas_window(int n, bit ext, real ext_amp, real ext_div,
                               longint unsigned ext_inc, real ext_th0, bit modulated);
    real m;
    pi2 = 0; pq2 = 0; pxm = 0; pm2 = 0;
    for (int k = 0; k < n; k++) begin
      if (ext) begin
        m = modulated ? ext_amp * $cos(2.0 * PI * real'(cyc) / ext_div) : ext_amp;
        tick(m, ext_inc, ext_th0);
        m = m * 32767.0;
      end else begin
        tick(0.0, 0, 0.0);
        // the Costas I channel sampled before edge cyc+1 follows tx_i of
        // edge cyc, which carries message_o of edge cyc-1
        m = real'(msg_hist[(cyc - 2) % 4096]);
      end
      pi2 += real'(c_demod) ** 2;
      pq2 += real'(c_quad) ** 2;
      pxm += real'(c_demod) * m;
      pm2 += m * m;
    end
  endtask

  real corr;
  int ok_lock;
  initial begin
    ext_phase = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---------------- phase A: loopback ----------------
    for (int k = 0; k < 4000; k++) begin
      tick(0.0, 0, 0.0);
      if (coh_valid_o) n_dec++;
      if (coh_valid_o && cyc > 100) begin
        automatic int exp_v = msg_hist[(cyc - COH_LAT) % 4096] / 2;
        check("coherent output = message/2",
              int'(coh_demod_o) <= exp_v + 330 && int'(coh_demod_o) >= exp_v - 330);
        n_coh++;
      end
    end
    check("decimation by 2", n_dec >= 1995 && n_dec <= 2005);
    ok_lock = 0;
    for (int w = 0; w < 8; w++) begin
      costas_window(512, 1'b0, 0, 0, 0, 0, 1'b0);
      if (pq2 < 0.01 * pi2) ok_lock++;
    end
    corr = pxm / $sqrt(pi2 * pm2);
    $display("loopback: Costas correlation %f, Q/I %f", corr, pq2 / pi2);
    check("Costas locked in loopback", ok_lock == 8);
    check("Costas recovers message", corr > 0.99 || corr < -0.99);
    if (ok_lock == 8) n_lock++;

    // ---------------- phase B: external receive path ----------------
    loopback_i = 1'b0;
    for (int w = 0; w < 12; w++)
      costas_window(512, 1'b1, 0.5, 2048.0, 64'h1000_0000 + 64'h0010_0000, -1.0, 1'b1);
    costas_window(4096, 1'b1, 0.5, 2048.0, 64'h1000_0000 + 64'h0010_0000, -1.0, 1'b1);
    corr = pxm / $sqrt(pi2 * pm2);
    $display("external: Costas correlation %f, Q/I %f", corr, pq2 / pi2);
    check("Costas re-locks on external input", pq2 < 0.01 * pi2);
    check("external message recovered", corr > 0.99 || corr < -0.99);
    if (pq2 < 0.01 * pi2) begin n_lock++; n_ext++; end

    // ---------------- phase C: error-mode switch ----------------
    err_sel_i = ERR_IMAG;
    n_mode++;
    for (int w = 0; w < 16; w++)
      costas_window(512, 1'b1, 0.5, 1.0, 64'h1000_0000 - 64'h0004_0000, 0.0, 1'b0);
    costas_window(1024, 1'b1, 0.5, 1.0, 64'h1000_0000 - 64'h0004_0000, 0.0, 1'b0);
    corr = pxm / $sqrt(pi2 * pm2);
    $display("ERR_IMAG: correlation %f, Q/I %f", corr, pq2 / pi2);
    check("ERR_IMAG locks with I = +m", corr > 0.999 && pq2 < 0.001 * pi2);
    if (corr > 0.999) n_lock++;

    $display("mechanisms: coherent=%0d decimated=%0d lock=%0d external=%0d mode_switch=%0d",
             n_coh, n_dec, n_lock, n_ext, n_mode);
    check("coherent detection happened", n_coh > 0);
    check("decimation happened", n_dec > 0);
    check("Costas lock happened", n_lock > 0);
    check("external path used", n_ext > 0);
    check("error mode switched", n_mode > 0);
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
