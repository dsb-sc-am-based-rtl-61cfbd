// tb_dds: drives the DDS with a sequence of tuning words (fixed, then random
// per sample as the Costas loop does) and checks, every clock:
//  - the phase accumulator against an integer model, phase(n+1) = phase(n) + inc(n);
//  - cos_o/sin_o against real-arithmetic cos/sin of the truncated phase of the
//    previous clock (one clock of ROM latency), within one LSB;
//  - the output frequency: with inc = 2^28 the cosine repeats every 16 clocks.
module tb_dds;
  localparam int PW = 32, AW = 10, DW = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PW-1:0] phase_inc = '0, phase_o;
  logic signed [DW-1:0] cos_o, sin_o;
  logic [PW-1:0] model_phase, prev_phase;
  int checks = 0, failures = 0;
  int period_cos [$];

  dds #(.PHASE_W(PW), .LUT_AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_wave(logic [PW-1:0] ph, bit is_cos);
    real ang;
    ang = 2.0 * PI * (real'(ph[PW-1 -: AW]) + 0.5) / real'(2**AW);
    return $rtoi($floor(32767.0 * (is_cos ? $cos(ang) : $sin(ang)) + 0.5));
  endfunction

  task automatic check(string what, longint got, longint exp, longint tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  task automatic step(logic [PW-1:0] inc);
    @(negedge clk);
    phase_inc = inc;
    prev_phase = model_phase;
    @(posedge clk); #1;
    model_phase = model_phase + inc;
    check("phase", longint'(phase_o), longint'(model_phase), 0);
    check("cos", longint'(cos_o), longint'(ref_wave(prev_phase, 1'b1)), 1);
    check("sin", longint'(sin_o), longint'(ref_wave(prev_phase, 1'b0)), 1);
  endtask

  initial begin
    model_phase = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // fixed frequency, fs/16
    for (int n = 0; n < 64; n++) begin
      step(32'h1000_0000);
      period_cos.push_back(int'(cos_o));
    end
    for (int n = 16; n < 64; n++)
      check("period 16", longint'(period_cos[n]), longint'(period_cos[n-16]), 0);
    // random tuning word every clock
    for (int n = 0; n < 3000; n++) step($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
