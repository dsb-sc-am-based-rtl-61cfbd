// tb_dsbsc_modulator: random and corner-case message/carrier samples. The
// expected outputs are the real products m*cos and m*sin rounded to Q1.15
// (and clipped at +1 - 2^-15), appearing one clock after the inputs.
module tb_dsbsc_modulator;
  localparam int DW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] message_i = '0, carrier_cos_i = '0, carrier_sin_i = '0;
  logic signed [DW-1:0] mod_i_o, mod_q_o;
  int checks = 0, failures = 0;

  dsbsc_modulator #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  function automatic int ref_prod(int a, int b);
    real p;
    p = $floor(real'(a) * real'(b) / 32768.0 + 0.5);
    if (p > 32767.0) p = 32767.0;
    return $rtoi(p);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(int m, int c, int s);
    @(negedge clk);
    message_i = DW'(m); carrier_cos_i = DW'(c); carrier_sin_i = DW'(s);
    @(posedge clk); #1;
    check("I", int'(mod_i_o), ref_prod(m, c));
    check("Q", int'(mod_q_o), ref_prod(m, s));
  endtask

  initial begin
    @(posedge clk); #1;
    check("reset I", int'(mod_i_o), 0);
    @(negedge clk) rst_n = 1'b1;
    apply(-32768, -32768, 32767);
    apply(32767, 32767, -32768);
    apply(16384, 16384, -16384);
    apply(0, 12345, -1);
    for (int n = 0; n < 2000; n++)
      apply(int'($signed(16'($urandom))), int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
