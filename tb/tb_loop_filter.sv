// tb_loop_filter: applies a step, an impulse and a random error sequence and
// compares v_o with the difference equations of the PI loop filter,
// evaluated in real arithmetic with K1 = 0.1979 and K2 = 0.00592 quantised to
// 20 fraction bits: vi(n) = K2 e(n) + vi(n-1), v(n) = K1 e(n) + vi(n).
module tb_loop_filter;
  localparam int DW = 16, CF = 20, OUT_W = 48;
  localparam int K1_Q = 207513, K2_Q = 6208;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] err_i = '0;
  logic signed [OUT_W-1:0] v_o, integ_o;
  real k1, k2, vi;
  int checks = 0, failures = 0;

  loop_filter #(.DW(DW), .COEF_FRAC(CF), .K1_Q(K1_Q), .K2_Q(K2_Q), .OUT_W(OUT_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic apply(int e);
    real v_exp;
    @(negedge clk);
    err_i = DW'(e);
    #1;
    // model output in units of 2^-(DW-1+CF)
    v_exp = k1 * real'(e) + k2 * real'(e) + vi;
    checks++;
    if (real'(v_o) != v_exp) begin
      failures++;
      if (failures < 10) $display("FAIL e=%0d: v=%0d expected %0.1f", e, v_o, v_exp);
    end
    @(posedge clk);
    vi = vi + k2 * real'(e);
  endtask

  initial begin
    k1 = $floor(0.1979 * 1048576.0 + 0.5);
    k2 = $floor(0.00592 * 1048576.0 + 0.5);
    vi = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // impulse: proportional + one integrator step, then integrator holds
    apply(10000);
    for (int n = 0; n < 5; n++) apply(0);
    // step
    for (int n = 0; n < 50; n++) apply(-3000);
    // random
    for (int n = 0; n < 3000; n++) apply(int'($signed(16'($urandom))));
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
