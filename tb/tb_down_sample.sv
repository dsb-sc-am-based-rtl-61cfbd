// tb_down_sample: random samples with a random valid pattern; a queue model
// keeps every FACTOR-th valid sample (the first after reset included) and
// each output strobe must match the next kept sample, one clock after its
// input. Run for factors 2 (default) and 3.
module tb_down_sample;
  localparam int DW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0;
  logic signed [DW-1:0] in_data = '0;
  logic v2, v3;
  logic signed [DW-1:0] d2, d3;

  down_sample #(.DW(DW))              dut2 (.clk, .rst_n, .in_valid, .in_data, .out_valid(v2), .out_data(d2));
  down_sample #(.DW(DW), .FACTOR(3))  dut3 (.clk, .rst_n, .in_valid, .in_data, .out_valid(v3), .out_data(d3));
  always #5 clk = ~clk;

  int cnt = 0, outs2 = 0, outs3 = 0;
  logic exp2_v, exp3_v;
  logic signed [DW-1:0] exp_d;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = DW'($urandom);
      exp2_v = in_valid && (cnt % 2 == 0);
      exp3_v = in_valid && (cnt % 3 == 0);
      exp_d  = in_data;
      if (in_valid) cnt++;
      @(posedge clk); #1;
      checks += 2;
      if (v2 != exp2_v || (exp2_v && d2 != exp_d)) begin
        failures++;
        if (failures < 10) $display("FAIL factor 2 at n=%0d", n);
      end
      if (v3 != exp3_v || (exp3_v && d3 != exp_d)) begin
        failures++;
        if (failures < 10) $display("FAIL factor 3 at n=%0d", n);
      end
      outs2 += int'(v2);
      outs3 += int'(v3);
    end
    // rate: outputs per valid input
    checks++;
    if (outs2 != (cnt + 1) / 2 || outs3 != (cnt + 2) / 3) failures++;
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
