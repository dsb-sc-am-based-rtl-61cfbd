// tb_sine_rom: reads every word of the DDS sine table through both ports and
// compares it with round(32767*sin(2*pi*(i+0.5)/1024)) computed with real
// arithmetic, allowing one LSB. Also checks the one-clock read latency and
// the quarter-turn relation between a sine and a cosine read.
module tb_sine_rom;
  localparam int AW = 10, DW = 16, N = 2**AW;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic signed [DW-1:0] rd_a, rd_b;
  int checks = 0, failures = 0;

  sine_rom #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_sin(int i);
    return $rtoi($floor(32767.0 * $sin(2.0 * PI * (real'(i) + 0.5) / real'(N)) + 0.5));
  endfunction

  task automatic check(string what, int got, int exp, int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      addr_a = AW'(i);
      addr_b = AW'(i + N / 4);
      // before the edge the outputs still show the previous address
      if (i > 0) check("latency", int'(rd_a), ref_sin(i - 1), 1);
      @(posedge clk); #1;
      check("port a", int'(rd_a), ref_sin(i), 1);
      check("port b = cos", int'(rd_b),
            $rtoi($floor(32767.0 * $cos(2.0 * PI * (real'(i) + 0.5) / real'(N)) + 0.5)), 1);
    end
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
