// tb_fir_lpf: checks the low-pass FIR
//  - impulse response: an input of 64*k gives k*h[i], h = 1,2,..,8,..,2,1;
//  - unity DC gain: a constant input reaches the same constant after 15 samples;
//  - rejection: a tone at a quarter of the sample rate (where the mixer
//    image falls in the receiver) is removed completely once the line is full;
//  - random samples with gaps in in_valid against a real-arithmetic convolution;
//  - one output per valid input, registered (one clock of latency).
module tb_fir_lpf;
  localparam int DW = 16, NT = 15, SH = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW-1:0] in_data = '0, out_data;
  logic out_valid;
  int checks = 0, failures = 0;
  int hist [NT];

  fir_lpf #(.DW(DW), .NTAPS(NT), .OUT_SHIFT(SH)) dut (.*);
  always #5 clk = ~clk;

  function automatic int h(int i);
    int mid = NT / 2;
    return mid + 1 - ((i > mid) ? i - mid : mid - i);
  endfunction

  function automatic int model();
    real acc = 0.0;
    for (int i = 0; i < NT; i++) acc += real'(h(i)) * real'(hist[i]);
    acc = $floor(acc / 64.0 + 0.5);
    if (acc > 32767.0) acc = 32767.0;
    if (acc < -32768.0) acc = -32768.0;
    return $rtoi(acc);
  endfunction

  task automatic check(string what, int got, int exp, int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // push one sample; returns the filter output
  task automatic push(int x, bit v, output int y);
    @(negedge clk);
    in_valid = v;
    in_data = DW'(x);
    if (v) begin
      for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = x;
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid != v) begin
      failures++;
      $display("FAIL out_valid");
    end
    y = int'(out_data);
    in_valid = 1'b0;
  endtask

  int y;
  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // impulse
    push(64 * 100, 1, y);
    check("impulse 0", y, 100 * h(0), 0);
    for (int i = 1; i < NT + 3; i++) begin
      push(0, 1, y);
      check("impulse", y, (i < NT) ? 100 * h(i) : 0, 0);
    end
    // DC gain
    for (int i = 0; i < NT + 5; i++) begin
      push(-12000, 1, y);
      if (i >= NT - 1) check("dc", y, -12000, 0);
    end
    // quarter-rate tone: 20000 * cos(pi/2 n)
    for (int i = 0; i < 40; i++) begin
      push((i % 4 == 0) ? 20000 : (i % 4 == 2) ? -20000 : 0, 1, y);
      if (i >= NT) check("fs/4 rejected", y, 0, 0);
    end
    // random with gaps
    for (int i = 0; i < 3000; i++) begin
      automatic bit v = ($urandom_range(0, 2) != 0);
      push(int'($signed(16'($urandom))), v, y);
      if (v) check("random", y, model(), 0);
    end
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
