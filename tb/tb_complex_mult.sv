// tb_complex_mult: random and corner-case complex operands; the expected
// product is computed in real arithmetic, (ar + j ai)(br + j bi), scaled by
// 2^-15, rounded and clipped to the 16-bit range.
module tb_complex_mult;
  localparam int DW = 16;
  logic signed [DW-1:0] a_r, a_i, b_r, b_i, p_r, p_i;
  int checks = 0, failures = 0;

  complex_mult #(.DW(DW)) dut (.*);

  function automatic int ref_q15(real v);
    real r;
    r = $floor(v / 32768.0 + 0.5);
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return $rtoi(r);
  endfunction

  task automatic apply(int ar, int ai, int br, int bi);
    a_r = DW'(ar); a_i = DW'(ai); b_r = DW'(br); b_i = DW'(bi);
    #1;
    checks += 2;
    if (int'(p_r) != ref_q15(real'(ar) * real'(br) - real'(ai) * real'(bi)) ||
        int'(p_i) != ref_q15(real'(ar) * real'(bi) + real'(ai) * real'(br))) begin
      failures++;
      if (failures < 10)
        $display("FAIL (%0d,%0d)*(%0d,%0d): got (%0d,%0d)", ar, ai, br, bi, p_r, p_i);
    end
  endtask

  initial begin
    apply(32767, 0, 0, 32767);           // 1 * j = j
    apply(0, 32767, 0, 32767);           // j * j = -1
    apply(-32768, -32768, -32768, 32767);
    apply(-32768, 32767, -32768, -32768); // saturates
    apply(16384, 16384, 16384, -16384);  // (1+j)(1-j)/4 = 0.5
    for (int n = 0; n < 5000; n++)
      apply(int'($signed(16'($urandom))), int'($signed(16'($urandom))),
            int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
