// beta_unit_tb: random and corner Q2.16 operands; z2_next must equal
// floor((c*z2 - s*z1) / 2^16), saturated to 18 bits, worked out with 64-bit
// integers.
module beta_unit_tb;
  logic signed [17:0] c, s, z1, z2, z2_next;
  int checks = 0, failures = 0, n_sat = 0;

  beta_unit dut (.c(c), .s(s), .z1(z1), .z2(z2), .z2_next(z2_next));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint vc, longint vs, longint v1, longint v2);
    longint acc, want;
    c = 18'(vc); s = 18'(vs); z1 = 18'(v1); z2 = 18'(v2);
    #1;
    acc  = longint'(c) * longint'(z2) - longint'(s) * longint'(z1);
    want = acc >>> 16;
    if (want > 131071)  begin want = 131071;  n_sat++; end
    if (want < -131072) begin want = -131072; n_sat++; end
    checks++;
    if (longint'(z2_next) != want) begin
      failures++;
      if (failures < 10) $display("c %0d s %0d z1 %0d z2 %0d: got %0d want %0d", c, s, z1, z2, z2_next, want);
    end
  endtask

  initial begin
    // a rotation by 30 degrees of (1, 0) and (0, 1)
    check(56756, 32768, 65536, 0);
    check(56756, 32768, 0, 65536);
    check(65536, 0, -65536, 65536);
    // extremes, which saturate
    check(-131072, -131072, -131072, -131072);
    check(131071, -131072, 131071, -131072);
    check(-131072, 131071, 131071, -131072);
    for (int i = 0; i < 20000; i++)
      check(longint'($signed(18'($urandom))), longint'($signed(18'($urandom))),
            longint'($signed(18'($urandom))), longint'($signed(18'($urandom))));
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
