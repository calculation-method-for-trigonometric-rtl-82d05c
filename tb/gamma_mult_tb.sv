// gamma_mult_tb: all 2^14 combinations of a (signed, 9 fraction bits) and
// t0 (unsigned, 1 fraction bit); gamma must equal a*t0 in the 1.3.10 format,
// checked as real numbers.
module gamma_mult_tb;
  logic signed [9:0]  a;
  logic        [3:0]  t0;
  logic signed [13:0] gamma;
  int checks = 0, failures = 0;

  gamma_mult dut (.a(a), .t0(t0), .gamma(gamma));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real want, got;
    for (int ia = -512; ia < 512; ia++) begin
      for (int it = 0; it < 16; it++) begin
        a  = 10'(ia);
        t0 = 4'(it);
        #1;
        want = (real'(ia) / 512.0) * (real'(it) / 2.0);
        got  = real'(gamma) / 1024.0;
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10) $display("a %0d t0 %0d: got %f want %f", ia, it, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
