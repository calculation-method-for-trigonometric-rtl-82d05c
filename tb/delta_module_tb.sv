// delta_module_tb: runs the rotation system for several (a, t0, z1(0),
// z2(0), N) cases, including the 1000-iteration run used to show the
// cumulative error, and checks every z(k) against an integer model written
// from the equations: gamma = a*t0, sin/cos of the resolved angle rounded to
// 16 fraction bits, products floored to 16 fraction bits. Checks the timing
// too: z(1) appears at the third clock edge after the start edge, then one z per
// clock, done with the last one, busy throughout. Reports how far the
// 1000-step fixed-point orbit drifts from the exact rotation.
module delta_module_tb;
  import trig_pkg::*;
  import trig_ref_pkg::*;

  localparam int STEPS = 20;

  logic               clk = 1'b0, rst, start;
  logic signed [9:0]  a;
  logic        [3:0]  t0;
  logic signed [17:0] z1_init, z2_init, z1, z2;
  logic        [15:0] iterations;
  logic               z_valid, busy, done;
  int checks = 0, failures = 0;

  delta_module #(.STEPS_PER_DEG(STEPS)) dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .t0(t0), .z1_init(z1_init),
    .z2_init(z2_init), .iterations(iterations), .z1(z1), .z2(z2),
    .z_valid(z_valid), .busy(busy), .done(done)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  task automatic run(int va, int vt0, int v1, int v2, int n);
    int     gamma, ang, cyc;
    longint s, c, m1, m2, n1;
    real    gdeg, e1, e2, r1, r2, err, max_err;
    gamma = va * vt0;                  // Q3.10
    ang   = gamma >>> 2;               // 9.8 degrees
    s = longint'(result_int(expected_result(ang, 1'b0, STEPS)));
    c = longint'(result_int(expected_result(ang, 1'b1, STEPS)));
    m1 = v1; m2 = v2;
    gdeg = real'(gamma) / 1024.0 * PI / 180.0;
    e1 = real'(v1) / 65536.0; e2 = real'(v2) / 65536.0;
    max_err = 0.0;
    @(negedge clk);
    a = 10'(va); t0 = 4'(vt0); z1_init = 18'(v1); z2_init = 18'(v2); iterations = 16'(n);
    start = 1'b1;
    @(posedge clk);   // start edge
    @(negedge clk);
    start = 1'b0;
    a = '0; t0 = '0; z1_init = '0; z2_init = '0; iterations = '0;  // latched at start
    checks++; if (!busy) failures++;
    cyc = 0;          // clock edges after the start edge
    for (int k = 1; k <= n; k++) begin
      while (!z_valid) begin
        @(negedge clk); cyc++;
        if (cyc > 10) break;
      end
      n1 = sat18((c * m1 + s * m2) >>> 16);
      m2 = sat18((c * m2 - s * m1) >>> 16);
      m1 = n1;
      r1 =  $cos(gdeg) * e1 + $sin(gdeg) * e2;
      r2 = -$sin(gdeg) * e1 + $cos(gdeg) * e2;
      e1 = r1; e2 = r2;
      err = $sqrt((real'(m1) / 65536.0 - e1) ** 2 + (real'(m2) / 65536.0 - e2) ** 2);
      if (err > max_err) max_err = err;
      checks++;
      if (!z_valid || longint'(z1) != m1 || longint'(z2) != m2) begin
        failures++;
        if (failures < 10) $display("k=%0d: valid %0d z1 %0d z2 %0d want %0d %0d", k, z_valid, z1, z2, m1, m2);
      end
      if (k == 1) begin
        checks++;
        if (cyc != 3) begin failures++; $display("first z after %0d clocks, want 3", cyc); end
      end
      checks++;
      if (done != (k == n)) failures++;
      @(negedge clk); cyc = 0;
    end
    if (n == 0) begin
      while (!done && cyc < 10) begin @(negedge clk); cyc++; end
      checks++; if (!done) failures++;
      @(negedge clk);
    end
    checks++;
    if (z_valid || busy) failures++;   // stopped after n iterations
    $display("gamma %0.4f deg, %0d iterations: z1 %0d z2 %0d, largest distance from exact rotation %0.6f",
             real'(gamma) / 1024.0, n, z1, z2, max_err);
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; a = '0; t0 = '0; z1_init = '0; z2_init = '0; iterations = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(256, 4, 65536, 0, 1000);         // a = 0.5, t0 = 2.0: gamma = 1 degree
    run(-300, 15, 0, 65536, 200);        // negative gamma
    run(511, 15, 30000, -40000, 100);    // largest gamma, 7.49 degrees
    run(100, 3, 65536, 65536, 1);
    run(100, 3, 65536, 65536, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
