// steady_state_loop_tb: runs z(k+1) = sin(128 z(k)) from z(0) = sin(10 deg)
// for 300 iterations, the steady-state experiment, and checks every z(k)
// against a model written from the formats: the angle 128*z(k) in degrees
// with 8 fraction bits (truncated), its sine rounded to 16 fraction bits.
// Checks the timing (z(0) three clocks after the start edge, then one z
// every three clocks, done with the last) and a short run from a negative
// start angle. Reports the fixed point reached against the exact iteration.
module steady_state_loop_tb;
  import trig_pkg::*;
  import trig_ref_pkg::*;

  localparam int STEPS = 20;
  localparam int PERIOD = TRIG_LATENCY + 1;

  logic         clk = 1'b0, rst, start;
  angle_t       start_angle;
  logic [15:0]  iterations;
  trig_result_t z;
  logic         z_valid, busy, done;
  int checks = 0, failures = 0;

  steady_state_loop #(.STEPS_PER_DEG(STEPS)) dut (
    .clk(clk), .rst(rst), .start(start), .start_angle(start_angle),
    .iterations(iterations), .z(z), .z_valid(z_valid), .busy(busy), .done(done)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int ang0, int n);
    logic [17:0] want;
    int          ang, cyc, last;
    real         ideal;
    want  = expected_result(ang0, 1'b0, STEPS);
    ideal = $sin(real'(ang0) / 256.0 * PI / 180.0);
    @(negedge clk);
    start_angle = 18'(ang0); iterations = 16'(n); start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0; start_angle = '0; iterations = '0;
    cyc = 0; last = 0;
    for (int k = 0; k <= n; k++) begin
      while (!z_valid && cyc < 1000) begin @(negedge clk); cyc++; end
      checks++;
      if (z != want) begin
        failures++;
        if (failures < 10) $display("k=%0d: got %h want %h", k, z, want);
      end
      checks++;
      if (cyc - last != PERIOD) begin
        failures++;
        $display("k=%0d after %0d clocks, want %0d", k, cyc - last, PERIOD);
      end
      checks++;
      if (done != (k == n)) failures++;
      last = cyc;
      // next value: angle 128*z in 9.8 degrees is the magnitude shifted right once
      ang   = int'(want[16:0]) >>> 1;
      if (want[17]) ang = -ang;
      want  = expected_result(ang, 1'b0, STEPS);
      ideal = $sin(128.0 * ideal * PI / 180.0);
      if (k == n)
        $display("start %0d/256 deg: z(%0d) = %0.6f, exact iteration %0.6f, difference %0.2f%%",
                 ang0, k, result_real(z), ideal, 100.0 * (result_real(z) - ideal) / ideal);
      @(negedge clk); cyc++;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (busy || z_valid) failures++;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; start_angle = '0; iterations = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(10 * 256, 300);
    run(-37 * 256 - 100, 20);
    run(90 * 256, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
