// trig_system_tb: end-to-end test of the top level at its default size
// (0.05-degree table, 1800 words). All three parts run at once:
//   - the stand-alone unit gets a stream of angles, one per clock, covering
//     sine and cosine, negative angles, all four quadrants, the integer bit
//     (90/270 degrees), the 360-degree reduction and zero results at 0/180
//     degrees; every result is checked two clocks later;
//   - the rotation system runs 1000 iterations with gamma = 1 degree;
//   - the steady-state system runs 300 iterations from sin(10 deg).
// Each z(k) of both systems is checked against integer models of the
// equations. Every mechanism is counted and one never exercised is a
// failure.
module trig_system_tb;
  import trig_pkg::*;
  import trig_ref_pkg::*;

  localparam int STEPS = 20;

  logic               clk = 1'b0, rst;
  angle_t             data;
  logic               sel_cos;
  trig_result_t       result;
  logic               dl_start, dl_z_valid, dl_busy, dl_done;
  logic signed [9:0]  dl_a;
  logic        [3:0]  dl_t0;
  logic signed [17:0] dl_z1_init, dl_z2_init, dl_z1, dl_z2;
  logic        [15:0] dl_iterations;
  logic               ss_start, ss_z_valid, ss_busy, ss_done;
  angle_t             ss_start_angle;
  logic        [15:0] ss_iterations;
  trig_result_t       ss_z;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_sin = 0, n_cos = 0, n_neg = 0, n_one = 0, n_wrap = 0, n_zero = 0;
  int n_q[4] = '{0, 0, 0, 0};
  int n_dl_iter = 0, n_ss_iter = 0, n_dl_done = 0, n_ss_done = 0;
  bit go = 0;        // set once reset has been released
  bit unit_done = 0, dl_finished = 0, ss_finished = 0;

  trig_system dut (
    .clk(clk), .rst(rst), .data(data), .sel_cos(sel_cos), .result(result),
    .dl_start(dl_start), .dl_a(dl_a), .dl_t0(dl_t0), .dl_z1_init(dl_z1_init),
    .dl_z2_init(dl_z2_init), .dl_iterations(dl_iterations), .dl_z1(dl_z1),
    .dl_z2(dl_z2), .dl_z_valid(dl_z_valid), .dl_busy(dl_busy), .dl_done(dl_done),
    .ss_start(ss_start), .ss_start_angle(ss_start_angle), .ss_iterations(ss_iterations),
    .ss_z(ss_z), .ss_z_valid(ss_z_valid), .ss_busy(ss_busy), .ss_done(ss_done)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stand-alone unit: one angle per clock, result checked 2 clocks later
  initial begin
    logic [17:0] want_q;
    bit          live_q;
    int          g, d;
    bit          c;
    live_q = 0; want_q = '0;
    data = '0; sel_cos = 1'b0;
    wait (go);
    for (int i = 0; i < 6000; i++) begin
      if (i < 40) begin
        d = (i / 2 - 10) * 45 * 256;      // multiples of 45 degrees, both signs
        c = 1'(i);
      end else begin
        d = int'($signed(18'($urandom)));
        c = 1'($urandom);
      end
      @(negedge clk);
      data = 18'(d); sel_cos = c;
      @(posedge clk);
      #1;
      if (live_q) begin
        checks++;
        if (result != want_q) begin
          failures++;
          if (failures < 10) $display("unit: got %h want %h", result, want_q);
        end
        if (result[16:0] == 0) n_zero++;
      end
      want_q = expected_result(d, c, STEPS);
      live_q = 1;
      g = angle_steps(d, STEPS) + (c ? 90 * STEPS : 0);
      if (g >= 360 * STEPS) begin n_wrap++; g -= 360 * STEPS; end
      if (g % (90 * STEPS) == 0 && (g / (90 * STEPS)) % 2 == 1) n_one++;
      n_q[(g / (90 * STEPS)) % 4]++;
      if (d < 0) n_neg++;
      if (c) n_cos++; else n_sin++;
    end
    @(posedge clk); #1;
    checks++;
    if (result != want_q) failures++;
    unit_done = 1;
  end

  // ---- rotation system: gamma = 0.5 * 2.0 = 1 degree, 1000 iterations
  initial begin
    longint s, c, m1, m2, n1;
    int     ang;
    dl_start = 1'b0; dl_a = 10'sd256; dl_t0 = 4'd4;
    dl_z1_init = 18'sd65536; dl_z2_init = 18'sd0; dl_iterations = 16'd1000;
    ang = (256 * 4) >>> 2;
    s = longint'(result_int(expected_result(ang, 1'b0, STEPS)));
    c = longint'(result_int(expected_result(ang, 1'b1, STEPS)));
    m1 = 65536; m2 = 0;
    wait (go);
    @(negedge clk); dl_start = 1'b1;
    @(negedge clk); dl_start = 1'b0;
    while (!dl_finished) begin
      @(negedge clk);
      if (dl_z_valid) begin
        n1 = (c * m1 + s * m2) >>> 16;
        m2 = (c * m2 - s * m1) >>> 16;
        m1 = n1;
        n_dl_iter++;
        checks++;
        if (longint'(dl_z1) != m1 || longint'(dl_z2) != m2) begin
          failures++;
          if (failures < 10) $display("rotation k=%0d: got %0d %0d want %0d %0d", n_dl_iter, dl_z1, dl_z2, m1, m2);
        end
      end
      if (dl_done) begin n_dl_done++; dl_finished = 1; end
    end
    checks++;
    if (n_dl_iter != 1000) failures++;
  end

  // ---- steady-state system: z(0) = sin(10 deg), 300 iterations
  initial begin
    logic [17:0] want;
    int          ang;
    ss_start = 1'b0; ss_start_angle = 18'(10 * 256); ss_iterations = 16'd300;
    want = expected_result(10 * 256, 1'b0, STEPS);
    wait (go);
    @(negedge clk); ss_start = 1'b1;
    @(negedge clk); ss_start = 1'b0;
    while (!ss_finished) begin
      @(negedge clk);
      if (ss_z_valid) begin
        n_ss_iter++;
        checks++;
        if (ss_z != want) begin
          failures++;
          if (failures < 10) $display("steady k=%0d: got %h want %h", n_ss_iter - 1, ss_z, want);
        end
        ang  = int'(want[16:0]) >>> 1;
        if (want[17]) ang = -ang;
        want = expected_result(ang, 1'b0, STEPS);
      end
      if (ss_done) begin n_ss_done++; ss_finished = 1; end
    end
    checks++;
    if (n_ss_iter != 301) failures++;
    $display("steady state: z(300) = %0.6f", result_real(ss_z));
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (result != '0 || dl_busy || ss_busy) failures++;   // reset state
    rst = 1'b0;
    go = 1;
    wait (unit_done && dl_finished && ss_finished);
    $display("sine %0d cosine %0d negative %0d integer-bit %0d wrapped %0d zero %0d quadrants %0d %0d %0d %0d",
             n_sin, n_cos, n_neg, n_one, n_wrap, n_zero, n_q[0], n_q[1], n_q[2], n_q[3]);
    $display("rotation iterations %0d (done %0d), steady-state values %0d (done %0d)",
             n_dl_iter, n_dl_done, n_ss_iter, n_ss_done);
    foreach (n_q[i]) begin checks++; if (n_q[i] == 0) failures++; end
    checks++; if (n_sin == 0)  failures++;
    checks++; if (n_cos == 0)  failures++;
    checks++; if (n_neg == 0)  failures++;
    checks++; if (n_one == 0)  failures++;
    checks++; if (n_wrap == 0) failures++;
    checks++; if (n_zero == 0) failures++;
    checks++; if (n_dl_iter == 0 || n_dl_done == 0) failures++;
    checks++; if (n_ss_iter == 0 || n_ss_done == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
