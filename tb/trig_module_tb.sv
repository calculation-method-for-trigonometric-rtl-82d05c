// trig_module_tb: streams one angle per clock (directed boundary angles,
// then random angles, random sine/cosine selection) through the unit and
// compares every result, exactly TRIG_LATENCY = 2 clocks later, with the
// sine/cosine of the resolved angle worked out in real arithmetic and
// rounded to 16 fraction bits. Also checks reset and counts how often each
// case (negative angle, each quadrant, integer bit, 360-degree reduction,
// sine, cosine) was exercised. A second instance with twice the table
// resolution (40 steps per degree) gets the same stream and is checked
// against the same reference at that resolution.
module trig_module_tb;
  import trig_pkg::*;
  import trig_ref_pkg::*;

  localparam int STEPS = 20;
  localparam int LAT   = 2;

  logic         clk = 1'b0, rst;
  angle_t       data;
  logic         sel_cos;
  trig_result_t result, result_fine;
  int checks = 0, failures = 0;
  // results in flight: an angle driven before edge n is checked after edge
  // n+LAT-1, i.e. it leaves the unit at the LAT-th edge counted from the
  // one that first samples it
  localparam int DEPTH = LAT - 1;
  logic [17:0]  pipe_want [DEPTH];
  logic [17:0]  pipe_fine [DEPTH];
  logic         pipe_live [DEPTH];
  int n_neg = 0, n_cos = 0, n_sin = 0, n_one = 0, n_wrap = 0;
  int n_q[4] = '{0, 0, 0, 0};

  trig_module #(.STEPS_PER_DEG(STEPS)) dut (
    .clk(clk), .rst(rst), .data(data), .sel_cos(sel_cos), .result(result)
  );

  // the same unit reconfigured for 0.025-degree steps (3600-word table)
  trig_module #(.STEPS_PER_DEG(2 * STEPS)) dut_fine (
    .clk(clk), .rst(rst), .data(data), .sel_cos(sel_cos), .result(result_fine)
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive angle d with selection c before the next edge, check the result
  // that leaves the pipeline at that edge
  task automatic step(int d, bit c, bit live);
    int g;
    data    = 18'(d);
    sel_cos = c;
    @(posedge clk);
    #1;
    if (pipe_live[DEPTH-1]) begin
      checks++;
      if (result != pipe_want[DEPTH-1]) begin
        failures++;
        if (failures < 10) $display("got %h want %h", result, pipe_want[DEPTH-1]);
      end
      checks++;
      if (result_fine != pipe_fine[DEPTH-1]) begin
        failures++;
        if (failures < 10) $display("fine: got %h want %h", result_fine, pipe_fine[DEPTH-1]);
      end
    end
    for (int i = DEPTH - 1; i > 0; i--) begin
      pipe_want[i] = pipe_want[i-1];
      pipe_fine[i] = pipe_fine[i-1];
      pipe_live[i] = pipe_live[i-1];
    end
    pipe_want[0] = expected_result(int'(data), c, STEPS);
    pipe_fine[0] = expected_result(int'(data), c, 2 * STEPS);
    pipe_live[0] = live;
    if (live) begin
      g = angle_steps(int'(data), STEPS) + (c ? 90 * STEPS : 0);
      if (g >= 360 * STEPS) begin n_wrap++; g -= 360 * STEPS; end
      if (g % (90 * STEPS) == 0 && (g / (90 * STEPS)) % 2 == 1) n_one++;
      n_q[(g / (90 * STEPS)) % 4]++;
      if (int'(data) < 0) n_neg++;
      if (c) n_cos++; else n_sin++;
    end
  endtask

  initial begin
    foreach (pipe_live[i]) begin pipe_live[i] = 1'b0; pipe_want[i] = '0; pipe_fine[i] = '0; end
    rst = 1'b1; data = 18'(90 * 256); sel_cos = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (result != '0) failures++;   // reset clears the output
    rst = 1'b0;
    // directed: multiples of 45 degrees, both signs, both functions
    for (int k = -11; k <= 11; k++) begin
      step(k * 45 * 256, 1'b0, 1'b1);
      step(k * 45 * 256, 1'b1, 1'b1);
    end
    step(10 * 256, 1'b0, 1'b1);          // sin 10
    step(30 * 256, 1'b0, 1'b1);          // sin 30 = 0.5
    step(60 * 256, 1'b1, 1'b1);          // cos 60 = 0.5
    step(-131072, 1'b0, 1'b1);           // -512 degrees
    step(131071, 1'b1, 1'b1);            // largest angle
    // random stream
    for (int i = 0; i < 20000; i++) step(int'($signed(18'($urandom))), 1'($urandom), 1'b1);
    repeat (DEPTH) step(0, 1'b0, 1'b0);
    // spot values as numbers
    checks++; if (expected_result(30 * 256, 1'b0, STEPS) != 18'h08000) failures++;
    foreach (n_q[i]) begin checks++; if (n_q[i] == 0) failures++; end
    checks++; if (n_neg == 0 || n_cos == 0 || n_sin == 0 || n_one == 0 || n_wrap == 0) failures++;
    $display("negative %0d sine %0d cosine %0d integer-bit %0d wrapped %0d quadrants %0d %0d %0d %0d",
             n_neg, n_sin, n_cos, n_one, n_wrap, n_q[0], n_q[1], n_q[2], n_q[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
