// compl_locator_tb: drives the whole angle range (every 7th angle word plus
// the quadrant boundaries) for sine and cosine and checks that the
// (sign, integer bit, address) triple names the right value: sin of the
// first-quadrant address (or 1.0 for the integer bit), with the sign, must
// equal the real-valued sine/cosine of the resolved input angle. Also
// checks that the address stays inside the table and that 0 and 180 degree
// results are not marked negative with a non-zero value.
module compl_locator_tb;
  import trig_ref_pkg::*;

  localparam int STEPS = 20;

  logic signed [17:0] angle;
  logic               sel_cos;
  logic [10:0]        addr;
  logic               entire, sign;
  int checks = 0, failures = 0;
  int n_q[4] = '{0, 0, 0, 0};
  int n_entire = 0, n_wrap = 0, n_neg = 0;

  compl_locator #(.STEPS_PER_DEG(STEPS)) dut (
    .angle(angle), .sel_cos(sel_cos), .addr(addr), .entire(entire), .sign(sign)
  );

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int d, bit c);
    real got, want, mag;
    int  g;
    logic signed [17:0] w;
    w       = 18'(d);
    d       = int'(w);  // angles outside the word wrap like the hardware input
    angle   = w;
    sel_cos = c;
    #1;
    mag  = entire ? 1.0 : $sin(real'(addr) / real'(STEPS) * PI / 180.0);
    got  = sign ? -mag : mag;
    want = ideal_trig(d, c, STEPS);
    checks++;
    if (got - want > 1.0e-9 || want - got > 1.0e-9 || int'(addr) >= 90 * STEPS
        || (entire && addr != 0)) begin
      failures++;
      if (failures < 10)
        $display("angle %0d/256 cos=%0d: addr %0d entire %0d sign %0d -> %f, want %f",
                 d, c, addr, entire, sign, got, want);
    end
    g = angle_steps(d, STEPS) + (c ? 90 * STEPS : 0);
    if (g >= 360 * STEPS) begin n_wrap++; g -= 360 * STEPS; end
    n_q[(g / (90 * STEPS)) % 4]++;
    if (entire) n_entire++;
    if (d < 0) n_neg++;
  endtask

  initial begin
    for (int d = -131072; d < 131072; d += 7) begin
      check_one(d, 1'b0);
      check_one(d, 1'b1);
    end
    foreach (n_q[i]) begin
      for (int k = -2; k <= 2; k++) begin
        check_one((i * 90 * 256) + k, 1'b0);
        check_one((i * 90 * 256) + k, 1'b1);
        check_one(-(i * 90 * 256) + k, 1'b0);
        check_one((360 + i * 30) * 256 + k, 1'b1);
      end
    end
    check_one(-131072, 1'b0);
    check_one(131071, 1'b1);
    check_one(90 * 256, 1'b0);
    checks++;
    if (!(entire && !sign && addr == 0)) failures++;
    check_one(270 * 256, 1'b0);
    checks++;
    if (!(entire && sign && addr == 0)) failures++;
    check_one(-90 * 256, 1'b0);
    checks++;
    if (!(entire && sign)) failures++;
    check_one(-90 * 256, 1'b1);
    checks++;
    if (!(addr == 0 && !entire)) failures++;
    // every quadrant, the integer bit, the 360-degree reduction and negative inputs seen
    foreach (n_q[i]) begin checks++; if (n_q[i] == 0) failures++; end
    checks++; if (n_entire == 0 || n_wrap == 0 || n_neg == 0) failures++;
    $display("quadrants %0d %0d %0d %0d, integer bit %0d, wrapped %0d", n_q[0], n_q[1], n_q[2], n_q[3], n_entire, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
