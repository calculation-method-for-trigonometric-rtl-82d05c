// trig_pkg: formats and constants shared by the table-lookup sine/cosine unit
// and by the two feedback systems built on it.
//
// Angle word (18 bits, two's complement): bit 17 sign, bits 16..8 whole
// degrees, bits 7..0 fraction of a degree (1/256 degree per LSB). The angle
// is resolved to table steps of 1/STEPS_PER_DEG degree (0.05 degree for the
// default of 20 steps per degree).
//
// Result word (18 bits, sign and magnitude): bit 17 sign, bit 16 the integer
// part (set only for a magnitude of exactly 1.0), bits 15..0 the fraction.
//
// The table holds round(sin(i / STEPS_PER_DEG degrees) * 2^16) for the first
// quadrant only, i = 0 .. 90*STEPS_PER_DEG-1. A value that would round to
// 2^16 (the last few entries) is held at 2^16-1, since 1.0 itself is only
// produced for exactly 90 and 270 degrees through the integer bit. The table
// is computed at elaboration with integer arithmetic (an odd Taylor series
// in Q2.30 fixed point), so no data file is needed and a different step
// count regenerates it.
package trig_pkg;

  localparam int unsigned ANGLE_W     = 18;
  localparam int unsigned ANGLE_FRAC  = 8;
  localparam int unsigned RESULT_W    = 18;
  localparam int unsigned RESULT_FRAC = 16;
  localparam int unsigned TRIG_LATENCY = 2;   // clock edges from angle to result

  typedef logic signed [ANGLE_W-1:0] angle_t;

  typedef struct packed {
    logic        sign;    // 1: negative
    logic        entire;  // integer bit, 1 only for a magnitude of 1.0
    logic [15:0] frac;    // fractional magnitude, 2^-16 per LSB
  } trig_result_t;

  // Sign-and-magnitude result to two's complement, same Q2.16 scaling.
  function automatic logic signed [RESULT_W-1:0] result_to_tc(trig_result_t r);
    logic signed [RESULT_W-1:0] mag;
    mag = {1'b0, r.entire, r.frac};
    return r.sign ? -mag : mag;
  endfunction

  localparam longint HALF_PI_Q30 = 64'd1686629713;  // round(pi/2 * 2^30)

  // round(sin(i * 90 / quarter_steps degrees) * 2^16), clamped to 16 bits.
  // x = i * (pi/2) / quarter_steps in Q2.30; sin(x) by its Taylor series to
  // the x^17 term, which is far below 2^-16 for x <= pi/2.
  function automatic logic [15:0] sine_entry(int unsigned i, int unsigned quarter_steps);
    longint x, x2, term, sum, r;
    x    = (longint'(i) * HALF_PI_Q30 + longint'(quarter_steps) / 64'sd2) / longint'(quarter_steps);
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int k = 1; k <= 8; k++) begin
      term = -(((term * x2) >>> 30) / longint'((2 * k) * (2 * k + 1)));
      sum  = sum + term;
    end
    r = (sum + 64'sd8192) >>> 14;  // Q30 -> Q16, rounded
    if (r > 65535) r = 65535;
    if (r < 0) r = 0;
    return 16'(r);
  endfunction

endpackage
