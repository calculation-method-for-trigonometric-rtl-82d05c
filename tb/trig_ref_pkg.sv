// trig_ref_pkg: reference arithmetic for the testbenches, written from the
// number formats alone (real-valued sine, no table and no quadrant folding).
//   angle word : 18-bit two's complement, 8 fraction bits of a degree
//   result word: sign, integer bit, 16 fraction bits (sign and magnitude)
// The reference resolves an angle the way the unit is specified to:
// steps = floor(|angle| * STEPS / 256 ...) in table steps of 1/STEPS degree.
package trig_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Table steps of an angle word, before the cosine shift.
  function automatic int angle_steps(int data, int steps_per_deg);
    int mag;
    mag = (data < 0) ? -data : data;
    return (mag * steps_per_deg) >>> 8;
  endfunction

  // Exact (real) value the unit approximates for an angle word.
  function automatic real ideal_trig(int data, bit sel_cos, int steps_per_deg);
    int  g;
    real v;
    g = angle_steps(data, steps_per_deg);
    if (sel_cos) g = g + 90 * steps_per_deg;
    v = $sin(real'(g) / real'(steps_per_deg) * PI / 180.0);
    if (!sel_cos && data < 0) v = -v;
    return v;
  endfunction

  // The 16-bit table word expected for first-quadrant step i.
  function automatic int table_word(int i, int steps_per_deg);
    real v;
    int  r;
    v = $sin(real'(i) / real'(steps_per_deg) * PI / 180.0) * 65536.0;
    r = int'($floor(v + 0.5));
    if (r > 65535) r = 65535;
    return r;
  endfunction

  // Result word expected for an angle word: the exact sine/cosine of the
  // resolved angle, rounded to 16 fraction bits, held below 1.0 except at
  // exactly 1.0, positive for zero.
  function automatic logic [17:0] expected_result(int data, bit sel_cos, int steps_per_deg);
    real v, m;
    int  r;
    logic neg;
    v   = ideal_trig(data, sel_cos, steps_per_deg);
    neg = (v < 0.0);
    m   = neg ? -v : v;
    if (m > 1.0 - 1.0e-12) r = 65536;
    else begin
      r = int'($floor(m * 65536.0 + 0.5));
      if (r > 65535) r = 65535;
    end
    if (r == 0) neg = 1'b0;
    return {neg, 17'(r)};
  endfunction

  function automatic real result_real(logic [17:0] r);
    real m;
    m = real'(r[16:0]) / 65536.0;
    return r[17] ? -m : m;
  endfunction

  function automatic int result_int(logic [17:0] r);
    int m;
    m = int'(r[16:0]);
    return r[17] ? -m : m;
  endfunction

endpackage
