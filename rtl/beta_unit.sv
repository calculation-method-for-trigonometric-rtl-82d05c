// beta_unit: the BETA stage of the rotation system,
//   z2(k+1) = -sin(gamma) * z1(k) + cos(gamma) * z2(k).
//
// Same number format as alpha_unit: 18-bit two's complement Q2.16 words,
// full-precision difference of the two products, then truncation (floor) to
// 16 fraction bits and saturation to 18 bits (this design's choices).
// Combinational.
module beta_unit
  import trig_pkg::*;
(
  input  logic signed [RESULT_W-1:0] c,
  input  logic signed [RESULT_W-1:0] s,
  input  logic signed [RESULT_W-1:0] z1,
  input  logic signed [RESULT_W-1:0] z2,
  output logic signed [RESULT_W-1:0] z2_next
);

  localparam int unsigned ACC_W = 2 * RESULT_W + 1;
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'(2 ** (RESULT_W - 1) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(2 ** (RESULT_W - 1));

  logic signed [ACC_W-1:0] acc, scaled;

  always_comb begin
    acc    = ACC_W'(c) * ACC_W'(z2) - ACC_W'(s) * ACC_W'(z1);
    scaled = acc >>> RESULT_FRAC;
    if (scaled > MAXV)      z2_next = RESULT_W'(MAXV);
    else if (scaled < MINV) z2_next = RESULT_W'(MINV);
    else                    z2_next = RESULT_W'(scaled);
  end

endmodule
