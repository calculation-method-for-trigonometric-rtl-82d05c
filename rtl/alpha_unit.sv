// alpha_unit: the ALPHA stage of the rotation system,
//   z1(k+1) = cos(gamma) * z1(k) + sin(gamma) * z2(k).
//
// All words are 18-bit two's complement with 16 fraction bits (Q2.16). The
// two 18x18 products are added at full precision (Q4.32); the sum is then
// truncated (floor) to 16 fraction bits and saturated to the 18-bit range.
// Word format, truncation and saturation are this design's choices; the
// equation is the original design's. Combinational.
module alpha_unit
  import trig_pkg::*;
(
  input  logic signed [RESULT_W-1:0] c,
  input  logic signed [RESULT_W-1:0] s,
  input  logic signed [RESULT_W-1:0] z1,
  input  logic signed [RESULT_W-1:0] z2,
  output logic signed [RESULT_W-1:0] z1_next
);

  localparam int unsigned ACC_W = 2 * RESULT_W + 1;
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'(2 ** (RESULT_W - 1) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(2 ** (RESULT_W - 1));

  logic signed [ACC_W-1:0] acc, scaled;

  always_comb begin
    acc    = ACC_W'(c) * ACC_W'(z1) + ACC_W'(s) * ACC_W'(z2);
    scaled = acc >>> RESULT_FRAC;
    if (scaled > MAXV)      z1_next = RESULT_W'(MAXV);
    else if (scaled < MINV) z1_next = RESULT_W'(MINV);
    else                    z1_next = RESULT_W'(scaled);
  end

endmodule
