// gamma_mult: the GAMMA stage of the rotation system, gamma = a * t0.
//
// a is a signed 10-bit number with 9 fraction bits, t0 an unsigned 4-bit
// number with 1 fraction bit; their product is exact in 14 bits: 1 sign,
// 3 integer and 10 fraction bits, the gamma format the rotation system
// uses. The widths and the product format follow the original design; where the
// binary points of a and t0 sit is this design's choice (the one split that
// gives exactly that product format). Combinational.
module gamma_mult #(
  parameter int unsigned A_W     = 10,
  parameter int unsigned T0_W    = 4,
  localparam int unsigned GAMMA_W = A_W + T0_W
) (
  input  logic signed [A_W-1:0]     a,
  input  logic        [T0_W-1:0]    t0,
  output logic signed [GAMMA_W-1:0] gamma
);

  always_comb begin
    gamma = GAMMA_W'(a) * $signed({1'b0, t0});
  end

endmodule
