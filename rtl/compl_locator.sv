// compl_locator: turns an angle word into a first-quadrant table address.
//
// This is the complement/locator stage of the table-lookup sine/cosine unit.
// Purely combinational. Steps, in the order the design applies them:
//   1. a negative angle (two's complement) is complemented to its magnitude;
//   2. the magnitude is multiplied by STEPS_PER_DEG and the 8 fraction bits
//      are dropped, giving the angle in table steps (grad_x20, truncated);
//   3. for cosine, 90 degrees (90*STEPS_PER_DEG steps) is added, using
//      cos(t) = sin(t + 90) and cos(-t) = cos(t);
//   4. one full turn is removed if the angle is 360 degrees or more (one
//      subtraction suffices: the largest reachable angle is 512 + 90 degrees);
//   5. the angle is folded into the first quadrant: 90 and 270 degrees set
//      the integer bit and address 0; otherwise the second quadrant uses
//      180-t, the third t-180 and the fourth 360-t, and the third and fourth
//      quadrants make the result negative;
//   6. for sine the quadrant sign is XORed with the input sign (sine is odd).
//
// Ports: angle (ANGLE_W bits), sel_cos (0 sine, 1 cosine) in; addr, entire
// and sign out. The flooring in step 2 and the single 360-degree reduction
// for any input angle are this design's choices.
module compl_locator
  import trig_pkg::*;
#(
  parameter int unsigned STEPS_PER_DEG = 20,
  localparam int unsigned QUARTER = 90 * STEPS_PER_DEG,
  localparam int unsigned ADDR_W  = $clog2(QUARTER)
) (
  input  angle_t              angle,
  input  logic                sel_cos,
  output logic [ADDR_W-1:0]   addr,
  output logic                entire,
  output logic                sign
);

  // Widths: magnitude up to 2^17 (for -512 degrees), step count up to
  // 602 * STEPS_PER_DEG.
  localparam int unsigned MAG_W   = ANGLE_W;
  localparam int unsigned STEP_W  = $clog2(720 * STEPS_PER_DEG);
  localparam int unsigned PROD_W  = MAG_W + $clog2(STEPS_PER_DEG + 1);

  localparam logic [STEP_W-1:0] S90  = STEP_W'(QUARTER);
  localparam logic [STEP_W-1:0] S180 = STEP_W'(2 * QUARTER);
  localparam logic [STEP_W-1:0] S270 = STEP_W'(3 * QUARTER);
  localparam logic [STEP_W-1:0] S360 = STEP_W'(4 * QUARTER);

  logic [MAG_W-1:0]  mag;
  logic [PROD_W-1:0] prod;
  logic [STEP_W-1:0] steps, shifted, reduced;
  logic [ADDR_W-1:0] folded;
  logic              quad_neg;

  always_comb begin
    // 1. complement
    mag = angle[ANGLE_W-1] ? MAG_W'(-angle) : MAG_W'(angle);
    // 2. angle in table steps
    prod  = PROD_W'(mag) * PROD_W'(STEPS_PER_DEG);
    steps = STEP_W'(prod >> ANGLE_FRAC);
    // 3. cosine phase shift
    shifted = sel_cos ? steps + S90 : steps;
    // 4. whole turns
    reduced = (shifted >= S360) ? shifted - S360 : shifted;
    // 5. quadrant folding
    entire   = 1'b0;
    quad_neg = 1'b0;
    folded   = '0;
    if (reduced == S90) begin
      entire = 1'b1;
    end else if (reduced == S270) begin
      entire   = 1'b1;
      quad_neg = 1'b1;
    end else if (reduced < S90) begin
      folded = ADDR_W'(reduced);
    end else if (reduced < S180) begin
      folded = ADDR_W'(S180 - reduced);
    end else if (reduced < S270) begin
      folded   = ADDR_W'(reduced - S180);
      quad_neg = 1'b1;
    end else begin
      folded   = ADDR_W'(S360 - reduced);
      quad_neg = 1'b1;
    end
    addr = folded;
    // 6. odd symmetry of sine
    sign = quad_neg ^ (angle[ANGLE_W-1] & ~sel_cos);
  end

endmodule
