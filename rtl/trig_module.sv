// trig_module: table-lookup sine/cosine of an angle in degrees.
//
// The angle word (18-bit two's complement, 9 integer and 8 fraction bits of a
// degree, so -512 .. +511.996 degrees) is turned into a first-quadrant address
// by compl_locator, the address reads the sine table in sine_rom (90 degrees
// in 0.05-degree steps, 1800 words), and supplement combines the table word
// with the sign and the integer bit into the 18-bit sign-and-magnitude
// result (1 sign, 1 integer, 16 fraction bits). sel_cos = 0 selects sine,
// 1 selects cosine, which is computed as sin(|t| + 90).
//
// Timing: fully pipelined, one angle per clock. The result for the angle
// and selection present before rising edge n appears after rising edge n+1
// (TRIG_LATENCY = 2). The sign and integer bit travel beside the table read
// in one register stage. rst (synchronous, active high) clears the result
// and that register. The pipeline registers and the reset are this
// design's choice of timing around the synchronous table read.
module trig_module
  import trig_pkg::*;
#(
  parameter int unsigned STEPS_PER_DEG = 20
) (
  input  logic         clk,
  input  logic         rst,
  input  angle_t       data,
  input  logic         sel_cos,
  output trig_result_t result
);

  localparam int unsigned ADDR_W = $clog2(90 * STEPS_PER_DEG);

  logic [ADDR_W-1:0] addr;
  logic              entire, sign;
  logic              entire_q, sign_q;
  logic [15:0]       douta;

  compl_locator #(.STEPS_PER_DEG(STEPS_PER_DEG)) u_locator (
    .angle(data), .sel_cos(sel_cos), .addr(addr), .entire(entire), .sign(sign)
  );

  sine_rom #(.STEPS_PER_DEG(STEPS_PER_DEG)) u_rom (
    .clk(clk), .addr(addr), .douta(douta)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      entire_q <= 1'b0;
      sign_q   <= 1'b0;
    end else begin
      entire_q <= entire;
      sign_q   <= sign;
    end
  end

  supplement u_supplement (
    .clk(clk), .rst(rst), .sign(sign_q), .entire(entire_q), .douta(douta),
    .result(result)
  );

endmodule
