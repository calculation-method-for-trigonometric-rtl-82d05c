// supplement: assembles the final sine/cosine result word.
//
// Takes the sign and integer bit worked out by the complement/locator stage
// (delayed to line up with the table read) and the table word douta, and
// registers the sign-and-magnitude result {sign, entire, fraction}. For the
// integer bit (exactly 90 or 270 degrees) the fraction is forced to zero.
// A zero magnitude is always given a positive sign, so 0 and 180 degrees
// never produce "-0" (this design's choice). Synchronous active-high reset
// clears the output. One clock of latency.
module supplement
  import trig_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         sign,
  input  logic         entire,
  input  logic [15:0]  douta,
  output trig_result_t result
);

  always_ff @(posedge clk) begin
    if (rst) begin
      result <= '0;
    end else begin
      result.entire <= entire;
      result.frac   <= entire ? 16'd0 : douta;
      result.sign   <= sign & (entire | (douta != 16'd0));
    end
  end

endmodule
