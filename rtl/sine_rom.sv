// sine_rom: first-quadrant sine table with a registered read, the shape of
// an FPGA block RAM used as ROM.
//
// Entry i holds round(sin(i / STEPS_PER_DEG degrees) * 2^16), i = 0 ..
// 90*STEPS_PER_DEG-1 (1800 words of 16 bits for 0.05-degree steps), clamped
// to 2^16-1 (see trig_pkg::sine_entry). The contents are computed when the
// design is elaborated. The output register douta is loaded on every rising
// edge of clk from addr: one clock of read latency, no reset (block RAM
// output registers are left unreset here). The quarter-wave layout, its
// 1800-word depth and 16-bit width follow the original design; the
// rounding, the clamp and computing the contents at elaboration are this
// design's choices.
module sine_rom
  import trig_pkg::*;
#(
  parameter int unsigned STEPS_PER_DEG = 20,
  localparam int unsigned DEPTH  = 90 * STEPS_PER_DEG,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [15:0]       douta
);

  typedef logic [15:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned i = 0; i < DEPTH; i++) t[i] = sine_entry(i, DEPTH);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) begin
    douta <= (addr < ADDR_W'(DEPTH)) ? TABLE[addr] : 16'd0;
  end

endmodule
