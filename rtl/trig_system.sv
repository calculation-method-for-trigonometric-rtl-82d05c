// trig_system: top level. Three parts stand side by side, sharing clock and
// reset and each with its own ports:
//   - the table-lookup sine/cosine unit with its black-box ports (angle
//     data, sin/cos select, 18-bit result, TRIG_LATENCY = 2 clocks);
//   - the rotation system (delta_module, ports dl_*), which iterates
//     z(k+1) = R(a*t0) z(k) one step per clock;
//   - the steady-state system (steady_state_loop, ports ss_*), which
//     iterates z(k+1) = sin(128 z(k)) one step every 3 clocks.
// The two systems are the applications used to measure the cumulative and
// the steady-state error of the unit; each contains its own trig_module
// instances. See the three modules for formats and handshakes.
module trig_system
  import trig_pkg::*;
#(
  parameter int unsigned STEPS_PER_DEG = 20
) (
  input  logic                       clk,
  input  logic                       rst,
  // stand-alone sine/cosine unit
  input  angle_t                     data,
  input  logic                       sel_cos,
  output trig_result_t               result,
  // rotation system
  input  logic                       dl_start,
  input  logic signed [9:0]          dl_a,
  input  logic        [3:0]          dl_t0,
  input  logic signed [RESULT_W-1:0] dl_z1_init,
  input  logic signed [RESULT_W-1:0] dl_z2_init,
  input  logic        [15:0]         dl_iterations,
  output logic signed [RESULT_W-1:0] dl_z1,
  output logic signed [RESULT_W-1:0] dl_z2,
  output logic                       dl_z_valid,
  output logic                       dl_busy,
  output logic                       dl_done,
  // steady-state system
  input  logic                       ss_start,
  input  angle_t                     ss_start_angle,
  input  logic        [15:0]         ss_iterations,
  output trig_result_t               ss_z,
  output logic                       ss_z_valid,
  output logic                       ss_busy,
  output logic                       ss_done
);

  trig_module #(.STEPS_PER_DEG(STEPS_PER_DEG)) u_trig (
    .clk(clk), .rst(rst), .data(data), .sel_cos(sel_cos), .result(result)
  );

  delta_module #(.STEPS_PER_DEG(STEPS_PER_DEG), .ITER_W(16)) u_delta (
    .clk(clk), .rst(rst), .start(dl_start), .a(dl_a), .t0(dl_t0),
    .z1_init(dl_z1_init), .z2_init(dl_z2_init), .iterations(dl_iterations),
    .z1(dl_z1), .z2(dl_z2), .z_valid(dl_z_valid), .busy(dl_busy), .done(dl_done)
  );

  steady_state_loop #(.STEPS_PER_DEG(STEPS_PER_DEG), .ITER_W(16)) u_steady (
    .clk(clk), .rst(rst), .start(ss_start), .start_angle(ss_start_angle),
    .iterations(ss_iterations), .z(ss_z), .z_valid(ss_z_valid), .busy(ss_busy),
    .done(ss_done)
  );

endmodule
