// delta_module: iterates the planar rotation
//   z1(k+1) =  cos(gamma) z1(k) + sin(gamma) z2(k)
//   z2(k+1) = -sin(gamma) z1(k) + cos(gamma) z2(k),   gamma = a * t0,
// the feedback system used to show how the table error accumulates.
//
// Structure (after the original design's DELTA module): GAMMA forms a*t0, a sine and
// a cosine trig_module evaluate it, ALPHA and BETA form the next state, and
// the registers RZ1 and RZ2 hold z1 and z2. gamma (1 sign, 3 integer, 10
// fraction bits) is read as degrees and enters the trig modules with its two
// lowest fraction bits dropped; the trig results are converted to two's
// complement Q2.16 for ALPHA and BETA.
//
// Control (this design's choice): a one-cycle start in IDLE latches a, t0
// and the initial state z1_init/z2_init (Q2.16) and the iteration count.
// After TRIG_LATENCY clocks sin and cos are valid; from then on one iteration
// is done per clock. z_valid marks each clock in which RZ1/RZ2 have just
// taken a new z(k), k = 1 .. iterations; done pulses with the last one.
// iterations = 0 ends the run without iterating. Synchronous active-high
// reset.
module delta_module
  import trig_pkg::*;
#(
  parameter int unsigned STEPS_PER_DEG = 20,
  parameter int unsigned ITER_W        = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start,
  input  logic signed [9:0]          a,
  input  logic        [3:0]          t0,
  input  logic signed [RESULT_W-1:0] z1_init,
  input  logic signed [RESULT_W-1:0] z2_init,
  input  logic        [ITER_W-1:0]   iterations,
  output logic signed [RESULT_W-1:0] z1,
  output logic signed [RESULT_W-1:0] z2,
  output logic                       z_valid,
  output logic                       busy,
  output logic                       done
);

  typedef enum logic [1:0] {IDLE, WAIT_TRIG, RUN} state_t;

  state_t                    state;
  logic signed [9:0]         a_q;
  logic        [3:0]         t0_q;
  logic signed [13:0]        gamma;
  angle_t                    gamma_angle;
  trig_result_t              sin_r, cos_r;
  logic signed [RESULT_W-1:0] s_tc, c_tc, z1_next, z2_next;
  logic [ITER_W-1:0]         remaining;
  logic [1:0]                wait_cnt;

  gamma_mult u_gamma (.a(a_q), .t0(t0_q), .gamma(gamma));

  // Q3.10 degrees -> 9.8 degrees (sign extension, two fraction bits dropped)
  assign gamma_angle = angle_t'(gamma) >>> 2;

  trig_module #(.STEPS_PER_DEG(STEPS_PER_DEG)) u_sin (
    .clk(clk), .rst(rst), .data(gamma_angle), .sel_cos(1'b0), .result(sin_r)
  );
  trig_module #(.STEPS_PER_DEG(STEPS_PER_DEG)) u_cos (
    .clk(clk), .rst(rst), .data(gamma_angle), .sel_cos(1'b1), .result(cos_r)
  );

  assign s_tc = result_to_tc(sin_r);
  assign c_tc = result_to_tc(cos_r);

  alpha_unit u_alpha (.c(c_tc), .s(s_tc), .z1(z1), .z2(z2), .z1_next(z1_next));
  beta_unit  u_beta  (.c(c_tc), .s(s_tc), .z1(z1), .z2(z2), .z2_next(z2_next));

  assign busy = (state != IDLE);

  // handshake rules: a run ends in idle, and a value is only delivered by a
  // running system or with its last value
  a_done_idle: assert property (@(posedge clk) disable iff (rst) done |-> !busy);
  a_valid_run: assert property (@(posedge clk) disable iff (rst) z_valid |-> (busy || done));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      a_q       <= '0;
      t0_q      <= '0;
      z1        <= '0;    // RZ1
      z2        <= '0;    // RZ2
      remaining <= '0;
      wait_cnt  <= '0;
      z_valid   <= 1'b0;
      done      <= 1'b0;
    end else begin
      z_valid <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a_q       <= a;
          t0_q      <= t0;
          z1        <= z1_init;
          z2        <= z2_init;
          remaining <= iterations;
          wait_cnt  <= 2'(TRIG_LATENCY - 1);
          state     <= WAIT_TRIG;
        end
        WAIT_TRIG: begin
          if (wait_cnt != 0) begin
            wait_cnt <= wait_cnt - 2'd1;
          end else if (remaining == 0) begin
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            state <= RUN;
          end
        end
        RUN: begin
          z1        <= z1_next;
          z2        <= z2_next;
          z_valid   <= 1'b1;
          remaining <= remaining - 1'b1;
          if (remaining == 1) begin
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
