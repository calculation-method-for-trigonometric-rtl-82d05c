// steady_state_loop: the feedback system z(k+1) = sin(128 * z(k)), with
// z(0) = sin(start_angle), used to measure the steady-state error of the
// table-lookup sine.
//
// One trig_module (sine) is fed from an angle register. The first angle is
// start_angle (for example 10 degrees); every later angle is 128 times the
// previous result, read as degrees. Multiplying by 128 is only a shift: the
// result magnitude has 16 fraction bits and the angle 8, so the angle
// magnitude is the result magnitude shifted right by one bit, negated in
// two's complement when the result is negative.
//
// The equation, the start value and the shift for 128 follow the original
// design; reading 128*z as degrees is this design's interpretation.
//
// Timing (this design's choice): a one-cycle start in IDLE loads the angle
// register; each result is taken TRIG_LATENCY+1 clocks after its angle was
// loaded, so one value of z is produced every 3 clocks. z_valid marks each
// new z(k), k = 0 .. iterations; done pulses with the last one. Synchronous
// active-high reset.
module steady_state_loop
  import trig_pkg::*;
#(
  parameter int unsigned STEPS_PER_DEG = 20,
  parameter int unsigned ITER_W        = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  angle_t             start_angle,
  input  logic [ITER_W-1:0]  iterations,
  output trig_result_t       z,
  output logic               z_valid,
  output logic               busy,
  output logic               done
);

  typedef enum logic {IDLE, WAIT_TRIG} state_t;

  state_t            state;
  angle_t            angle_q, angle_next;
  trig_result_t      sin_r;
  logic [ITER_W-1:0] remaining;
  logic [1:0]        wait_cnt;
  logic [15:0]       scaled_mag;

  trig_module #(.STEPS_PER_DEG(STEPS_PER_DEG)) u_sin (
    .clk(clk), .rst(rst), .data(angle_q), .sel_cos(1'b0), .result(sin_r)
  );

  // 128 * z(k) in degrees, as an angle word
  always_comb begin
    scaled_mag = {sin_r.entire, sin_r.frac[15:1]};
    angle_next = sin_r.sign ? -angle_t'(scaled_mag) : angle_t'(scaled_mag);
  end

  assign busy = (state != IDLE);

  // handshake rules: a run ends in idle, and a value is only delivered by a
  // running system or with its last value
  a_done_idle: assert property (@(posedge clk) disable iff (rst) done |-> !busy);
  a_valid_run: assert property (@(posedge clk) disable iff (rst) z_valid |-> (busy || done));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      angle_q   <= '0;
      z         <= '0;
      remaining <= '0;
      wait_cnt  <= '0;
      z_valid   <= 1'b0;
      done      <= 1'b0;
    end else begin
      z_valid <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          angle_q   <= start_angle;
          remaining <= iterations;
          wait_cnt  <= 2'(TRIG_LATENCY);
          state     <= WAIT_TRIG;
        end
        WAIT_TRIG: begin
          if (wait_cnt != 0) begin
            wait_cnt <= wait_cnt - 2'd1;
          end else begin
            z        <= sin_r;
            z_valid  <= 1'b1;
            angle_q  <= angle_next;
            wait_cnt <= 2'(TRIG_LATENCY);
            if (remaining == 0) begin
              done  <= 1'b1;
              state <= IDLE;
            end else begin
              remaining <= remaining - 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
