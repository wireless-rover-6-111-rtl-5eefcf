// replay_fsm: plays the recorded motor history backwards.
//
// Each time `start` pulses (once per sample, when the major FSM chooses replay)
// the FSM does nothing unless a replay was just requested or is already under
// way. Otherwise it looks at its hold counter: if the counter is not zero it
// counts down one sample and keeps the current speeds. If it is zero it pops the
// next (speeds, duration) record from the stack, drives the reversed speeds
// (each moving motor's direction flipped) and loads the counter from the
// duration. This follows the published replay description.
//
// This design's own choices: the counter is loaded with duration-1 because the
// popping sample is itself the first sample of the step, so each record is
// driven for exactly its recorded number of samples; when the counter is zero
// and the stack is empty the replay ends (`active` falls, speeds return to
// stop) and normal recording resumes.
//
// Interface: `active` is high while a replay is running, `motors` holds the
// speeds to send while it is. `done` pulses when the sample is handled.
// Timing: 2 clocks without a pop, about 8 with one (stack_fsm takes 5).
module replay_fsm
  import rover_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        replay_req,
  output logic        done,
  output logic        active,
  output motor_pair_t motors,
  output logic        pop,
  input  logic        stack_done,
  input  logic        stack_empty,
  input  motor_pair_t pop_motor,
  input  logic [7:0]  pop_dur
);
  typedef enum logic [1:0] {IDLE, CHECK, POP_WAIT, FINISH} state_t;

  state_t     state;
  logic [7:0] hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      hold   <= '0;
      active <= 1'b0;
      motors <= '0;
      pop    <= 1'b0;
      done   <= 1'b0;
    end else begin
      pop  <= 1'b0;
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) state <= CHECK;
        CHECK: begin
          if (!(active || replay_req)) begin
            state <= FINISH;
          end else if (hold != 8'd0) begin
            hold  <= hold - 1'b1;
            state <= FINISH;
          end else if (stack_empty) begin
            active <= 1'b0;
            motors <= '0;
            state  <= FINISH;
          end else begin
            pop   <= 1'b1;
            state <= POP_WAIT;
          end
        end
        POP_WAIT: if (stack_done) begin
          active <= 1'b1;
          motors <= '{right: reverse_motor(pop_motor.right), left: reverse_motor(pop_motor.left)};
          hold   <= (pop_dur == 8'd0) ? 8'd0 : pop_dur - 1'b1;
          state  <= FINISH;
        end
        FINISH: begin done <= 1'b1; state <= IDLE; end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
