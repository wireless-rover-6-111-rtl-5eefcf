// store_data: run-length recorder of the rover's motor speeds.
//
// Each time `start` pulses (once per 20 Hz sample) the FSM compares the current
// speeds with those of the open run. If they match, the run's duration grows by
// one sample. If they differ, the finished run (old speeds, old duration) is
// pushed onto the history stack and a new run of one sample begins. When the
// user has just asked for a replay (`replay_req`), the open run, including the
// current sample, is pushed at once so the stack holds the latest movement
// before the replay starts; the run is then emptied. These rules and the states
// IDLE, DETERMINE_DATA and WAIT_FOR_STORE follow the published description.
//
// This design's own choices: a run is also closed when its 8-bit duration
// reaches 255, so no duration overflows; an empty run (duration 0, after reset
// or a replay) is never pushed; and when a replay is requested on a sample whose
// speeds differ from the open run, both the old run and the one-sample new run
// are pushed, which takes two stack operations (states WAIT_FOR_STORE and
// WAIT_FOR_STORE2).
//
// Interface: `done` pulses one cycle when the sample has been handled. `push`
// pulses to the stack with push_motor/push_dur; `stack_done` ends each push.
// Timing: 2 clocks without a push, about 8 per push with stack_fsm.
module store_data
  import rover_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        replay_req,
  input  motor_pair_t motors,
  output logic        done,
  output logic        push,
  output motor_pair_t push_motor,
  output logic [7:0]  push_dur,
  input  logic        stack_done
);
  typedef enum logic [2:0] {IDLE, DETERMINE_DATA, WAIT_FOR_STORE, WAIT_FOR_STORE2, FINISH} state_t;

  state_t      state;
  motor_pair_t run_motor;
  logic [7:0]  run_dur;
  // second record waiting to be pushed
  logic        pend;
  motor_pair_t pend_motor;
  logic [7:0]  pend_dur;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      run_motor  <= '0;
      run_dur    <= '0;
      pend       <= 1'b0;
      pend_motor <= '0;
      pend_dur   <= '0;
      push       <= 1'b0;
      push_motor <= '0;
      push_dur   <= '0;
      done       <= 1'b0;
    end else begin
      push <= 1'b0;
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) state <= DETERMINE_DATA;

        DETERMINE_DATA: begin
          if (motors == run_motor && run_dur != 8'd0 && run_dur != 8'hFF) begin
            // same speeds: extend the run
            if (!replay_req) begin
              run_dur <= run_dur + 1'b1;
              state   <= FINISH;
            end else begin
              push       <= 1'b1;
              push_motor <= run_motor;
              push_dur   <= run_dur + 1'b1;
              run_motor  <= '0;
              run_dur    <= '0;
              state      <= WAIT_FOR_STORE;
            end
          end else begin
            // new speeds: close the old run (if any) and open a new one
            if (!replay_req) begin
              run_motor <= motors;
              run_dur   <= 8'd1;
              if (run_dur != 8'd0) begin
                push       <= 1'b1;
                push_motor <= run_motor;
                push_dur   <= run_dur;
                state      <= WAIT_FOR_STORE;
              end else begin
                state <= FINISH;
              end
            end else begin
              run_motor <= '0;
              run_dur   <= '0;
              push      <= 1'b1;
              if (run_dur != 8'd0) begin
                push_motor <= run_motor;
                push_dur   <= run_dur;
                pend       <= 1'b1;
                pend_motor <= motors;
                pend_dur   <= 8'd1;
              end else begin
                push_motor <= motors;
                push_dur   <= 8'd1;
              end
              state <= WAIT_FOR_STORE;
            end
          end
        end

        WAIT_FOR_STORE: if (stack_done) begin
          if (pend) begin
            pend       <= 1'b0;
            push       <= 1'b1;
            push_motor <= pend_motor;
            push_dur   <= pend_dur;
            state      <= WAIT_FOR_STORE2;
          end else begin
            state <= FINISH;
          end
        end

        WAIT_FOR_STORE2: if (stack_done) state <= FINISH;

        FINISH: begin done <= 1'b1; state <= IDLE; end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
