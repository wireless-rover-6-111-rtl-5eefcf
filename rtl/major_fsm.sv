// major_fsm: sequencer of the base station's per-sample work.
//
// The FSM waits in IDLE for the 20 Hz `sample` pulse. It then starts the pad
// polling FSM and waits for it to finish. Next, depending on whether the user
// wants history replayed, it starts the store-data FSM or the replay FSM and
// waits for that to finish, then returns to IDLE. This major/minor structure
// follows the published description.
//
// Choice of minor FSM (the detailed rules are this design's choice):
//   replay already running            -> REPLAY
//   replay just requested, not running -> STORE (flushes the open run), then REPLAY
//   otherwise                          -> STORE
// `sample` pulses that arrive while a sample is still being handled are
// ignored and counted on `overrun`.
//
// Interface: *_start outputs pulse one cycle; *_done inputs are one-cycle
// pulses from the minor FSMs. `sample_done` pulses when a sample is finished.
module major_fsm (
  input  logic clk,
  input  logic rst,
  input  logic sample,
  input  logic replay_req,
  input  logic replay_active,
  output logic ctrl_start,
  input  logic ctrl_done,
  output logic store_start,
  input  logic store_done,
  output logic replay_start,
  input  logic replay_done,
  output logic sample_done,
  output logic overrun
);
  typedef enum logic [2:0] {IDLE, CTRL_WAIT, STORE_WAIT, REPLAY_WAIT} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= IDLE;
      ctrl_start   <= 1'b0;
      store_start  <= 1'b0;
      replay_start <= 1'b0;
      sample_done  <= 1'b0;
      overrun      <= 1'b0;
    end else begin
      ctrl_start   <= 1'b0;
      store_start  <= 1'b0;
      replay_start <= 1'b0;
      sample_done  <= 1'b0;
      overrun      <= sample && (state != IDLE);
      unique case (state)
        IDLE: if (sample) begin
          ctrl_start <= 1'b1;
          state      <= CTRL_WAIT;
        end
        CTRL_WAIT: if (ctrl_done) begin
          if (replay_active) begin
            replay_start <= 1'b1;
            state        <= REPLAY_WAIT;
          end else begin
            store_start <= 1'b1;
            state       <= STORE_WAIT;
          end
        end
        STORE_WAIT: if (store_done) begin
          if (replay_req) begin
            replay_start <= 1'b1;
            state        <= REPLAY_WAIT;
          end else begin
            sample_done <= 1'b1;
            state       <= IDLE;
          end
        end
        REPLAY_WAIT: if (replay_done) begin
          sample_done <= 1'b1;
          state       <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
