// stack_fsm: a stack of (motor speeds, duration) records on top of history_ram.
//
// A push writes the motor byte at the top of the stack and increments the top,
// then writes the duration byte and increments the top again. A pop undoes
// this: it reads the duration byte below the top and decrements the top, then
// reads the motor byte and decrements again. The states are those of the
// published stack diagram (IDLE, INIT_PUSH1, PUSH_MOTORS, INIT_PUSH2,
// PUSH_DURATION and IDLE, INIT_POP1, POP_DURATION, INIT_POP2, POP_MOTORS).
//
// Interface: `push` or `pop` is sampled in IDLE (push wins if both are high),
// with push_motor/push_dur captured there. `done` pulses for one cycle when the
// operation ends; pop results are valid from then until the next pop. `top` is
// the number of bytes stored.
//
// Timing: a push or a pop takes 5 clocks from request to `done`. The RAM is read
// synchronously, so each INIT_POP state presents the address and the following
// state captures the byte.
//
// Full and empty handling is this design's choice: a push that would not fit
// both bytes is dropped (done still pulses, `overflow` pulses with it), and a
// pop of an empty stack returns zeros and pulses `underflow`.
module stack_fsm
  import rover_pkg::*;
#(
  parameter int unsigned ADDR_W = 13
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              push,
  input  logic              pop,
  input  motor_pair_t       push_motor,
  input  logic [7:0]        push_dur,
  output logic              done,
  output logic              busy,
  output motor_pair_t       pop_motor,
  output logic [7:0]        pop_dur,
  output logic              empty,
  output logic              full,
  output logic              overflow,
  output logic              underflow,
  output logic [ADDR_W:0]   top,
  // RAM port
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_addr,
  output logic [7:0]        ram_wdata,
  input  logic [7:0]        ram_rdata
);
  localparam int unsigned DEPTH = 2**ADDR_W;

  typedef enum logic [3:0] {
    IDLE, INIT_PUSH1, PUSH_MOTORS, INIT_PUSH2, PUSH_DURATION,
    INIT_POP1, POP_DURATION, INIT_POP2, POP_MOTORS, FINISH
  } state_t;

  state_t      state;
  motor_pair_t w_motor;
  logic [7:0]  w_dur;

  assign empty = (top == '0);
  assign full  = (top > (ADDR_W+1)'(DEPTH - 2));
  assign busy  = (state != IDLE);

  // RAM drive: address is the top (push) or the byte just below it (pop).
  always_comb begin
    ram_we    = 1'b0;
    ram_addr  = top[ADDR_W-1:0];
    ram_wdata = w_motor;
    unique case (state)
      INIT_PUSH1: begin ram_we = 1'b1; ram_wdata = w_motor; end
      INIT_PUSH2: begin ram_we = 1'b1; ram_wdata = w_dur;   end
      INIT_POP1, INIT_POP2: ram_addr = top[ADDR_W-1:0] - 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      top       <= '0;
      done      <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      w_motor   <= '0;
      w_dur     <= '0;
      pop_motor <= '0;
      pop_dur   <= '0;
    end else begin
      done      <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      unique case (state)
        IDLE: begin
          if (push) begin
            w_motor <= push_motor;
            w_dur   <= push_dur;
            if (full) begin
              overflow <= 1'b1;
              state    <= FINISH;
            end else begin
              state <= INIT_PUSH1;
            end
          end else if (pop) begin
            if (top < (ADDR_W+1)'(2)) begin
              pop_motor <= '0;
              pop_dur   <= '0;
              underflow <= 1'b1;
              state     <= FINISH;
            end else begin
              state <= INIT_POP1;
            end
          end
        end
        INIT_PUSH1:    state <= PUSH_MOTORS;
        PUSH_MOTORS:   begin top <= top + 1'b1; state <= INIT_PUSH2; end
        INIT_PUSH2:    state <= PUSH_DURATION;
        PUSH_DURATION: begin top <= top + 1'b1; done <= 1'b1; state <= IDLE; end
        INIT_POP1:     state <= POP_DURATION;
        POP_DURATION:  begin pop_dur <= ram_rdata; top <= top - 1'b1; state <= INIT_POP2; end
        INIT_POP2:     state <= POP_MOTORS;
        POP_MOTORS:    begin pop_motor <= ram_rdata; top <= top - 1'b1; done <= 1'b1; state <= IDLE; end
        FINISH:        begin done <= 1'b1; state <= IDLE; end
        default:       state <= IDLE;
      endcase
    end
  end

  // A request is only accepted while idle.
  a_no_req_busy: assert property (@(posedge clk) disable iff (rst)
    (state != IDLE) |-> !(push || pop))
    else $error("stack_fsm: request while busy");
endmodule
