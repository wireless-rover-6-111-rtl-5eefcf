// command_calc: turns pad buttons into rover commands and the command packet.
//
// The published design says only that the direction pad steers the rover and
// the other buttons work its tools (light, claw), and that a command packet
// carries both motor speeds in sign-magnitude, the light, an 8-bit claw
// inclination and the claw motion (opening, closing or idle). The button
// assignment below is this design's choice:
//   UP    both treads forward          DOWN  both treads reverse
//   LEFT  left reverse, right forward  RIGHT left forward, right reverse
//   (priority UP, DOWN, LEFT, RIGHT; nothing pressed = stop)
//   triangle  toggles the search light (on the press)
//   circle    opens the claw, cross closes it (circle wins)
//   R1 / L1   raise / lower the inclination by INCL_STEP per sample, saturating
//   START     requests a replay of the history (on the press)
// A driven tread runs at magnitude DRIVE_SPEED (0..7, stored form).
//
// Timing: on an `update` pulse with `valid` high the new values are registered
// one clock later; with `valid` low (a failed poll) everything is held and only
// `replay_req` is cleared. `replay_req` stays high for the rest of the sample in
// which START was first seen pressed.
//
// The packet's motor fields carry the replayed speeds while `replay_active` is
// high, otherwise the live ones; stored 3-bit magnitudes are widened to the
// link's 4 bits by bit replication. The low 19 bits hold the verification
// pattern. Those 19 output bits are constants on purpose:
// the receiver checks them. `packet` is combinational from registers.
module command_calc
  import rover_pkg::*;
#(
  parameter logic [2:0] DRIVE_SPEED = 3'd7,
  parameter logic [7:0] INCL_STEP   = 8'd8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         update,
  input  logic         valid,
  input  logic [15:0]  buttons,       // active low
  input  logic         replay_active,
  input  motor_pair_t  replay_motors,
  output motor_pair_t  live_motors,
  output logic         replay_req,
  output cmd_packet_t  packet
);
  logic [15:0]  pressed;
  logic         prev_start, prev_tri;
  logic         light;
  logic [7:0]   incl;
  claw_motion_t claw;
  motor_pair_t  drive, sent;

  assign pressed = ~buttons;

  always_comb begin
    drive = '0;
    if (pressed[BTN_UP]) begin
      drive.right = '{dir: 1'b0, mag: DRIVE_SPEED};
      drive.left  = '{dir: 1'b0, mag: DRIVE_SPEED};
    end else if (pressed[BTN_DOWN]) begin
      drive.right = '{dir: 1'b1, mag: DRIVE_SPEED};
      drive.left  = '{dir: 1'b1, mag: DRIVE_SPEED};
    end else if (pressed[BTN_LEFT]) begin
      drive.right = '{dir: 1'b0, mag: DRIVE_SPEED};
      drive.left  = '{dir: 1'b1, mag: DRIVE_SPEED};
    end else if (pressed[BTN_RIGHT]) begin
      drive.right = '{dir: 1'b1, mag: DRIVE_SPEED};
      drive.left  = '{dir: 1'b0, mag: DRIVE_SPEED};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      live_motors <= '0;
      replay_req  <= 1'b0;
      prev_start  <= 1'b0;
      prev_tri    <= 1'b0;
      light       <= 1'b0;
      incl        <= 8'd0;
      claw        <= CLAW_IDLE;
    end else if (update) begin
      if (valid) begin
        live_motors <= drive;
        replay_req  <= pressed[BTN_START] && !prev_start;
        prev_start  <= pressed[BTN_START];
        prev_tri    <= pressed[BTN_TRI];
        if (pressed[BTN_TRI] && !prev_tri) light <= ~light;
        if (pressed[BTN_CIRCLE])     claw <= CLAW_OPEN;
        else if (pressed[BTN_CROSS]) claw <= CLAW_CLOSE;
        else                         claw <= CLAW_IDLE;
        if (pressed[BTN_R1] && !pressed[BTN_L1])
          incl <= (incl > 8'hFF - INCL_STEP) ? 8'hFF : incl + INCL_STEP;
        else if (pressed[BTN_L1] && !pressed[BTN_R1])
          incl <= (incl < INCL_STEP) ? 8'h00 : incl - INCL_STEP;
      end else begin
        replay_req <= 1'b0;
      end
    end
  end

  assign sent = replay_active ? replay_motors : live_motors;

  always_comb begin
    packet        = '0;
    packet.right  = widen_motor(sent.right);
    packet.left   = widen_motor(sent.left);
    packet.light  = light;
    packet.incl   = incl;
    packet.claw   = claw;
    packet.verify = CMD_VERIFY;
  end
endmodule
