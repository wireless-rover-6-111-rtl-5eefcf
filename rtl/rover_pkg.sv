// rover_pkg: types and constants shared by the base-station and rover logic.
//
// Both ends of the radio link exchange fixed 40-bit packets. A command packet
// (base station -> rover) carries a complete snapshot of what the rover should
// be doing; a sensor packet (rover -> base station) carries the temperature and
// heading readings. The bits a packet does not need for data hold a fixed
// verification pattern. Packets are shifted MSB first, so a slip in the serial
// transfer corrupts the low-order bits, which is where the pattern sits: a
// receiver accepts a packet only if the pattern is intact.
//
// Command packet layout and the 0x2A5A5 pattern in bits [18:0] follow the
// published packet breakdown. The sensor packet layout (temperature, heading,
// then a 24-bit pattern holding the same 0x2A5A5 value) is this design's choice:
// only its contents, not its bit positions, are specified.
//
// The PlayStation digital pad returns two active-low button bytes; the indices
// below follow the pad's published data table (first data byte: SELECT, START,
// UP, RIGHT, DOWN, LEFT; second: L2, R2, L1, R1, triangle, circle, cross,
// square).
package rover_pkg;

  localparam int unsigned PKT_W = 40;

  // Motor speed as sent over the link: sign-magnitude, 1 = reverse.
  typedef struct packed {
    logic       dir;
    logic [3:0] mag;
  } motor_cmd_t;

  // Motor speed as kept by the base station and stored in the history RAM:
  // sign-magnitude in four bits, so that two speeds fit one RAM byte.
  typedef struct packed {
    logic       dir;
    logic [2:0] mag;
  } motor4_t;

  // One RAM byte of history: right motor in the high nibble.
  typedef struct packed {
    motor4_t right;
    motor4_t left;
  } motor_pair_t;

  typedef enum logic [1:0] {
    CLAW_IDLE  = 2'd0,
    CLAW_OPEN  = 2'd1,
    CLAW_CLOSE = 2'd2
  } claw_motion_t;

  localparam logic [18:0] CMD_VERIFY  = 19'h2A5A5;
  localparam logic [23:0] SENS_VERIFY = 24'h02A5A5;

  typedef struct packed {
    motor_cmd_t   right;   // [39:35]
    motor_cmd_t   left;    // [34:30]
    logic         light;   // [29]
    logic [7:0]   incl;    // [28:21] claw inclination
    claw_motion_t claw;    // [20:19]
    logic [18:0]  verify;  // [18:0]
  } cmd_packet_t;

  typedef struct packed {
    logic [7:0]  temp;     // [39:32] degrees Celsius
    logic [7:0]  heading;  // [31:24] 256 steps per turn, 0 = north
    logic [23:0] verify;   // [23:0]
  } sens_packet_t;

  localparam logic [39:0] CMD_VERIFY_MASK  = 40'h00_0007_FFFF;
  localparam logic [39:0] CMD_VERIFY_VALUE = {21'd0, CMD_VERIFY};
  localparam logic [39:0] SENS_VERIFY_MASK  = 40'h00_00FF_FFFF;
  localparam logic [39:0] SENS_VERIFY_VALUE = {16'd0, SENS_VERIFY};

  // Button indices in the 16-bit, active-low pad word {byte5, byte4}.
  localparam int unsigned BTN_SELECT = 0;
  localparam int unsigned BTN_START  = 3;
  localparam int unsigned BTN_UP     = 4;
  localparam int unsigned BTN_RIGHT  = 5;
  localparam int unsigned BTN_DOWN   = 6;
  localparam int unsigned BTN_LEFT   = 7;
  localparam int unsigned BTN_L2     = 8;
  localparam int unsigned BTN_R2     = 9;
  localparam int unsigned BTN_L1     = 10;
  localparam int unsigned BTN_R1     = 11;
  localparam int unsigned BTN_TRI    = 12;
  localparam int unsigned BTN_CIRCLE = 13;
  localparam int unsigned BTN_CROSS  = 14;
  localparam int unsigned BTN_SQUARE = 15;

  // Pad protocol bytes.
  localparam logic [7:0] PSX_CMD_START = 8'h01;
  localparam logic [7:0] PSX_CMD_POLL  = 8'h42;
  localparam logic [7:0] PSX_CMD_IDLE  = 8'hFF;
  localparam logic [7:0] PSX_ID_DIGITAL = 8'h41;
  localparam logic [7:0] PSX_DATA_READY = 8'h5A;

  // Reverse a stored speed: flip the direction of a moving motor.
  function automatic motor4_t reverse_motor(motor4_t m);
    reverse_motor = m;
    if (m.mag != 3'd0) reverse_motor.dir = ~m.dir;
  endfunction

  // Widen a stored 3-bit magnitude to the link's 4 bits by bit replication
  // (0 -> 0, 7 -> 15).
  function automatic motor_cmd_t widen_motor(motor4_t m);
    widen_motor.dir = m.dir;
    widen_motor.mag = {m.mag, m.mag[2]};
  endfunction

endpackage
