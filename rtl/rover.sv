// rover: the logic on the rover's FPGA.
//
// Command side: an rx_interface downloads each command packet the transceiver
// has received, checks its verification field and, if intact, it becomes the
// rover's new state; otherwise the rover keeps doing what the last good packet
// said. From the held command:
//   right/left tread  PWM from the 4-bit magnitude, direction from the sign
//   claw              claw_on when opening or closing, claw_dir high = closing
//   light             search light on/off
//   claw_incl         8-bit inclination set point, passed to the claw drive
// Sensor side: a tx_interface uploads a sensor packet {temperature, heading,
// verification} whenever the transceiver asks; the readings are taken as they
// are when the request rises.
// After reset the held command is all stop, light off, claw idle.
// The packet layout follows the published command packet. The claw_dir sense
// and the inclination being a plain 8-bit output are this design's choices.
module rover
  import rover_pkg::*;
#(
  parameter int unsigned SYNC_HALF  = 92,
  parameter int unsigned PWM_PERIOD = 63
) (
  input  logic       clk,
  input  logic       rst,
  // command download from the transceiver
  input  logic       cmd_rx_received,
  input  logic       cmd_data_in,
  output logic       cmd_sync_out,
  // sensor upload to the transceiver
  input  logic       sens_request_tx,
  input  logic       sens_sync_in,
  output logic       sens_data_out,
  // sensors
  input  logic [7:0] temperature,
  input  logic [7:0] heading,
  // actuators
  output logic       rm_pwm,
  output logic       rm_dir,
  output logic       lm_pwm,
  output logic       lm_dir,
  output logic       claw_on,
  output logic       claw_dir,
  output logic [7:0] claw_incl,
  output logic       light,
  // status
  output logic       cmd_valid,
  output logic       cmd_error
);
  cmd_packet_t  cmd;
  logic [39:0]  cmd_word;
  sens_packet_t sens;

  rx_interface #(
    .WIDTH(PKT_W), .SYNC_HALF(SYNC_HALF),
    .VERIFY_MASK(CMD_VERIFY_MASK), .VERIFY_VALUE(CMD_VERIFY_VALUE)
  ) u_rx (
    .clk(clk), .rst(rst),
    .rx_received(cmd_rx_received), .data_in(cmd_data_in), .sync_out(cmd_sync_out),
    .packet(cmd_word), .pkt_valid(cmd_valid), .pkt_error(cmd_error), .busy()
  );

  // rx_interface latches only verified packets and clears to zero in reset,
  // which decodes as all stop.
  assign cmd = cmd_packet_t'(cmd_word);

  pwm #(.PERIOD(PWM_PERIOD)) u_pwm_r (.clk(clk), .rst(rst), .duty(cmd.right.mag), .out(rm_pwm));
  pwm #(.PERIOD(PWM_PERIOD)) u_pwm_l (.clk(clk), .rst(rst), .duty(cmd.left.mag),  .out(lm_pwm));

  assign rm_dir    = cmd.right.dir;
  assign lm_dir    = cmd.left.dir;
  assign light     = cmd.light;
  assign claw_incl = cmd.incl;
  assign claw_on   = (cmd.claw == CLAW_OPEN) || (cmd.claw == CLAW_CLOSE);
  assign claw_dir  = (cmd.claw == CLAW_CLOSE);

  always_comb begin
    sens.temp    = temperature;
    sens.heading = heading;
    sens.verify  = SENS_VERIFY;
  end

  tx_interface #(.WIDTH(PKT_W)) u_tx (
    .clk(clk), .rst(rst), .packet(sens),
    .request_tx(sens_request_tx), .sync_in(sens_sync_in), .data_out(sens_data_out),
    .busy(), .done(), .aborted()
  );
endmodule
