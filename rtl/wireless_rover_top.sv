// wireless_rover_top: the whole system's FPGA logic, base station and rover.
//
// The two FPGAs talk only through their radio transceivers, which are outside
// this logic: each transceiver's microcontroller fetches a packet from its FPGA
// over one three-wire serial link (request, sync, data), sends it by radio, and
// hands a received packet to the other FPGA over a second link (received, sync,
// data). The transceivers' pins are therefore brought out as ports here, and
// the two halves share only clock and reset:
//   base station: PlayStation pad pins, command upload link, sensor download
//                 link, temperature/compass display, debug outputs
//   rover:        command download link, sensor upload link, sensor inputs,
//                 motor/claw/light outputs
// Parameters are passed to both halves; see base_station and rover.
module wireless_rover_top
  import rover_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 1_843_200,
  parameter int unsigned SAMPLE_HZ   = 20,
  parameter int unsigned PSX_HALF    = 4,
  parameter int unsigned ACK_TIMEOUT = 184,
  parameter int unsigned SYNC_HALF   = 92,
  parameter int unsigned RAM_ADDR_W  = 13,
  parameter int unsigned PWM_PERIOD  = 63
) (
  input  logic              clk,
  input  logic              rst,
  // base station: PlayStation pad
  output logic              psx_att_n,
  output logic              psx_clk,
  output logic              psx_cmd,
  input  logic              psx_data,
  input  logic              psx_ack_n,
  // base station: transceiver links
  input  logic              base_request_tx,
  input  logic              base_sync_in,
  output logic              base_data_out,
  input  logic              base_rx_received,
  input  logic              base_data_in,
  output logic              base_sync_out,
  // base station: display and status
  output logic [3:0]        temp_hex [2],
  output logic [7:0]        compass,
  output motor_pair_t       base_motors,
  output logic              replay_active,
  output logic [RAM_ADDR_W:0] stack_top,
  output logic              sample_done,
  output logic              pad_timeout,
  output logic              stack_overflow,
  output logic              sens_error,
  // rover: transceiver links
  input  logic              rover_rx_received,
  input  logic              rover_data_in,
  output logic              rover_sync_out,
  input  logic              rover_request_tx,
  input  logic              rover_sync_in,
  output logic              rover_data_out,
  // rover: sensors and actuators
  input  logic [7:0]        temperature,
  input  logic [7:0]        heading,
  output logic              rm_pwm,
  output logic              rm_dir,
  output logic              lm_pwm,
  output logic              lm_dir,
  output logic              claw_on,
  output logic              claw_dir,
  output logic [7:0]        claw_incl,
  output logic              light,
  output logic              cmd_valid,
  output logic              cmd_error
);
  base_station #(
    .CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ), .PSX_HALF(PSX_HALF),
    .ACK_TIMEOUT(ACK_TIMEOUT), .SYNC_HALF(SYNC_HALF), .RAM_ADDR_W(RAM_ADDR_W)
  ) u_base (
    .clk(clk), .rst(rst),
    .psx_att_n(psx_att_n), .psx_clk(psx_clk), .psx_cmd(psx_cmd),
    .psx_data(psx_data), .psx_ack_n(psx_ack_n),
    .cmd_request_tx(base_request_tx), .cmd_sync_in(base_sync_in), .cmd_data_out(base_data_out),
    .sens_rx_received(base_rx_received), .sens_data_in(base_data_in), .sens_sync_out(base_sync_out),
    .temp_hex(temp_hex), .compass(compass),
    .motors(base_motors), .replay_active(replay_active), .stack_top(stack_top),
    .sample_done(sample_done), .pad_timeout(pad_timeout),
    .stack_overflow(stack_overflow), .sens_error(sens_error)
  );

  rover #(.SYNC_HALF(SYNC_HALF), .PWM_PERIOD(PWM_PERIOD)) u_rover (
    .clk(clk), .rst(rst),
    .cmd_rx_received(rover_rx_received), .cmd_data_in(rover_data_in), .cmd_sync_out(rover_sync_out),
    .sens_request_tx(rover_request_tx), .sens_sync_in(rover_sync_in), .sens_data_out(rover_data_out),
    .temperature(temperature), .heading(heading),
    .rm_pwm(rm_pwm), .rm_dir(rm_dir), .lm_pwm(lm_pwm), .lm_dir(lm_dir),
    .claw_on(claw_on), .claw_dir(claw_dir), .claw_incl(claw_incl), .light(light),
    .cmd_valid(cmd_valid), .cmd_error(cmd_error)
  );
endmodule
