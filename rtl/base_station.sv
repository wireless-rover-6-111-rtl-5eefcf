// base_station: the logic of the base control station's FPGA.
//
// A divider makes a 20 Hz sample pulse. On each pulse the major FSM polls the
// PlayStation pad (psx_controller), lets command_calc turn the buttons into
// motor speeds and tool settings, and then either records the speeds
// (store_data) or plays the history back (replay_fsm). Both share one stack
// (stack_fsm) kept in history_ram: the history is a list of (speeds, number of
// samples) records, and a replay pops them newest first and drives each with
// its direction reversed for the same number of samples, walking the rover back
// along its path until the stack is empty.
//
// The current command packet (live or replayed speeds, light, claw, pattern)
// is always ready; the transceiver fetches it through tx_interface whenever it
// transmits. Sensor packets the transceiver receives are fetched through
// rx_interface, verified, and shown by display_calc on two hex digits and eight
// compass LEDs. `stack_top` and `motors` are the debug outputs the published
// station showed on its hex LEDs.
//
// Default sizes: CLK_HZ 1.8432 MHz (assumed), 20 Hz sampling (published),
// 8 KiB of history (assumed).
module base_station
  import rover_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 1_843_200,
  parameter int unsigned SAMPLE_HZ   = 20,
  parameter int unsigned PSX_HALF    = 4,
  parameter int unsigned ACK_TIMEOUT = 184,
  parameter int unsigned SYNC_HALF   = 92,
  parameter int unsigned RAM_ADDR_W  = 13
) (
  input  logic              clk,
  input  logic              rst,
  // PlayStation pad
  output logic              psx_att_n,
  output logic              psx_clk,
  output logic              psx_cmd,
  input  logic              psx_data,
  input  logic              psx_ack_n,
  // command upload to the transceiver
  input  logic              cmd_request_tx,
  input  logic              cmd_sync_in,
  output logic              cmd_data_out,
  // sensor download from the transceiver
  input  logic              sens_rx_received,
  input  logic              sens_data_in,
  output logic              sens_sync_out,
  // display
  output logic [3:0]        temp_hex [2],
  output logic [7:0]        compass,
  // status and debug
  output motor_pair_t       motors,
  output logic              replay_active,
  output logic [RAM_ADDR_W:0] stack_top,
  output logic              sample_done,
  output logic              pad_timeout,
  output logic              stack_overflow,
  output logic              sens_error
);
  // sample pulse
  logic sample;
  sample_divider #(.DIV(CLK_HZ / SAMPLE_HZ)) u_div (.clk(clk), .rst(rst), .tick(sample));

  // major FSM and its minor FSMs
  logic ctrl_start, ctrl_done, store_start, store_done, replay_start, replay_done;
  logic replay_req, overrun;
  logic pad_valid;
  logic [15:0] buttons;

  major_fsm u_major (
    .clk(clk), .rst(rst), .sample(sample),
    .replay_req(replay_req), .replay_active(replay_active),
    .ctrl_start(ctrl_start), .ctrl_done(ctrl_done),
    .store_start(store_start), .store_done(store_done),
    .replay_start(replay_start), .replay_done(replay_done),
    .sample_done(sample_done), .overrun(overrun)
  );

  psx_controller #(.HALF(PSX_HALF), .ACK_TIMEOUT(ACK_TIMEOUT)) u_pad (
    .clk(clk), .rst(rst), .start(ctrl_start), .done(ctrl_done),
    .valid(pad_valid), .ack_timeout(pad_timeout), .buttons(buttons),
    .psx_att_n(psx_att_n), .psx_clk(psx_clk), .psx_cmd(psx_cmd),
    .psx_data(psx_data), .psx_ack_n(psx_ack_n)
  );

  motor_pair_t live_motors, replay_motors;
  cmd_packet_t cmd_packet;

  command_calc u_calc (
    .clk(clk), .rst(rst), .update(ctrl_done), .valid(pad_valid), .buttons(buttons),
    .replay_active(replay_active), .replay_motors(replay_motors),
    .live_motors(live_motors), .replay_req(replay_req), .packet(cmd_packet)
  );

  assign motors = replay_active ? replay_motors : live_motors;

  // history stack
  logic        push, pop, stack_done, stack_empty;
  motor_pair_t push_motor, pop_motor;
  logic [7:0]  push_dur, pop_dur;
  logic                  ram_we;
  logic [RAM_ADDR_W-1:0] ram_addr;
  logic [7:0]            ram_wdata, ram_rdata;

  store_data u_store (
    .clk(clk), .rst(rst), .start(store_start), .replay_req(replay_req),
    .motors(live_motors), .done(store_done),
    .push(push), .push_motor(push_motor), .push_dur(push_dur), .stack_done(stack_done)
  );

  replay_fsm u_replay (
    .clk(clk), .rst(rst), .start(replay_start), .replay_req(replay_req),
    .done(replay_done), .active(replay_active), .motors(replay_motors),
    .pop(pop), .stack_done(stack_done), .stack_empty(stack_empty),
    .pop_motor(pop_motor), .pop_dur(pop_dur)
  );

  stack_fsm #(.ADDR_W(RAM_ADDR_W)) u_stack (
    .clk(clk), .rst(rst), .push(push), .pop(pop),
    .push_motor(push_motor), .push_dur(push_dur),
    .done(stack_done), .busy(), .pop_motor(pop_motor), .pop_dur(pop_dur),
    .empty(stack_empty), .full(), .overflow(stack_overflow), .underflow(),
    .top(stack_top),
    .ram_we(ram_we), .ram_addr(ram_addr), .ram_wdata(ram_wdata), .ram_rdata(ram_rdata)
  );

  history_ram #(.ADDR_W(RAM_ADDR_W), .DATA_W(8)) u_ram (
    .clk(clk), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  // wireless side
  tx_interface #(.WIDTH(PKT_W)) u_tx (
    .clk(clk), .rst(rst), .packet(cmd_packet),
    .request_tx(cmd_request_tx), .sync_in(cmd_sync_in), .data_out(cmd_data_out),
    .busy(), .done(), .aborted()
  );

  logic [PKT_W-1:0] sens_word;
  logic             sens_valid;

  rx_interface #(
    .WIDTH(PKT_W), .SYNC_HALF(SYNC_HALF),
    .VERIFY_MASK(SENS_VERIFY_MASK), .VERIFY_VALUE(SENS_VERIFY_VALUE)
  ) u_rx (
    .clk(clk), .rst(rst), .rx_received(sens_rx_received), .data_in(sens_data_in),
    .sync_out(sens_sync_out), .packet(sens_word), .pkt_valid(sens_valid),
    .pkt_error(sens_error), .busy()
  );

  display_calc u_disp (
    .clk(clk), .rst(rst), .pkt_valid(sens_valid), .pkt(sens_packet_t'(sens_word)),
    .temp_hex(temp_hex), .compass(compass)
  );
endmodule
