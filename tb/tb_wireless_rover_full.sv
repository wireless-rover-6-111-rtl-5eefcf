// tb_wireless_rover_full: one complete operation of the whole system with every
// parameter at its default (1.8432 MHz clock, 20 Hz sampling, 8 KiB history,
// 50 us sync halves, 63-clock PWM).
//
// The user drives forward for three samples, turns left for two, then presses
// START. After every sample the transceiver models fetch the base station's
// command packet, deliver it to the rover and carry a sensor packet back. The
// rover must drive forward at full speed, then turn, and during the replay
// drive the reversed moves in reverse order (turn right for two samples, back
// up for three, then the idle start) before stopping; the base display must show the rover's
// temperature and heading. Sample spacing must be 1/20 s of clock cycles.
module tb_wireless_rover_full;
  import rover_pkg::*;
  localparam int CLK_HZ = 1_843_200;
  localparam int DIV = CLK_HZ / 20;
  localparam int PERIOD = 63;
  logic clk = 0, rst = 1;
  logic psx_att_n, psx_clk, psx_cmd, psx_data, psx_ack_n;
  logic base_request_tx, base_sync_in, base_data_out, base_rx_received, base_data_in, base_sync_out;
  logic [3:0] temp_hex [2];
  logic [7:0] compass;
  motor_pair_t base_motors;
  logic replay_active, sample_done, pad_timeout, stack_overflow, sens_error;
  logic [13:0] stack_top;
  logic rover_rx_received, rover_data_in, rover_sync_out, rover_request_tx, rover_sync_in, rover_data_out;
  logic [7:0] temperature = 8'd23, heading = 8'd64;
  logic rm_pwm, rm_dir, lm_pwm, lm_dir, claw_on, claw_dir, light, cmd_valid, cmd_error;
  logic [7:0] claw_incl;
  logic u1, u2, u3, u4, u5, u6, u7, u8;
  int checks = 0, failures = 0, cyc = 0;

  wireless_rover_top dut (
    .clk(clk), .rst(rst),
    .psx_att_n(psx_att_n), .psx_clk(psx_clk), .psx_cmd(psx_cmd), .psx_data(psx_data), .psx_ack_n(psx_ack_n),
    .base_request_tx(base_request_tx), .base_sync_in(base_sync_in), .base_data_out(base_data_out),
    .base_rx_received(base_rx_received), .base_data_in(base_data_in), .base_sync_out(base_sync_out),
    .temp_hex(temp_hex), .compass(compass), .base_motors(base_motors), .replay_active(replay_active),
    .stack_top(stack_top), .sample_done(sample_done), .pad_timeout(pad_timeout),
    .stack_overflow(stack_overflow), .sens_error(sens_error),
    .rover_rx_received(rover_rx_received), .rover_data_in(rover_data_in), .rover_sync_out(rover_sync_out),
    .rover_request_tx(rover_request_tx), .rover_sync_in(rover_sync_in), .rover_data_out(rover_data_out),
    .temperature(temperature), .heading(heading),
    .rm_pwm(rm_pwm), .rm_dir(rm_dir), .lm_pwm(lm_pwm), .lm_dir(lm_dir),
    .claw_on(claw_on), .claw_dir(claw_dir), .claw_incl(claw_incl), .light(light),
    .cmd_valid(cmd_valid), .cmd_error(cmd_error));

  psx_pad_model pad (.att_n(psx_att_n), .clk(psx_clk), .cmd(psx_cmd), .data(psx_data), .ack_n(psx_ack_n));
  xcvr_model #(.HI(40), .LO(40)) base_up (.clk(clk), .request_tx(base_request_tx), .sync_in(base_sync_in),
    .data_out(base_data_out), .rx_received(u1), .data_in(u2), .sync_out(1'b0));
  xcvr_model base_down (.clk(clk), .request_tx(u3), .sync_in(u4), .data_out(1'b0),
    .rx_received(base_rx_received), .data_in(base_data_in), .sync_out(base_sync_out));
  xcvr_model rover_down (.clk(clk), .request_tx(u5), .sync_in(u6), .data_out(1'b0),
    .rx_received(rover_rx_received), .data_in(rover_data_in), .sync_out(rover_sync_out));
  xcvr_model #(.HI(40), .LO(40)) rover_up (.clk(clk), .request_tx(rover_request_tx), .sync_in(rover_sync_in),
    .data_out(rover_data_out), .rx_received(u7), .data_in(u8), .sync_out(1'b0));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (30 * DIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One sample: set the pad, wait for the sample to finish, relay both packets,
  // and check the rover. exp_r / exp_l: expected {dir, 4-bit magnitude}.
  task automatic step(logic [15:0] b, logic [4:0] exp_r, logic [4:0] exp_l, string what);
    logic [39:0] p, s;
    int hr, hl;
    pad.buttons = b;
    @(posedge clk iff sample_done);
    base_up.fetch(p);
    check(p[18:0] == CMD_VERIFY, "command pattern");
    rover_down.deliver(p);
    check({rm_dir, p[38:35]} == exp_r && {lm_dir, p[33:30]} == exp_l,
          $sformatf("%s: right %b left %b", what, {rm_dir, p[38:35]}, {lm_dir, p[33:30]}));
    hr = 0; hl = 0;
    repeat (PERIOD) begin @(posedge clk); if (rm_pwm) hr++; if (lm_pwm) hl++; end
    check(hr == (exp_r[3:0] == 15 ? PERIOD : (exp_r[3:0] == 0 ? 0 : 4 * exp_r[3:0] + 1)), $sformatf("%s: right PWM %0d", what, hr));
    check(hl == (exp_l[3:0] == 15 ? PERIOD : (exp_l[3:0] == 0 ? 0 : 4 * exp_l[3:0] + 1)), $sformatf("%s: left PWM %0d", what, hl));
    rover_up.fetch(s);
    base_down.deliver(s);
    check({temp_hex[1], temp_hex[0]} == temperature && compass == 8'(1 << (8'(heading + 8'd16) >> 5)), "display");
  endtask

  initial begin
    int t0;
    logic [15:0] up, left, start, none;
    none = 16'hFFFF;
    up = none;    up[BTN_UP] = 0;
    left = none;  left[BTN_LEFT] = 0;
    start = none; start[BTN_START] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk iff sample_done);
    t0 = cyc;
    @(posedge clk iff sample_done);
    check(cyc - t0 == DIV, $sformatf("sample spacing %0d cycles, expected %0d", cyc - t0, DIV));
    step(up, 5'b0_1111, 5'b0_1111, "forward 1");
    step(up, 5'b0_1111, 5'b0_1111, "forward 2");
    step(up, 5'b0_1111, 5'b0_1111, "forward 3");
    step(left, 5'b0_1111, 5'b1_1111, "left 1");
    step(left, 5'b0_1111, 5'b1_1111, "left 2");
    // replay: the two left samples and the START sample itself (no direction)
    // are the newest history; they are undone first, then the forward run
    step(start, 5'b0_0000, 5'b0_0000, "replay stop sample");
    check(replay_active, "replay running");
    step(none, 5'b1_1111, 5'b0_1111, "replay turn 1");
    step(none, 5'b1_1111, 5'b0_1111, "replay turn 2");
    step(none, 5'b1_1111, 5'b1_1111, "replay back 1");
    step(none, 5'b1_1111, 5'b1_1111, "replay back 2");
    step(none, 5'b1_1111, 5'b1_1111, "replay back 3");
    // the two idle samples recorded right after reset are undone last
    step(none, 5'b0_0000, 5'b0_0000, "replay idle 1");
    step(none, 5'b0_0000, 5'b0_0000, "replay idle 2");
    step(none, 5'b0_0000, 5'b0_0000, "stopped");
    check(!replay_active, "replay finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
