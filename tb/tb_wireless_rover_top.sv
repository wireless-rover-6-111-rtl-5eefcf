// tb_wireless_rover_top: the whole system end to end, at reduced sizes
// (3000 clocks per sample, 16-record history, 6-clock sync halves).
//
// A pad model drives the base station; a "radio" process plays both
// transceivers' part in a send/receive loop: it fetches the base station's
// command packet and delivers it to the rover, then fetches the rover's sensor
// packet and delivers it to the base station. Checks:
//   - every fetched command packet carries the pattern, and the rover's
//     outputs (directions, PWM on-time, light, claw, inclination) then match
//     the last packet that arrived intact;
//   - the rover's temperature and heading appear on the base display;
//   - while a replay runs, the rover receives the reversed speeds.
// Mechanisms that must each happen at least once: replay at the rover, history
// overflow, pad ACK timeout, a command packet damaged in transfer and rejected
// by the rover, an upload with a missed sync pulse recovered by the request
// falling, and a damaged sensor packet rejected by the base.
module tb_wireless_rover_top;
  import rover_pkg::*;
  localparam int DIV = 3000;
  localparam int AW  = 5;
  localparam int PERIOD = 63;
  logic clk = 0, rst = 1;
  logic psx_att_n, psx_clk, psx_cmd, psx_data, psx_ack_n;
  logic base_request_tx, base_sync_in, base_data_out, base_rx_received, base_data_in, base_sync_out;
  logic [3:0] temp_hex [2];
  logic [7:0] compass;
  motor_pair_t base_motors;
  logic replay_active, sample_done, pad_timeout, stack_overflow, sens_error;
  logic [AW:0] stack_top;
  logic rover_rx_received, rover_data_in, rover_sync_out, rover_request_tx, rover_sync_in, rover_data_out;
  logic [7:0] temperature = 8'd21, heading = 8'd0;
  logic rm_pwm, rm_dir, lm_pwm, lm_dir, claw_on, claw_dir, light, cmd_valid, cmd_error;
  logic [7:0] claw_incl;
  logic u1, u2, u3, u4, u5, u6, u7, u8;
  int checks = 0, failures = 0;
  int n_replay_rover = 0, n_over = 0, n_to = 0, n_cmd_err = 0, n_missed_sync = 0, n_sens_err = 0, n_loops = 0;
  bit stop_radio = 0;

  wireless_rover_top #(.CLK_HZ(DIV * 20), .SYNC_HALF(6), .RAM_ADDR_W(AW)) dut (
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

  // base transceiver: uploads commands from the base, downloads sensors into it
  xcvr_model base_up   (.clk(clk), .request_tx(base_request_tx), .sync_in(base_sync_in), .data_out(base_data_out),
                        .rx_received(u1), .data_in(u2), .sync_out(1'b0));
  xcvr_model base_down (.clk(clk), .request_tx(u3), .sync_in(u4), .data_out(1'b0),
                        .rx_received(base_rx_received), .data_in(base_data_in), .sync_out(base_sync_out));
  // rover transceiver: downloads commands into the rover, uploads its sensors
  xcvr_model rover_down (.clk(clk), .request_tx(u5), .sync_in(u6), .data_out(1'b0),
                         .rx_received(rover_rx_received), .data_in(rover_data_in), .sync_out(rover_sync_out));
  xcvr_model rover_up   (.clk(clk), .request_tx(rover_request_tx), .sync_in(rover_sync_in), .data_out(rover_data_out),
                         .rx_received(u7), .data_in(u8), .sync_out(1'b0));

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (stack_overflow) n_over++;
    if (pad_timeout) n_to++;
    if (cmd_error) n_cmd_err++;
    if (sens_error) n_sens_err++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int high_clocks(logic [3:0] d);
    high_clocks = (d == 15) ? PERIOD : (d == 0 ? 0 : 4 * d + 1);
  endfunction

  // the radio: send/receive loop of the two transceivers
  initial begin
    logic [39:0] cmd, good, s;
    int k, hr, hl;
    bit was_replay;
    good = {21'd0, CMD_VERIFY};
    @(negedge rst);
    repeat (10) @(posedge clk);
    while (!stop_radio) begin
      n_loops++;
      was_replay = replay_active;
      if (n_loops % 9 == 4) begin
        // a missed sync pulse: the upload is lost, the next one must be good
        base_up.fetch(cmd, 11);
        n_missed_sync++;
        base_up.fetch(cmd);
      end else begin
        base_up.fetch(cmd);
      end
      check(cmd[18:0] == CMD_VERIFY, $sformatf("command packet pattern %h", cmd));
      if (n_loops % 7 == 3) begin k = $urandom % 19; cmd[k] = !cmd[k]; end else good = cmd;
      rover_down.deliver(cmd);
      check(rm_dir == good[39] && lm_dir == good[34] && light == good[29] && claw_incl == good[28:21]
            && claw_on == (good[20:19] != 2'd0) && claw_dir == (good[20:19] == 2'd2),
            $sformatf("rover outputs for %h", good));
      hr = 0; hl = 0;
      repeat (PERIOD) begin @(posedge clk); if (rm_pwm) hr++; if (lm_pwm) hl++; end
      check(hr == high_clocks(good[38:35]) && hl == high_clocks(good[33:30]), "rover PWM on-time");
      if (was_replay && replay_active && good == cmd && (good[38:35] != 0 || good[33:30] != 0)) n_replay_rover++;
      temperature = 8'($urandom);
      heading = 8'($urandom);
      rover_up.fetch(s);
      if (n_loops % 6 == 5) s[7] = !s[7];
      base_down.deliver(s);
      if (s[7] == SENS_VERIFY[7])
        check({temp_hex[1], temp_hex[0]} == temperature && compass == 8'(1 << (8'(heading + 8'd16) >> 5)),
              "sensor data on base display");
    end
  end

  // the user on the pad
  task automatic sample(int d, bit start_btn, bit ok);
    logic [15:0] b;
    b = 16'hFFFF;
    if (d == 1) b[BTN_UP] = 0;
    if (d == 2) b[BTN_DOWN] = 0;
    if (d == 3) b[BTN_LEFT] = 0;
    if (d == 4) b[BTN_RIGHT] = 0;
    if (start_btn) b[BTN_START] = 0;
    if ($urandom % 6 == 0) b[BTN_TRI] = 0;
    if ($urandom % 4 == 0) b[BTN_CIRCLE] = 0;
    if ($urandom % 4 == 0) b[BTN_CROSS] = 0;
    if ($urandom % 3 == 0) b[BTN_R1] = 0;
    pad.buttons = b;
    pad.ack_enable = ok;
    @(posedge clk iff sample_done);
  endtask

  initial begin
    int d;
    repeat (3) @(posedge clk);
    rst = 0;
    d = 1;
    for (int i = 0; i < 12; i++) begin
      if (i % 3 == 0) d = 1 + $urandom % 4;
      sample(d, 0, i != 5);
    end
    sample(d, 1, 1);
    while (replay_active) sample(0, 0, 1);
    for (int i = 0; i < 40; i++) sample(1 + (i % 4), 0, 1);
    sample(0, 1, 1);
    while (replay_active) sample(0, 0, 1);
    sample(1, 0, 1);
    sample(1, 0, 1);
    stop_radio = 1;
    repeat (4 * DIV) @(posedge clk);
    check(n_replay_rover > 0, "rover driven by a replay");
    check(n_over > 0, "history overflow");
    check(n_to > 0, "pad ACK timeout");
    check(n_cmd_err > 0, "damaged command packet rejected");
    check(n_missed_sync > 0, "missed sync pulse recovered");
    check(n_sens_err > 0, "damaged sensor packet rejected");
    $display("loops %0d: replay at rover %0d, overflow %0d, pad timeout %0d, command rejected %0d, missed sync %0d, sensor rejected %0d",
             n_loops, n_replay_rover, n_over, n_to, n_cmd_err, n_missed_sync, n_sens_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
