// tb_rover: the rover's FPGA logic driven through both transceiver links.
// Random verified command packets are delivered; afterwards the direction,
// light, claw and inclination outputs must match the packet and each tread's
// PWM must be high for the number of clocks per period its magnitude gives.
// Packets with a damaged pattern must be rejected (cmd_error) and leave every
// output as it was. Sensor packets uploaded on request must carry the current
// temperature and heading and the sensor pattern.
module tb_rover;
  import rover_pkg::*;
  localparam int SH = 6;
  localparam int PERIOD = 63;
  logic clk = 0, rst = 1;
  logic cmd_rx_received, cmd_data_in, cmd_sync_out;
  logic sens_request_tx, sens_sync_in, sens_data_out;
  logic [7:0] temperature = 0, heading = 0;
  logic rm_pwm, rm_dir, lm_pwm, lm_dir, claw_on, claw_dir, light, cmd_valid, cmd_error;
  logic [7:0] claw_incl;
  logic unused_req, unused_sync, unused_rxr, unused_din;
  int checks = 0, failures = 0, n_err = 0;

  rover #(.SYNC_HALF(SH), .PWM_PERIOD(PERIOD)) dut (
    .clk(clk), .rst(rst),
    .cmd_rx_received(cmd_rx_received), .cmd_data_in(cmd_data_in), .cmd_sync_out(cmd_sync_out),
    .sens_request_tx(sens_request_tx), .sens_sync_in(sens_sync_in), .sens_data_out(sens_data_out),
    .temperature(temperature), .heading(heading),
    .rm_pwm(rm_pwm), .rm_dir(rm_dir), .lm_pwm(lm_pwm), .lm_dir(lm_dir),
    .claw_on(claw_on), .claw_dir(claw_dir), .claw_incl(claw_incl), .light(light),
    .cmd_valid(cmd_valid), .cmd_error(cmd_error));

  // one model per link direction
  xcvr_model mc_cmd (.clk(clk), .request_tx(unused_req), .sync_in(unused_sync), .data_out(1'b0),
    .rx_received(cmd_rx_received), .data_in(cmd_data_in), .sync_out(cmd_sync_out));
  xcvr_model mc_sens (.clk(clk), .request_tx(sens_request_tx), .sync_in(sens_sync_in), .data_out(sens_data_out),
    .rx_received(unused_rxr), .data_in(unused_din), .sync_out(1'b0));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && cmd_error) n_err++;

  initial begin
    repeat (1000000) @(posedge clk);
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

  task automatic check_outputs(logic [39:0] c);
    int hr, hl;
    check(rm_dir == c[39] && lm_dir == c[34], "directions");
    check(light == c[29], "light");
    check(claw_incl == c[28:21], "inclination");
    check(claw_on == (c[20:19] == 2'd1 || c[20:19] == 2'd2) && claw_dir == (c[20:19] == 2'd2), "claw");
    hr = 0; hl = 0;
    repeat (PERIOD) begin @(posedge clk); if (rm_pwm) hr++; if (lm_pwm) hl++; end
    check(hr == high_clocks(c[38:35]), $sformatf("right PWM %0d clocks, magnitude %0d", hr, c[38:35]));
    check(hl == high_clocks(c[33:30]), $sformatf("left PWM %0d clocks, magnitude %0d", hl, c[33:30]));
  endtask

  initial begin
    logic [39:0] c, good, s;
    int k;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    good = {21'd0, CMD_VERIFY};
    check_outputs(good);
    for (int i = 0; i < 30; i++) begin
      c = {21'($urandom), CMD_VERIFY};
      if (c[20:19] == 2'd3) c[20:19] = 2'd0;
      if (i % 4 == 3) begin k = $urandom % 19; c[k] = !c[k]; end else good = c;
      mc_cmd.deliver(c);
      check_outputs(good);
      temperature = 8'($urandom);
      heading = 8'($urandom);
      mc_sens.fetch(s);
      check(s == {temperature, heading, SENS_VERIFY}, $sformatf("sensor packet %h", s));
    end
    check(n_err == 7, $sformatf("rejected %0d packets, expected 7", n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
