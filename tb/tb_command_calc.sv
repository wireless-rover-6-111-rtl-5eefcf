// tb_command_calc: button mapping and packet assembly of command_calc.
// Random button words are applied with `update`; an independent model tracks
// the light toggle, claw motion, inclination (with saturation) and the START
// edge, and predicts the full 40-bit packet, also with replayed speeds
// substituted. A failed poll must hold everything and clear replay_req.
module tb_command_calc;
  import rover_pkg::*;
  logic clk = 0, rst = 1, update = 0, valid = 1, replay_active = 0;
  logic [15:0] buttons = '1;
  motor_pair_t replay_motors = '0, live_motors;
  logic replay_req;
  cmd_packet_t packet;
  int checks = 0, failures = 0;
  // model
  bit m_light = 0, m_pstart = 0, m_ptri = 0, m_req = 0;
  int m_incl = 0;
  logic [1:0] m_claw = 0;
  logic [7:0] m_motor = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  command_calc #(.DRIVE_SPEED(3'd7), .INCL_STEP(8'd8)) dut (
    .clk(clk), .rst(rst), .update(update), .valid(valid), .buttons(buttons),
    .replay_active(replay_active), .replay_motors(replay_motors),
    .live_motors(live_motors), .replay_req(replay_req), .packet(packet));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] wide(logic [3:0] m);
    // sign, then 3-bit magnitude scaled to 0..15 by replication
    wide = {m[3], m[2:0], m[2]};
  endfunction

  task automatic step(logic [15:0] b, bit ok);
    logic [15:0] p;
    logic [39:0] exp_pkt;
    logic [7:0] sent;
    @(negedge clk);
    buttons = b; valid = ok; update = 1;
    @(negedge clk);
    update = 0;
    p = ~b;
    if (ok) begin
      // motors: {right, left}, each {dir, mag}
      if (p[4])      m_motor = 8'h77;
      else if (p[6]) m_motor = 8'hFF;
      else if (p[7]) m_motor = 8'h7F;
      else if (p[5]) m_motor = 8'hF7;
      else           m_motor = 8'h00;
      m_req = p[3] && !m_pstart;
      m_pstart = p[3];
      if (p[12] && !m_ptri) m_light = !m_light;
      m_ptri = p[12];
      m_claw = p[13] ? 2'd1 : p[14] ? 2'd2 : 2'd0;
      if (p[11] && !p[10]) begin m_incl += 8; if (m_incl > 255) begin m_incl = 255; n_sat_hi++; end end
      else if (p[10] && !p[11]) begin m_incl -= 8; if (m_incl < 0) begin m_incl = 0; n_sat_lo++; end end
    end else m_req = 0;
    replay_active = $urandom % 3 == 0;
    replay_motors = 8'($urandom);
    #1;
    sent = replay_active ? replay_motors : m_motor;
    exp_pkt = {wide(sent[7:4]), wide(sent[3:0]), m_light, 8'(m_incl), m_claw, 19'h2A5A5};
    checks++;
    if (packet != exp_pkt) begin failures++; $display("packet %h expected %h (buttons %h)", packet, exp_pkt, b); end
    checks++;
    if (live_motors != m_motor) begin failures++; $display("live %h expected %h", live_motors, m_motor); end
    checks++;
    if (replay_req != m_req) begin failures++; $display("replay_req %0d expected %0d", replay_req, m_req); end
  endtask

  initial begin
    logic [15:0] b;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      b = 16'($urandom) | 16'($urandom);   // mostly released (active low)
      if (i > 100 && i < 160) b[11] = 0;   // hold R1 to saturate high
      if (i > 200 && i < 260) b[10] = 0;   // hold L1 to saturate low
      step(b, ($urandom % 10) != 0);
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
