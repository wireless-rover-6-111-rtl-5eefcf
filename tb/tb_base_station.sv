// tb_base_station: the base station's FPGA logic with a pad model and
// transceiver models, at a reduced clock (3000 clocks per 20 Hz sample) and a
// 32-byte history RAM (16 records).
//
// The pad is given a new button word before every sample. A reference model
// (button mapping, run-length history, reversed replay, 16-record capacity)
// predicts the motor speeds each sample must end with; the station's `motors`
// and `stack_top` are compared with it. Command packets are fetched between
// samples and must carry the widened speeds and the pattern; sensor packets
// are delivered and must show on the display, damaged ones must be rejected.
// Mechanisms counted and required: replay, history overflow, pad ACK timeout,
// replay request ignored while replaying, damaged sensor packet. The sample
// rate is checked from the spacing of finished samples.
module tb_base_station;
  import rover_pkg::*;
  localparam int DIV = 3000;
  localparam int AW  = 5;
  localparam int CAP = 2**AW / 2;
  logic clk = 0, rst = 1;
  logic att_n, pclk, pcmd, pdata, pack_n;
  logic cmd_request_tx, cmd_sync_in, cmd_data_out;
  logic sens_rx_received, sens_data_in, sens_sync_out;
  logic [3:0] temp_hex [2];
  logic [7:0] compass;
  motor_pair_t motors;
  logic replay_active, sample_done, pad_timeout, stack_overflow, sens_error;
  logic [AW:0] stack_top;
  logic u1, u2, u3, u4;
  int checks = 0, failures = 0;
  int n_replay = 0, n_over = 0, n_to = 0, n_ignored = 0, n_sens_err = 0, n_samples = 0;

  base_station #(.CLK_HZ(DIV * 20), .SAMPLE_HZ(20), .PSX_HALF(4), .ACK_TIMEOUT(184),
                 .SYNC_HALF(6), .RAM_ADDR_W(AW)) dut (
    .clk(clk), .rst(rst),
    .psx_att_n(att_n), .psx_clk(pclk), .psx_cmd(pcmd), .psx_data(pdata), .psx_ack_n(pack_n),
    .cmd_request_tx(cmd_request_tx), .cmd_sync_in(cmd_sync_in), .cmd_data_out(cmd_data_out),
    .sens_rx_received(sens_rx_received), .sens_data_in(sens_data_in), .sens_sync_out(sens_sync_out),
    .temp_hex(temp_hex), .compass(compass), .motors(motors), .replay_active(replay_active),
    .stack_top(stack_top), .sample_done(sample_done), .pad_timeout(pad_timeout),
    .stack_overflow(stack_overflow), .sens_error(sens_error));

  psx_pad_model pad (.att_n(att_n), .clk(pclk), .cmd(pcmd), .data(pdata), .ack_n(pack_n));
  xcvr_model mc_cmd (.clk(clk), .request_tx(cmd_request_tx), .sync_in(cmd_sync_in), .data_out(cmd_data_out),
    .rx_received(u1), .data_in(u2), .sync_out(1'b0));
  xcvr_model mc_sens (.clk(clk), .request_tx(u3), .sync_in(u4), .data_out(1'b0),
    .rx_received(sens_rx_received), .data_in(sens_data_in), .sync_out(sens_sync_out));

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (stack_overflow) n_over++;
    if (pad_timeout) n_to++;
    if (sens_error) n_sens_err++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- reference model ----------------
  logic [7:0]  m_live = 0;
  bit          m_pstart = 0, m_replaying = 0;
  logic [7:0]  play_q [$];
  logic [15:0] rec [$];
  logic [7:0]  run_m = 0;
  int          run_d = 0;

  function automatic logic [7:0] map_dir(int d);
    case (d)
      1: map_dir = 8'h77;   // up
      2: map_dir = 8'hFF;   // down
      3: map_dir = 8'h7F;   // left
      4: map_dir = 8'hF7;   // right
      default: map_dir = 8'h00;
    endcase
  endfunction

  function automatic logic [3:0] rev4(logic [3:0] m);
    rev4 = (m[2:0] != 0) ? {~m[3], m[2:0]} : m;
  endfunction

  function automatic void rec_push(logic [7:0] m, int d);
    if (rec.size() < CAP) rec.push_back({m, 8'(d)});
  endfunction

  function automatic void store(logic [7:0] m, bit req);
    if (m == run_m && run_d != 0 && run_d != 255) begin
      if (!req) run_d++;
      else begin rec_push(run_m, run_d + 1); run_m = 0; run_d = 0; end
    end else if (!req) begin
      if (run_d != 0) rec_push(run_m, run_d);
      run_m = m; run_d = 1;
    end else begin
      if (run_d != 0) rec_push(run_m, run_d);
      rec_push(m, 1);
      run_m = 0; run_d = 0;
    end
  endfunction

  // returns the speeds the sample must end with
  function automatic logic [7:0] model_sample(int d, bit start_btn, bit ok);
    bit req;
    req = 0;
    if (ok) begin
      m_live = map_dir(d);
      req = start_btn && !m_pstart;
      m_pstart = start_btn;
    end
    if (m_replaying) begin
      if (req) n_ignored++;
      if (play_q.size() > 0) return play_q.pop_front();
      m_replaying = 0;
      return m_live;
    end
    store(m_live, req);
    if (req) begin
      for (int i = rec.size() - 1; i >= 0; i--)
        repeat (rec[i][7:0]) play_q.push_back({rev4(rec[i][15:12]), rev4(rec[i][11:8])});
      rec.delete();
      n_replay++;
      if (play_q.size() > 0) begin
        m_replaying = 1;
        return play_q.pop_front();
      end
    end
    return m_live;
  endfunction

  // ---------------- stimulus ----------------
  int first_done = -1, last_done = -1, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic do_sample(int d, bit start_btn, bit ok);
    logic [15:0] b;
    logic [7:0] exp_m;
    b = 16'hFFFF;
    if (d == 1) b[BTN_UP] = 0;
    if (d == 2) b[BTN_DOWN] = 0;
    if (d == 3) b[BTN_LEFT] = 0;
    if (d == 4) b[BTN_RIGHT] = 0;
    if (start_btn) b[BTN_START] = 0;
    pad.buttons = b;
    pad.ack_enable = ok;
    @(posedge clk iff sample_done);
    if (first_done < 0) first_done = cyc;
    last_done = cyc;
    n_samples++;
    #1;
    exp_m = model_sample(d, start_btn, ok);
    check(motors == exp_m, $sformatf("sample %0d: motors %h expected %h (replaying %0d)", n_samples, motors, exp_m, m_replaying));
    check(replay_active == m_replaying, $sformatf("sample %0d: replay_active %0d", n_samples, replay_active));
    if (!m_replaying)
      check(stack_top == (AW+1)'(2 * rec.size()), $sformatf("sample %0d: stack_top %0d expected %0d", n_samples, stack_top, 2*rec.size()));
  endtask

  task automatic link_traffic();
    logic [39:0] p, s;
    logic [7:0] t, h;
    mc_cmd.fetch(p);
    check(p == {widen_motor(motors.right), widen_motor(motors.left), p[29:19], CMD_VERIFY},
          $sformatf("command packet %h for motors %h", p, motors));
    t = 8'($urandom); h = 8'($urandom);
    s = {t, h, SENS_VERIFY};
    if ($urandom % 5 == 0) s[3] = !s[3];
    mc_sens.deliver(s);
    if (s[3] == SENS_VERIFY[3]) begin
      check({temp_hex[1], temp_hex[0]} == t, "temperature shown");
      check(compass == 8'(1 << (8'(h + 8'd16) >> 5)), "compass shown");
    end
  endtask

  initial begin
    int d;
    repeat (3) @(posedge clk);
    rst = 0;
    d = 0;
    // normal driving with runs and a few lost polls
    for (int i = 0; i < 40; i++) begin
      if ($urandom % 3 == 0) d = $urandom % 5;
      do_sample(d, 0, ($urandom % 10) != 0);
      if (i % 4 == 0) link_traffic();
    end
    // replay: press START for two samples, press it again mid-replay
    do_sample(d, 1, 1);
    do_sample(d, 1, 1);
    for (int i = 0; i < 8; i++) do_sample($urandom % 5, 0, 1);
    do_sample(0, 1, 1);
    while (m_replaying) begin
      do_sample($urandom % 5, 0, 1);
      if (n_samples % 5 == 0) link_traffic();
    end
    // overflow: a new run every sample
    for (int i = 0; i < 3 * CAP; i++) do_sample(1 + (i % 4), 0, 1);
    do_sample(0, 1, 1);
    while (m_replaying) do_sample(0, 0, 1);
    for (int i = 0; i < 5; i++) do_sample($urandom % 5, 0, 1);
    check(n_replay >= 2, "replay happened");
    check(n_over > 0, "history overflow happened");
    check(n_to > 0, "pad timeout happened");
    check(n_ignored > 0, "request during replay happened");
    check(n_sens_err > 0, "damaged sensor packet happened");
    check(last_done - first_done > (n_samples - 1) * DIV - 400 && last_done - first_done < (n_samples - 1) * DIV + 400,
          $sformatf("%0d samples in %0d cycles", n_samples, last_done - first_done));
    $display("replays %0d overflows %0d timeouts %0d ignored %0d bad sensor packets %0d samples %0d",
             n_replay, n_over, n_to, n_ignored, n_sens_err, n_samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
