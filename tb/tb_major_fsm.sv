// tb_major_fsm: checks the order in which the major FSM starts its minor FSMs.
// Minor FSMs are modelled by the testbench; each answers its start pulse with
// done after a random delay and logs a letter (C controller, S store, R
// replay). Per sample the log must be "CS" normally, "CSR" on a fresh replay
// request and "CR" while a replay runs; a sample pulse during work must be
// flagged as an overrun and ignored.
module tb_major_fsm;
  logic clk = 0, rst = 1;
  logic sample = 0, replay_req = 0, replay_active = 0;
  logic ctrl_start, ctrl_done = 0, store_start, store_done = 0, replay_start, replay_done = 0;
  logic sample_done, overrun;
  int checks = 0, failures = 0, n_over = 0;
  string log_s = "";

  major_fsm dut (.clk(clk), .rst(rst), .sample(sample), .replay_req(replay_req), .replay_active(replay_active),
    .ctrl_start(ctrl_start), .ctrl_done(ctrl_done), .store_start(store_start), .store_done(store_done),
    .replay_start(replay_start), .replay_done(replay_done), .sample_done(sample_done), .overrun(overrun));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic answer(ref logic d);
    repeat (1 + $urandom % 8) @(posedge clk);
    d <= 1;
    @(posedge clk);
    d <= 0;
  endtask

  always @(posedge clk) begin
    if (ctrl_start)   begin log_s = {log_s, "C"}; fork answer(ctrl_done);   join_none end
    if (store_start)  begin log_s = {log_s, "S"}; fork answer(store_done);  join_none end
    if (replay_start) begin log_s = {log_s, "R"}; fork answer(replay_done); join_none end
    if (overrun && !rst) n_over++;
  end

  task automatic run(bit req, bit act, string exp_s, bit extra_pulse = 0);
    int t;
    log_s = "";
    @(negedge clk);
    replay_req = req; replay_active = act; sample = 1;
    @(negedge clk);
    sample = 0;
    if (extra_pulse) begin @(negedge clk); sample = 1; @(negedge clk); sample = 0; end
    t = 0;
    while (!sample_done && t < 200) begin @(negedge clk); t++; end
    repeat (12) @(negedge clk);
    checks++;
    if (log_s != exp_s) begin failures++; $display("req=%0d act=%0d: %s expected %s", req, act, log_s, exp_s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 30; i++) begin
      case ($urandom % 3)
        0: run(0, 0, "CS");
        1: run(1, 0, "CSR");
        default: run($urandom % 2, 1, "CR");
      endcase
    end
    run(0, 0, "CS", 1);
    checks++;
    if (n_over != 1) begin failures++; $display("overruns %0d expected 1", n_over); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
