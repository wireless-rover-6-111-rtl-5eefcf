// tb_store_data: store_data against a run-length reference model.
// The stack is modelled by the testbench: every push is recorded and answered
// with `stack_done` after a random delay. Random speed sequences with runs,
// occasional replay requests and one 300-sample run (to reach the 255-sample
// duration limit) are fed in; the pushed records must match the model's in
// order, and every sample must end with `done`.
module tb_store_data;
  import rover_pkg::*;
  logic clk = 0, rst = 1;
  logic start = 0, replay_req = 0, done, push, stack_done = 0;
  motor_pair_t motors = '0, push_motor;
  logic [7:0] push_dur;
  int checks = 0, failures = 0;
  logic [15:0] got [$];
  logic [15:0] exp_q [$];
  motor_pair_t run_m = '0;
  int run_d = 0;
  int n_sat = 0, n_flush = 0, n_double = 0;

  store_data dut (.clk(clk), .rst(rst), .start(start), .replay_req(replay_req), .motors(motors),
    .done(done), .push(push), .push_motor(push_motor), .push_dur(push_dur), .stack_done(stack_done));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stack responder
  always @(posedge clk) if (push && !rst) begin
    got.push_back({push_motor, push_dur});
    fork
      begin
        repeat (1 + $urandom % 6) @(posedge clk);
        stack_done <= 1;
        @(posedge clk);
        stack_done <= 0;
      end
    join_none
  end

  task automatic model(motor_pair_t m, bit req);
    if (m == run_m && run_d != 0 && run_d != 255) begin
      if (!req) run_d++;
      else begin exp_q.push_back({run_m, 8'(run_d + 1)}); run_m = '0; run_d = 0; n_flush++; end
    end else begin
      if (run_d == 255) n_sat++;
      if (!req) begin
        if (run_d != 0) exp_q.push_back({run_m, 8'(run_d)});
        run_m = m; run_d = 1;
      end else begin
        if (run_d != 0) begin exp_q.push_back({run_m, 8'(run_d)}); n_double++; end
        exp_q.push_back({m, 8'd1});
        run_m = '0; run_d = 0; n_flush++;
      end
    end
  endtask

  task automatic sample(motor_pair_t m, bit req);
    int t;
    @(negedge clk);
    motors = m; replay_req = req; start = 1;
    @(negedge clk);
    start = 0;
    t = 0;
    while (!done && t < 100) begin @(negedge clk); t++; end
    checks++;
    if (!done) begin failures++; $display("sample never finished"); end
    model(m, req);
  endtask

  initial begin
    motor_pair_t m;
    repeat (3) @(posedge clk);
    rst = 0;
    m = '0;
    for (int i = 0; i < 400; i++) begin
      if ($urandom % 4 == 0) m = motor_pair_t'(8'($urandom % 5) * 8'h17);
      sample(m, ($urandom % 40) == 0);
    end
    m = 8'h77;
    for (int i = 0; i < 300; i++) sample(m, 0);
    sample(8'h11, 1);
    repeat (20) @(negedge clk);
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++;
      $display("pushed %0d records, expected %0d", got.size(), exp_q.size());
    end
    for (int i = 0; i < got.size() && i < exp_q.size(); i++) begin
      checks++;
      if (got[i] != exp_q[i]) begin failures++; $display("record %0d: %h expected %h", i, got[i], exp_q[i]); end
    end
    checks++;
    if (n_sat == 0 || n_flush == 0 || n_double == 0) begin
      failures++; $display("cases not reached: sat %0d flush %0d double %0d", n_sat, n_flush, n_double);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
