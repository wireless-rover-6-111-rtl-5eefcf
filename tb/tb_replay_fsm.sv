// tb_replay_fsm: replay_fsm against a reference of reversed playback.
// The stack is modelled by the testbench with a queue preloaded with records.
// A replay is requested once; then samples are run until `active` falls. The
// speeds driven in each sample must be the newest remaining record, reversed,
// for exactly its duration, and the replay must end when the stack is empty.
// Samples with no request and no replay running must leave it idle.
module tb_replay_fsm;
  import rover_pkg::*;
  logic clk = 0, rst = 1;
  logic start = 0, replay_req = 0, done, active, pop, stack_done = 0, stack_empty;
  motor_pair_t motors, pop_motor = '0;
  logic [7:0] pop_dur = '0;
  int checks = 0, failures = 0;
  logic [15:0] stack [$];
  motor_pair_t expected [$];

  replay_fsm dut (.clk(clk), .rst(rst), .start(start), .replay_req(replay_req), .done(done),
    .active(active), .motors(motors), .pop(pop), .stack_done(stack_done), .stack_empty(stack_empty),
    .pop_motor(pop_motor), .pop_dur(pop_dur));

  assign stack_empty = (stack.size() == 0);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (pop) begin
    logic [15:0] e;
    e = stack.pop_back();
    fork
      begin
        repeat (2 + $urandom % 4) @(posedge clk);
        pop_motor <= e[15:8];
        pop_dur   <= e[7:0];
        stack_done <= 1;
        @(posedge clk);
        stack_done <= 0;
      end
    join_none
  end

  function automatic motor4_t rev(motor4_t m);
    rev = m;
    if (m.mag != 0) rev.dir = !m.dir;
  endfunction

  task automatic sample(bit req);
    int t;
    @(negedge clk);
    replay_req = req; start = 1;
    @(negedge clk);
    start = 0;
    t = 0;
    while (!done && t < 100) begin @(negedge clk); t++; end
    checks++;
    if (!done) begin failures++; $display("sample never finished"); end
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int round = 0; round < 3; round++) begin
      // idle samples do nothing
      sample(0);
      checks++;
      if (active) begin failures++; $display("active without request"); end
      // preload history; build the expected playback newest first
      stack.delete();
      expected.delete();
      for (int i = 0; i < 6 + round; i++) stack.push_back({8'($urandom), 8'(1 + $urandom % 5)});
      for (int i = stack.size() - 1; i >= 0; i--)
        for (int k = 0; k < stack[i][7:0]; k++)
          expected.push_back('{right: rev(stack[i][15:12]), left: rev(stack[i][11:8])});
      n = 0;
      sample(1);
      do begin
        checks++;
        if (!active) begin failures++; $display("replay stopped early at %0d", n); break; end
        if (n >= expected.size()) begin failures++; $display("replay too long"); break; end
        if (motors != expected[n]) begin
          failures++; $display("step %0d: %h expected %h", n, motors, expected[n]);
        end
        n++;
        sample(0);
      end while (active);
      checks++;
      if (n != expected.size()) begin failures++; $display("replayed %0d samples, expected %0d", n, expected.size()); end
      checks++;
      if (motors != '0) begin failures++; $display("speeds not stopped after replay"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
