// tb_stack_fsm: stack_fsm with a small history_ram against a queue model.
// Random pushes and pops, then fills the stack to check the full/overflow
// rule and empties it to check underflow. Each operation must end 5 cycles
// after the request, and `top` must equal twice the model's depth.
module tb_stack_fsm;
  import rover_pkg::*;
  localparam int AW = 4;   // 16 bytes = 8 records
  logic clk = 0, rst = 1;
  logic push = 0, pop = 0;
  motor_pair_t push_motor = '0, pop_motor;
  logic [7:0] push_dur = '0, pop_dur;
  logic done, busy, empty, full, overflow, underflow;
  logic [AW:0] top;
  logic ram_we;
  logic [AW-1:0] ram_addr;
  logic [7:0] ram_wdata, ram_rdata;
  int checks = 0, failures = 0, n_over = 0, n_under = 0;
  logic [15:0] model [$];

  stack_fsm #(.ADDR_W(AW)) dut (
    .clk(clk), .rst(rst), .push(push), .pop(pop), .push_motor(push_motor), .push_dur(push_dur),
    .done(done), .busy(busy), .pop_motor(pop_motor), .pop_dur(pop_dur), .empty(empty), .full(full),
    .overflow(overflow), .underflow(underflow), .top(top),
    .ram_we(ram_we), .ram_addr(ram_addr), .ram_wdata(ram_wdata), .ram_rdata(ram_rdata));
  history_ram #(.ADDR_W(AW)) ram (.clk(clk), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic op(bit is_push, logic [7:0] m, logic [7:0] d);
    int lat;
    logic saw_over, saw_under;
    @(negedge clk);
    push = is_push; pop = !is_push; push_motor = m; push_dur = d;
    @(negedge clk);
    push = 0; pop = 0;
    lat = 1; saw_over = overflow; saw_under = underflow;
    while (!done && lat < 50) begin @(negedge clk); lat++; saw_over |= overflow; saw_under |= underflow; end
    if (is_push) begin
      if (model.size() < 2**AW / 2) begin
        check(lat == 5, $sformatf("push latency %0d", lat));
        model.push_back({m, d});
        check(!saw_over, "unexpected overflow");
      end else begin
        check(saw_over, "overflow not flagged");
        n_over++;
      end
    end else begin
      if (model.size() > 0) begin
        logic [15:0] e;
        e = model.pop_back();
        check(lat == 5, $sformatf("pop latency %0d", lat));
        check({pop_motor, pop_dur} == e, $sformatf("pop got %h/%h expected %h", pop_motor, pop_dur, e));
      end else begin
        check(saw_under, "underflow not flagged");
        n_under++;
      end
    end
    check(top == (AW+1)'(2 * model.size()), $sformatf("top %0d model %0d", top, model.size()));
    check(empty == (model.size() == 0), "empty flag");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++)
      op(($urandom % 100) < 55, 8'($urandom), 8'($urandom));
    while (model.size() < 2**AW / 2) op(1, 8'($urandom), 8'($urandom));
    check(full, "full flag");
    op(1, 8'h12, 8'h34);
    while (model.size() > 0) op(0, 0, 0);
    op(0, 0, 0);
    check(n_over > 0 && n_under > 0, "overflow and underflow both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
