// tb_pwm: for every duty value, the output over several whole periods must be
// high for exactly min(4*d+1, PERIOD) clocks per PERIOD (0 for d = 0, always
// for d = 15), in one contiguous pulse starting at the period start.
module tb_pwm;
  localparam int PERIOD = 63;
  logic clk = 0, rst = 1, out;
  logic [3:0] duty = 0;
  int checks = 0, failures = 0;

  pwm #(.PERIOD(PERIOD)) dut (.clk(clk), .rst(rst), .duty(duty), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int high, edges, expected;
    logic prev;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int d = 0; d < 16; d++) begin
      @(negedge clk); duty = 4'(d);
      // let one period pass with the new duty
      repeat (2 * PERIOD) @(negedge clk);
      high = 0; edges = 0; prev = out;
      repeat (4 * PERIOD) begin
        @(negedge clk);
        if (out) high++;
        if (out && !prev) edges++;
        prev = out;
      end
      expected = (d == 15) ? PERIOD : (d == 0 ? 0 : 4 * d + 1);
      checks++;
      if (high != 4 * expected) begin failures++; $display("duty %0d: high %0d of %0d, expected %0d", d, high, 4*PERIOD, 4*expected); end
      checks++;
      if (d != 0 && d != 15 && edges != 4) begin failures++; $display("duty %0d: %0d pulses in 4 periods", d, edges); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
