// tb_sample_divider: checks the sample pulse period and width.
// DIV is reduced to 10 so many periods fit a short run; every tick must be one
// cycle wide and exactly DIV cycles after the previous one.
module tb_sample_divider;
  localparam int DIV = 10;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;

  sample_divider #(.DIV(DIV)) dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n, cyc;
    last = 0; n = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (cyc = 1; cyc <= 20 * DIV; cyc++) begin
      @(posedge clk);
      #1;
      if (tick) begin
        n++;
        checks++;
        if (n > 1 && cyc - last != DIV) begin
          failures++;
          $display("tick spacing %0d, expected %0d", cyc - last, DIV);
        end
        last = cyc;
      end
    end
    checks++;
    if (n != 20) begin failures++; $display("ticks %0d, expected 20", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
