// tb_history_ram: writes a pattern to every address of a small RAM, reads it
// back with the one-cycle read latency, and checks read-during-write returns
// the old byte.
module tb_history_ram;
  localparam int AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  history_ram #(.ADDR_W(AW), .DATA_W(8)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1; addr = AW'(i); wdata = 8'(i * 37 + 5); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 2**AW - 1; i >= 0; i--) begin
      @(negedge clk); addr = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("addr %0d: %h vs %h", i, rdata, ref_mem[i]); end
    end
    // read during write: old data out, new data stored
    @(negedge clk); we = 1; addr = 3; wdata = 8'hA5;
    @(negedge clk); we = 0;
    checks++;
    if (rdata !== ref_mem[3]) begin failures++; $display("read-during-write returned %h", rdata); end
    @(negedge clk);
    checks++;
    if (rdata !== 8'hA5) begin failures++; $display("write not stored: %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
