// tb_display_calc: every heading value maps to the nearest of the 8 compass
// LEDs, the temperature splits into its two hex digits, and the outputs hold
// when no packet arrives.
module tb_display_calc;
  import rover_pkg::*;
  logic clk = 0, rst = 1, pkt_valid = 0;
  sens_packet_t pkt = '0;
  logic [3:0] temp_hex [2];
  logic [7:0] compass;
  int checks = 0, failures = 0;

  display_calc dut (.clk(clk), .rst(rst), .pkt_valid(pkt_valid), .pkt(pkt), .temp_hex(temp_hex), .compass(compass));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sector;
    real deg;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int h = 0; h < 256; h++) begin
      @(negedge clk);
      pkt = '{temp: 8'($urandom), heading: 8'(h), verify: SENS_VERIFY};
      pkt_valid = 1;
      @(negedge clk);
      pkt_valid = 0;
      deg = h * 360.0 / 256.0;
      sector = int'($floor((deg + 22.5) / 45.0)) % 8;
      checks++;
      if (compass != 8'(1 << sector)) begin failures++; $display("heading %0d: %b expected sector %0d", h, compass, sector); end
      checks++;
      if ({temp_hex[1], temp_hex[0]} != pkt.temp) begin failures++; $display("temp %h shown %h%h", pkt.temp, temp_hex[1], temp_hex[0]); end
    end
    @(negedge clk);
    pkt.heading = 8'd64; pkt.temp = 8'h00;
    repeat (3) @(negedge clk);
    checks++;
    if (compass != 8'b0000_0001) begin failures++; $display("display changed without a packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
