// tb_rx_interface: downloads through rx_interface with the transceiver model.
// Valid packets (with the pattern in the masked bits) must be latched exactly
// and pulse pkt_valid; packets with a damaged pattern must pulse pkt_error and
// leave the latched packet unchanged. Each download must give exactly 40 sync
// pulses, each high for SYNC_HALF cycles and low for SYNC_HALF (plus the one-cycle shift), and take
// 40*(2*SYNC_HALF+1) cycles from the start of the first low half.
module tb_rx_interface;
  localparam int SH = 7;
  localparam logic [39:0] MASK  = 40'h00_0007_FFFF;
  localparam logic [39:0] VALUE = 40'h00_0002_A5A5;
  logic clk = 0, rst = 1;
  logic request_tx, sync_in, rx_received, data_in, sync_out;
  logic [39:0] packet;
  logic pkt_valid, pkt_error, busy;
  int checks = 0, failures = 0, n_valid = 0, n_err = 0;
  int hi_len = 0, lo_len = 0, bad_width = 0, busy_cycles = 0;

  rx_interface #(.WIDTH(40), .SYNC_HALF(SH), .VERIFY_MASK(MASK), .VERIFY_VALUE(VALUE)) dut (
    .clk(clk), .rst(rst), .rx_received(rx_received), .data_in(data_in), .sync_out(sync_out),
    .packet(packet), .pkt_valid(pkt_valid), .pkt_error(pkt_error), .busy(busy));

  xcvr_model mc (.clk(clk), .request_tx(request_tx), .sync_in(sync_in), .data_out(1'b0),
    .rx_received(rx_received), .data_in(data_in), .sync_out(sync_out));

  always #5 clk = ~clk;

  // pulse width monitor
  always @(posedge clk) if (!rst) begin
    if (pkt_valid) n_valid++;
    if (pkt_error) n_err++;
    if (busy) busy_cycles++;
    if (sync_out) begin
      hi_len++;
      if (lo_len != 0 && lo_len != SH && lo_len != SH + 1) bad_width++;
      lo_len = 0;
    end else begin
      if (hi_len != 0 && hi_len != SH) bad_width++;
      hi_len = 0;
      if (busy) lo_len++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] p, last_good;
    bit good;
    int k;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    last_good = '0;
    for (int i = 0; i < 24; i++) begin
      p = {8'($urandom), 32'($urandom)};
      good = (i % 3) != 2;
      p = (p & ~MASK) | VALUE;
      if (!good) begin k = $urandom % 19; p[k] = !p[k]; end
      busy_cycles = 0;
      mc.deliver(p);
      checks++;
      if (mc.pulses_seen != 40) begin failures++; $display("sync pulses %0d", mc.pulses_seen); end
      if (good) last_good = p;
      checks++;
      if (packet != last_good) begin failures++; $display("latched %h expected %h", packet, last_good); end
      checks++;
      if (busy_cycles != 40 * (2 * SH + 1)) begin failures++; $display("download took %0d cycles", busy_cycles); end
    end
    checks++;
    if (n_valid != 16 || n_err != 8) begin failures++; $display("valid %0d error %0d", n_valid, n_err); end
    checks++;
    if (bad_width != 0) begin failures++; $display("%0d sync half-periods of wrong width", bad_width); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
