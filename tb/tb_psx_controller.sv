// tb_psx_controller: psx_controller polling the behavioural pad model.
// Checks per poll: the five command bytes seen by the pad (0x01, 0x42, then
// idle 0xFF), the button word returned, ATT high again at the end, the poll
// duration (5 bytes of 16*HALF clocks plus gaps and ACK waits, within bounds),
// that the clock idles high; a pad that never ACKs must time out with the
// old buttons kept, and a pad with the wrong ID must give valid = 0.
module tb_psx_controller;
  localparam int HALF = 4;
  localparam int TO   = 60;
  logic clk = 0, rst = 1, start = 0;
  logic done, valid, ack_timeout;
  logic [15:0] buttons;
  logic att_n, pclk, pcmd, pdata, pack_n;
  int checks = 0, failures = 0, n_to = 0;

  psx_controller #(.HALF(HALF), .ACK_TIMEOUT(TO)) dut (
    .clk(clk), .rst(rst), .start(start), .done(done), .valid(valid), .ack_timeout(ack_timeout),
    .buttons(buttons), .psx_att_n(att_n), .psx_clk(pclk), .psx_cmd(pcmd), .psx_data(pdata), .psx_ack_n(pack_n));

  psx_pad_model #(.ACK_DELAY(30), .ACK_LOW(40)) pad (.att_n(att_n), .clk(pclk), .cmd(pcmd), .data(pdata), .ack_n(pack_n));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic poll(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 5000) begin @(negedge clk); cycles++; end
    check(done, "poll finished");
    @(negedge clk);
    check(att_n && pclk, "ATT and CLOCK idle high after poll");
  endtask

  initial begin
    int cyc;
    logic [15:0] b, prev;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    check(att_n && pclk, "idle lines after reset");
    for (int i = 0; i < 12; i++) begin
      b = 16'($urandom);
      pad.buttons = b;
      poll(cyc);
      check(valid, "valid poll");
      check(buttons == b, $sformatf("buttons %h expected %h", buttons, b));
      check(pad.cmd_bytes[0] == 8'h01 && pad.cmd_bytes[1] == 8'h42 && pad.cmd_bytes[2] == 8'hFF
            && pad.cmd_bytes[3] == 8'hFF && pad.cmd_bytes[4] == 8'hFF, "command bytes 01 42 FF FF FF");
      // 5 bytes * 8 bits * 2*HALF, lead and four gaps of HALF, ACK waits
      check(cyc >= 5*16*HALF + 5*HALF && cyc <= 5*16*HALF + 5*HALF + 4*TO + 10,
            $sformatf("poll took %0d cycles", cyc));
    end
    // wrong ID
    prev = buttons;
    pad.id = 8'h73;
    pad.buttons = 16'h1234;
    poll(cyc);
    check(!valid, "wrong ID rejected");
    check(buttons == prev, "buttons kept after bad ID");
    pad.id = 8'h41;
    // no ACK: timeout after the first byte
    pad.ack_enable = 0;
    fork
      begin : watch_to
        forever begin @(posedge clk); if (ack_timeout) n_to++; end
      end
    join_none
    poll(cyc);
    check(!valid, "timeout gives invalid");
    check(buttons == prev, "buttons kept after timeout");
    check(cyc <= 16*HALF + HALF + TO + 6, $sformatf("timeout poll took %0d", cyc));
    check(n_to == 1, $sformatf("ack_timeout pulses %0d", n_to));
    pad.ack_enable = 1;
    pad.buttons = 16'hBEEF;
    poll(cyc);
    check(valid && buttons == 16'hBEEF, "recovers after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
