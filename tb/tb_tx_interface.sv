// tb_tx_interface: uploads through tx_interface with the transceiver model.
// Random packets must arrive bit-exact, MSB first, one bit per sync pulse,
// and `done` must pulse once per upload. A packet change during an upload
// must not affect it (captured at the request). An upload with one sync pulse
// missing must be abandoned when the request falls (`aborted`), and the next
// upload must be correct again.
module tb_tx_interface;
  logic clk = 0, rst = 1;
  logic [39:0] packet = '0;
  logic request_tx, sync_in, data_out, busy, done, aborted;
  logic rx_received, data_in;
  int checks = 0, failures = 0, n_done = 0, n_abort = 0;

  tx_interface #(.WIDTH(40)) dut (.clk(clk), .rst(rst), .packet(packet), .request_tx(request_tx),
    .sync_in(sync_in), .data_out(data_out), .busy(busy), .done(done), .aborted(aborted));

  xcvr_model #(.HI(5), .LO(5)) mc (.clk(clk), .request_tx(request_tx), .sync_in(sync_in), .data_out(data_out),
    .rx_received(rx_received), .data_in(data_in), .sync_out(1'b0));

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (done) n_done++;
    if (aborted) n_abort++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] got, sent;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      sent = {8'($urandom), 32'($urandom)};
      packet = sent;
      fork
        mc.fetch(got);
        begin repeat (100) @(posedge clk); packet = ~sent; end
      join
      checks++;
      if (got != sent) begin failures++; $display("upload %h expected %h", got, sent); end
      checks++;
      if (n_done != i + 1) begin failures++; $display("done count %0d", n_done); end
    end
    // missed sync pulse: the FSM waits, then the falling request resets it
    sent = 40'h12_3456_789A;
    packet = sent;
    mc.fetch(got, 17);
    repeat (10) @(posedge clk);
    checks++;
    if (n_abort != 1 || busy) begin failures++; $display("abort not taken: aborts %0d busy %0d", n_abort, busy); end
    packet = 40'hA5_5A5A_A5A5;
    mc.fetch(got);
    checks++;
    if (got != 40'hA5_5A5A_A5A5) begin failures++; $display("after abort %h", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
