// xcvr_model: behavioural model of the FPGA-facing side of a radio transceiver's
// microcontroller (testbench only).
//
// fetch(): uploads a packet from the FPGA's tx_interface. It raises request_tx,
// holds it for the whole upload, gives one sync pulse per bit (HI cycles high,
// LO cycles low), reads data_out at the end of each high part, MSB first, and
// then drops request_tx. With skip_pulse >= 0 that pulse is left out, as a
// missed sync would be; the FPGA only sees 39 pulses.
//
// deliver(): hands a received packet to the FPGA's rx_interface. It puts the
// MSB on data_in, pulses rx_received, and moves to the next bit after each
// falling edge of sync_out. It returns after 40 pulses (or after a timeout,
// counting pulses in `pulses_seen`).
module xcvr_model #(
  parameter int HI = 6,
  parameter int LO = 6
) (
  input  logic clk,
  output logic request_tx,
  output logic sync_in,
  input  logic data_out,
  output logic rx_received,
  output logic data_in,
  input  logic sync_out
);
  int pulses_seen;

  initial begin
    request_tx  = 1'b0;
    sync_in     = 1'b0;
    rx_received = 1'b0;
    data_in     = 1'b0;
    pulses_seen = 0;
  end

  task automatic fetch(output logic [39:0] pkt, input int skip_pulse = -1);
    pkt = '0;
    @(posedge clk);
    request_tx <= 1'b1;
    repeat (LO) @(posedge clk);
    for (int i = 39; i >= 0; i--) begin
      if (39 - i != skip_pulse) sync_in <= 1'b1;
      repeat (HI) @(posedge clk);
      pkt[i] = data_out;
      sync_in <= 1'b0;
      repeat (LO) @(posedge clk);
    end
    request_tx <= 1'b0;
    repeat (LO) @(posedge clk);
  endtask

  task automatic deliver(input logic [39:0] pkt, input int max_cycles = 100000);
    int n;
    int t;
    n = 0;
    t = 0;
    @(posedge clk);
    data_in     <= pkt[39];
    rx_received <= 1'b1;
    repeat (4) @(posedge clk);
    rx_received <= 1'b0;
    while (n < 40 && t < max_cycles) begin
      @(posedge clk);
      t++;
      if (sync_out) begin
        while (sync_out && t < max_cycles) begin @(posedge clk); t++; end
        n++;
        if (n < 40) data_in <= pkt[39-n];
      end
    end
    pulses_seen = n;
    repeat (4) @(posedge clk);
  endtask
endmodule
