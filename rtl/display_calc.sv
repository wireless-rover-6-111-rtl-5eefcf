// display_calc: prepares received sensor data for the base station's display.
//
// The published station shows the rover's temperature on hex digits and its
// heading on eight LEDs placed at the compass points. On each `pkt_valid`
// pulse (a sensor packet that passed verification) this block registers:
//   temp_hex[1] / temp_hex[0]  high and low hex digit of the 8-bit temperature
//   compass                    one-hot, bit 0 = N, then clockwise NE, E, ... NW
// The heading scale (256 steps per turn, 0 = north, clockwise) and the rounding
// to the nearest of eight 45-degree sectors, sector = (heading + 16) >> 5, are
// this design's choices. Outputs hold between packets; after reset the digits
// read 00 and the N LED is lit. One clock latency.
module display_calc
  import rover_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         pkt_valid,
  input  sens_packet_t pkt,
  output logic [3:0]   temp_hex [2],
  output logic [7:0]   compass
);
  logic [7:0] rounded;
  assign rounded = pkt.heading + 8'd16;

  always_ff @(posedge clk) begin
    if (rst) begin
      temp_hex[0] <= '0;
      temp_hex[1] <= '0;
      compass     <= 8'b0000_0001;
    end else if (pkt_valid) begin
      temp_hex[0] <= pkt.temp[3:0];
      temp_hex[1] <= pkt.temp[7:4];
      compass     <= 8'b1 << rounded[7:5];
    end
  end
endmodule
