// pwm: pulse-width modulator for a DC tread motor driven through an H-bridge.
//
// A counter runs from 0 to PERIOD-1; with PERIOD = 63 clocks the published
// motor PWM gives about 30 kHz. For a 4-bit `duty` d the output is high while
// the counter is at most 4*d, i.e. for 4*d+1 of the PERIOD clocks, never high
// for d = 0, and high all the time for d = 15 (4*15 would leave a short gap).
// These rules follow the published PWM. The output is registered, so it lags
// the counter by one clock; `duty` may change at any time and takes effect on
// the next clock.
module pwm #(
  parameter int unsigned PERIOD = 63
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] duty,
  output logic       out
);
  localparam int unsigned CW = (PERIOD > 64) ? $clog2(PERIOD) : 6;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      out <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      out <= (duty == 4'hF) || (duty != 4'h0 && cnt <= CW'({duty, 2'b00}));
    end
  end
endmodule
