// sample_divider: makes the base station's 20 Hz sample pulse.
//
// A counter runs from 0 to DIV-1 on the system clock and `tick` is high for the
// one cycle in which it wraps, so one tick arrives every DIV cycles. The first
// tick comes DIV cycles after reset. The 20 Hz rate is the specified sampling
// rate; DIV = CLK_HZ / SAMPLE_HZ, with CLK_HZ an assumed 1.8432 MHz crystal.
module sample_divider #(
  parameter int unsigned DIV = 92160
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
