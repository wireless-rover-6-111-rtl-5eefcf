// sync2: two-flop synchronizer for asynchronous inputs (pad ACK/DATA and the
// transceiver's request, sync, data and packet-received lines).
// Output follows the input two clocks later. RESET_VAL sets the value the
// flops hold in reset, chosen to match each line's idle level.
module sync2 #(
  parameter int unsigned WIDTH = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
