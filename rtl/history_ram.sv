// history_ram: byte-wide single-port RAM for the motor history stack.
//
// Writes happen on the clock edge when `we` is high. Reads are synchronous:
// `rdata` shows mem[addr] one clock after `addr` is presented (a write and a
// read of the same address in one cycle return the old byte). Contents are not
// reset. The depth, 8 KiB (ADDR_W = 13), is an assumption matching the 8Kx8
// static RAM of the lab kit the design ran on; the published design keeps this
// RAM outside the FPGA, here it is an on-chip array with the same interface role.
module history_ram #(
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
