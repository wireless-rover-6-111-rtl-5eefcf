// psx_pad_model: behavioural model of a PlayStation digital pad (testbench only).
//
// While ATT is low it answers each byte of a poll: 0xFF, its ID, 0x5A, then the
// two button bytes. It puts its bit on DATA at each falling edge of CLOCK (LSB
// first), reads COMMAND at each rising edge, records the command bytes, and
// after each of the first four bytes pulls ACK low for ACK_LOW time units,
// ACK_DELAY after the byte's last rising edge. Setting `ack_enable` to 0 makes
// it never acknowledge. DATA idles high (pull-up).
module psx_pad_model #(
  parameter int ACK_DELAY = 30,
  parameter int ACK_LOW   = 40
) (
  input  logic att_n,
  input  logic clk,
  input  logic cmd,
  output logic data,
  output logic ack_n
);
  logic [15:0] buttons    = 16'hFFFF;
  logic [7:0]  id         = 8'h41;
  logic        ack_enable = 1'b1;
  logic [7:0]  cmd_bytes [5];
  int          polls      = 0;
  int          acks       = 0;

  int         byte_i = 0;
  int         bit_i  = 0;
  logic [7:0] sh;

  function automatic logic [7:0] resp(int b);
    case (b)
      0: resp = 8'hFF;
      1: resp = id;
      2: resp = 8'h5A;
      3: resp = buttons[7:0];
      4: resp = buttons[15:8];
      default: resp = 8'hFF;
    endcase
  endfunction

  initial begin
    data  = 1'b1;
    ack_n = 1'b1;
    sh    = '0;
    foreach (cmd_bytes[i]) cmd_bytes[i] = '0;
  end

  always @(negedge att_n) begin
    byte_i = 0;
    bit_i  = 0;
    polls++;
  end

  always @(posedge att_n) data = 1'b1;

  always @(negedge clk) if (!att_n && byte_i < 5) data = resp(byte_i)[bit_i];

  always @(posedge clk) if (!att_n && byte_i < 5) begin
    sh[bit_i] = cmd;
    bit_i++;
    if (bit_i == 8) begin
      cmd_bytes[byte_i] = sh;
      bit_i = 0;
      byte_i++;
      if (byte_i < 5 && ack_enable) begin
        acks++;
        fork
          begin
            #(ACK_DELAY) ack_n = 1'b0;
            #(ACK_LOW)   ack_n = 1'b1;
          end
        join_none
      end
    end
  end
endmodule
