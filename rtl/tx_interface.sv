// tx_interface: uploads a packet from the FPGA into the transceiver's transmit
// buffer over a three-wire synchronous serial link.
//
// The transceiver's microcontroller is the master. It raises `request_tx` and
// keeps it high for the whole upload, then sends one sync pulse per bit on
// `sync_in`. The FPGA answers on `data_out`, MSB first: a bit is put out before
// the first pulse and replaced after the falling edge of each pulse, so the
// master may read it anywhere in the high part of a pulse.
//
// The FSM is the published five-state one: Idle (bit counter cleared) ->
// Wait start (until the request rises) -> Update data (shift the packet left
// and drive its MSB) -> Wait sync high -> Wait sync low -> back to Update data
// while bits remain, to Idle after the 40th pulse. As in the published final
// version, a falling request in any state sends the FSM back to Idle, so a
// missed sync pulse cannot hang it; `aborted` pulses in that case and `done`
// pulses after a complete upload.
//
// The packet is captured when the request rises, so the upload is consistent
// even if `packet` changes meanwhile. All three inputs from the transceiver pass
// through two-flop synchronizers, so data changes 3-4 clocks after a sync pulse
// falls; a sync pulse must be high and low for at least 3 clocks each.
module tx_interface #(
  parameter int unsigned WIDTH = 40
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] packet,
  input  logic             request_tx,
  input  logic             sync_in,
  output logic             data_out,
  output logic             busy,
  output logic             done,
  output logic             aborted
);
  typedef enum logic [2:0] {IDLE, WAIT_START, UPDATE_DATA, WAIT_SYNC_HIGH, WAIT_SYNC_LOW} state_t;
  localparam int unsigned CW = $clog2(WIDTH);

  state_t           state;
  logic [WIDTH-1:0] shreg;
  logic [CW-1:0]    count;
  logic             req_s, req_d, sync_s;

  sync2 #(.WIDTH(2)) u_sync (.clk(clk), .rst(rst), .d({request_tx, sync_in}), .q({req_s, sync_s}));

  always_ff @(posedge clk) begin
    if (rst) req_d <= 1'b0;
    else     req_d <= req_s;
  end

  assign busy = (state == UPDATE_DATA) || (state == WAIT_SYNC_HIGH) || (state == WAIT_SYNC_LOW);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      shreg    <= '0;
      count    <= '0;
      data_out <= 1'b0;
      done     <= 1'b0;
      aborted  <= 1'b0;
    end else begin
      done    <= 1'b0;
      aborted <= 1'b0;
      if (busy && req_d && !req_s) begin
        // request dropped: give up the upload
        state   <= IDLE;
        aborted <= 1'b1;
      end else begin
        unique case (state)
          IDLE: begin
            count <= '0;
            state <= WAIT_START;
          end
          WAIT_START: if (req_s && !req_d) begin
            shreg <= packet;
            state <= UPDATE_DATA;
          end
          UPDATE_DATA: begin
            data_out <= shreg[WIDTH-1];
            shreg    <= shreg << 1;
            state    <= WAIT_SYNC_HIGH;
          end
          WAIT_SYNC_HIGH: if (sync_s) state <= WAIT_SYNC_LOW;
          WAIT_SYNC_LOW: if (!sync_s) begin
            if (count == CW'(WIDTH - 1)) begin
              done  <= 1'b1;
              state <= IDLE;
            end else begin
              count <= count + 1'b1;
              state <= UPDATE_DATA;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
