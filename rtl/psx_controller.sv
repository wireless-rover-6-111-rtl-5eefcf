// psx_controller: polls a PlayStation digital pad over its serial bus.
//
// The pad bus is a synchronous serial link with the FPGA as master: ATT (low
// for a whole transaction), CLOCK (idles high), COMMAND (FPGA -> pad), DATA
// (pad -> FPGA) and ACK (pad pulls it low after each byte it expects to
// follow). Bytes go LSB first; the sender changes its bit on the falling edge
// of CLOCK and the receiver reads it while CLOCK is high.
//
// One poll, on a `start` pulse, is five byte exchanges, one per state of the
// published controller FSM:
//   INIT_CONTROLLER     send 0x01 (pad answers 0xFF)
//   REQUEST_DATA        send 0x42 (pad answers its ID, 0x41 for digital)
//   GET_READY_FOR_DATA  send idle 0xFF (pad answers 0x5A, "data follows")
//   READ_BUTTONS1       read the first button byte
//   READ_BUTTONS2       read the second button byte, then raise ATT at once
// After each of the first four bytes the FSM waits for ACK low. If ACK does
// not come within ACK_TIMEOUT clocks the poll is abandoned (ATT raised), as the
// published design added a timeout so a missed ACK cannot hang the station.
//
// Outputs: `done` pulses at the end of every poll. `valid` tells whether that
// poll succeeded; only then is `buttons` (active low, {byte5, byte4}) updated.
// A poll fails on a timeout (`ack_timeout` pulses) or, as this design's own
// check, when the ID byte is not 0x41 or the ready byte is not 0x5A.
//
// Timing: each bit takes 2*HALF clocks (CLOCK low HALF, high HALF); a gap of
// HALF clocks follows ATT falling and each ACK. HALF = 4 gives about 230 kHz
// with the assumed 1.8432 MHz clock, near the pad's usual 250 kHz. DATA is
// sampled at the end of the high half through a two-flop synchronizer, i.e.
// two clocks before the next falling edge, so HALF must be at least 3.
module psx_controller
  import rover_pkg::*;
#(
  parameter int unsigned HALF        = 4,
  parameter int unsigned ACK_TIMEOUT = 184
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        done,
  output logic        valid,
  output logic        ack_timeout,
  output logic [15:0] buttons,
  // pad bus
  output logic        psx_att_n,
  output logic        psx_clk,
  output logic        psx_cmd,
  input  logic        psx_data,
  input  logic        psx_ack_n
);
  typedef enum logic [2:0] {
    WAIT, INIT_CONTROLLER, REQUEST_DATA, GET_READY_FOR_DATA, READ_BUTTONS1, READ_BUTTONS2
  } state_t;
  typedef enum logic [2:0] {PH_LEAD, PH_LOW, PH_HIGH, PH_ACK, PH_GAP} phase_t;

  localparam int unsigned TW = $clog2((ACK_TIMEOUT > HALF ? ACK_TIMEOUT : HALF) + 1);

  state_t        state;
  phase_t        phase;
  logic [TW-1:0] timer;
  logic [2:0]    bitn;
  logic [7:0]    rx;
  logic [7:0]    id_byte, ready_byte, btn_lo;
  logic          data_s, ack_s;

  sync2 #(.WIDTH(2), .RESET_VAL(2'b11)) u_sync (
    .clk(clk), .rst(rst), .d({psx_data, psx_ack_n}), .q({data_s, ack_s})
  );

  // command byte for the current exchange
  logic [7:0] tx;
  always_comb begin
    unique case (state)
      INIT_CONTROLLER: tx = PSX_CMD_START;
      REQUEST_DATA:    tx = PSX_CMD_POLL;
      default:         tx = PSX_CMD_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= WAIT;
      phase       <= PH_LEAD;
      timer       <= '0;
      bitn        <= '0;
      rx          <= '0;
      id_byte     <= '0;
      ready_byte  <= '0;
      btn_lo      <= '1;
      buttons     <= '1;
      valid       <= 1'b0;
      done        <= 1'b0;
      ack_timeout <= 1'b0;
      psx_att_n   <= 1'b1;
      psx_clk     <= 1'b1;
      psx_cmd     <= 1'b1;
    end else begin
      done        <= 1'b0;
      ack_timeout <= 1'b0;
      if (state == WAIT) begin
        psx_att_n <= 1'b1;
        psx_clk   <= 1'b1;
        psx_cmd   <= 1'b1;
        if (start) begin
          state     <= INIT_CONTROLLER;
          phase     <= PH_LEAD;
          timer     <= '0;
          bitn      <= '0;
          psx_att_n <= 1'b0;
        end
      end else begin
        timer <= timer + 1'b1;
        unique case (phase)
          PH_LEAD, PH_GAP: if (timer == TW'(HALF - 1)) begin
            // falling edge: present the first command bit
            phase   <= PH_LOW;
            timer   <= '0;
            psx_clk <= 1'b0;
            psx_cmd <= tx[0];
          end
          PH_LOW: if (timer == TW'(HALF - 1)) begin
            phase   <= PH_HIGH;
            timer   <= '0;
            psx_clk <= 1'b1;
          end
          PH_HIGH: if (timer == TW'(HALF - 1)) begin
            timer <= '0;
            rx    <= {data_s, rx[7:1]};
            if (bitn != 3'd7) begin
              bitn    <= bitn + 1'b1;
              phase   <= PH_LOW;
              psx_clk <= 1'b0;
              psx_cmd <= tx[bitn + 1'b1];
            end else begin
              bitn    <= '0;
              psx_cmd <= 1'b1;
              // store the completed byte
              unique case (state)
                REQUEST_DATA:       id_byte    <= {data_s, rx[7:1]};
                GET_READY_FOR_DATA: ready_byte <= {data_s, rx[7:1]};
                READ_BUTTONS1:      btn_lo     <= {data_s, rx[7:1]};
                default: ;
              endcase
              if (state == READ_BUTTONS2) begin
                // last byte: no ACK expected
                psx_att_n <= 1'b1;
                done      <= 1'b1;
                state     <= WAIT;
                if (id_byte == PSX_ID_DIGITAL && ready_byte == PSX_DATA_READY) begin
                  valid   <= 1'b1;
                  buttons <= {data_s, rx[7:1], btn_lo};
                end else begin
                  valid <= 1'b0;
                end
              end else begin
                phase <= PH_ACK;
              end
            end
          end
          PH_ACK: begin
            if (!ack_s) begin
              phase <= PH_GAP;
              timer <= '0;
              unique case (state)
                INIT_CONTROLLER:    state <= REQUEST_DATA;
                REQUEST_DATA:       state <= GET_READY_FOR_DATA;
                GET_READY_FOR_DATA: state <= READ_BUTTONS1;
                default:            state <= READ_BUTTONS2;
              endcase
            end else if (timer == TW'(ACK_TIMEOUT - 1)) begin
              psx_att_n   <= 1'b1;
              valid       <= 1'b0;
              done        <= 1'b1;
              ack_timeout <= 1'b1;
              state       <= WAIT;
            end
          end
          default: phase <= PH_LEAD;
        endcase
      end
    end
  end
endmodule
