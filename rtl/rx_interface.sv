// rx_interface: downloads a received packet from the transceiver's receive
// buffer over a three-wire synchronous serial link, and verifies it.
//
// Here the FPGA is the master. When the transceiver pulses `rx_received`, the
// FSM makes 40 sync pulses on `sync_out`, each low for SYNC_HALF clocks and
// then high for SYNC_HALF clocks, and reads `data_in` at the end of each high
// half, MSB first. The transceiver changes its data bit after each pulse falls.
// The states are the published ones: Idle (counter cleared) -> Wait packet
// received -> Delay (low half) -> Send sync (high half) -> Update data (shift
// in a bit) -> Delay again while bits remain, Idle after the 40th bit. The
// half-period timer restarts on entry to every timed state, so every pulse has
// the same width.
//
// Verification: after the 40th bit the packet is accepted only if
// (packet & VERIFY_MASK) == VERIFY_VALUE. An accepted packet is latched on
// `packet` and `pkt_valid` pulses; otherwise `pkt_error` pulses and the
// previously latched packet is kept, so the system keeps its last good state.
// The default mask of 0 accepts every packet, so with the defaults `pkt_error`
// is constant low; each instance sets the mask and value of its packet type.
//
// Timing: a download takes about 40 * (2*SYNC_HALF + 1) clocks. SYNC_HALF = 92
// is 50 us at the assumed 1.8432 MHz clock; the published text gives 50
// microseconds for the low half and 50 milliseconds for the high half, and this
// design takes microseconds for both. `rx_received` is detected on its rising
// edge after a two-flop synchronizer; `data_in` is sampled through one as well.
module rx_interface #(
  parameter int unsigned      WIDTH        = 40,
  parameter int unsigned      SYNC_HALF    = 92,
  parameter logic [WIDTH-1:0] VERIFY_MASK  = '0,
  parameter logic [WIDTH-1:0] VERIFY_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rx_received,
  input  logic             data_in,
  output logic             sync_out,
  output logic [WIDTH-1:0] packet,
  output logic             pkt_valid,
  output logic             pkt_error,
  output logic             busy
);
  typedef enum logic [2:0] {IDLE, WAIT_RECEIVED, DELAY, SEND_SYNC, UPDATE_DATA} state_t;
  localparam int unsigned CW = $clog2(WIDTH);
  localparam int unsigned TW = $clog2(SYNC_HALF + 1);

  state_t           state;
  logic [WIDTH-1:0] shreg;
  logic [CW-1:0]    count;
  logic [TW-1:0]    timer;
  logic             rcv_s, rcv_d, data_s;
  logic [WIDTH-1:0] full_word;

  sync2 #(.WIDTH(2)) u_sync (.clk(clk), .rst(rst), .d({rx_received, data_in}), .q({rcv_s, data_s}));

  always_ff @(posedge clk) begin
    if (rst) rcv_d <= 1'b0;
    else     rcv_d <= rcv_s;
  end

  assign busy      = (state == DELAY) || (state == SEND_SYNC) || (state == UPDATE_DATA);
  assign full_word = {shreg[WIDTH-2:0], data_s};

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      shreg     <= '0;
      count     <= '0;
      timer     <= '0;
      sync_out  <= 1'b0;
      packet    <= '0;
      pkt_valid <= 1'b0;
      pkt_error <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      pkt_error <= 1'b0;
      unique case (state)
        IDLE: begin
          count    <= '0;
          sync_out <= 1'b0;
          state    <= WAIT_RECEIVED;
        end
        WAIT_RECEIVED: begin
          count <= '0;
          timer <= '0;
          if (rcv_s && !rcv_d) state <= DELAY;
        end
        DELAY: begin
          if (timer == TW'(SYNC_HALF - 1)) begin
            timer    <= '0;
            sync_out <= 1'b1;
            state    <= SEND_SYNC;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        SEND_SYNC: begin
          if (timer == TW'(SYNC_HALF - 1)) begin
            timer    <= '0;
            sync_out <= 1'b0;
            state    <= UPDATE_DATA;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        UPDATE_DATA: begin
          shreg <= full_word;
          if (count == CW'(WIDTH - 1)) begin
            if ((full_word & VERIFY_MASK) == VERIFY_VALUE) begin
              packet    <= full_word;
              pkt_valid <= 1'b1;
            end else begin
              pkt_error <= 1'b1;
            end
            state <= IDLE;
          end else begin
            count <= count + 1'b1;
            state <= DELAY;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
