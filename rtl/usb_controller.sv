// usb_controller: device-side USB 1.1 full-speed transaction engine that
// links the controller to the DSP board.
//
// Packets from the host arrive on rxdp/rxdm and the controller's packets
// leave on txdp/txdm (driven while tx_oe is high); both run at one bit per
// DIV clocks (12 Mb/s from a 60 MHz clock). The transaction state machine:
//   Wait for token  - a 24-bit packet whose PID is IN or OUT and whose PID
//                     check and CRC5 are good is accepted; any other packet
//                     (PID or CRC error) is discarded and the machine waits
//                     for the next token. The token's endpoint goes to ep.
//   Token decode    - OUT leads to Wait for host data, IN to Wait for
//                     device data.
//   Wait for host data - the next packet must be a DATA0/DATA1 packet with
//                     a good PID check, else back to Wait for token.
//   Data rxd        - CRC16 good: dout is loaded, dout_valid pulses and the
//                     controller answers ACK (Device ACK); CRC16 bad: it
//                     answers NAK (Device NACK).
//   Wait for device data - if a byte is waiting (din_valid), a data packet
//                     DATA0/DATA1 + din + CRC16 is sent (Data txd); if not,
//                     nothing is sent and the machine waits for a token.
//   Data txd        - after sending, the host's handshake decides: ACK
//                     (Host ACK) consumes the byte (din_taken pulses) and
//                     flips the DATA0/DATA1 toggle; NAK, any other packet or
//                     no answer within TIMEOUT bit times (Host NACK) keeps
//                     the byte for a retry.
// Packet type is told by the bit count between SYNC and EOP (8, 24, 32).
//
// From the document: the states and their branches, the SYNC/EOP framing,
// NRZI with stuffing, one data byte per packet, the CRC polynomials and
// the token layout. This design's choices: the device (not host) role,
// no device-address filtering, acceptance of DATA0 and DATA1 alike on
// reception, the no-data case of an IN token and the handshake timeout.
module usb_controller
  import usb_pkg::*;
#(
  parameter int unsigned DIV     = 5,
  parameter int unsigned TIMEOUT = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxdp,
  input  logic       rxdm,
  output logic       txdp,
  output logic       txdm,
  output logic       tx_oe,
  output logic [7:0] dout,
  output logic       dout_valid,
  output logic [3:0] ep,
  output logic [6:0] addr,
  input  logic [7:0] din,
  input  logic       din_valid,
  output logic       din_taken,
  output logic [3:0] state_o
);

  typedef enum logic [3:0] {
    U_WAIT_TOKEN, U_TOKEN_DECODE, U_WAIT_HOST_DATA, U_DATA_RXD,
    U_DEVICE_ACK, U_DEVICE_NACK, U_WAIT_DEVICE_DATA, U_DATA_TXD,
    U_HOST_ACK, U_HOST_NACK
  } usb_state_e;

  localparam int unsigned DW = $clog2(DIV);
  localparam int unsigned TW = $clog2(TIMEOUT * DIV + 1);

  usb_state_e  state;
  logic [DW-1:0] div_cnt;
  logic        bit_en;

  logic        pkt_done;
  logic [5:0]  pkt_len;
  logic [31:0] pkt_bits;
  logic        pkt_stuff_err;
  logic        unstuffing;

  logic        tx_start;
  logic [5:0]  tx_nbits;
  logic [31:0] tx_bits;
  logic        tx_busy;
  logic        tx_stuffing;

  logic        is_in;
  logic        toggle;     // DATA1 next when set
  logic        sent;       // data packet has left the transmitter
  logic [TW-1:0] wait_cnt;

  assign state_o = state;
  assign bit_en  = (int'(div_cnt) == DIV - 1);

  usb_nrzi_rx #(.DIV(DIV)) u_rx (
    .clk, .rst_n, .dp(rxdp), .dm(rxdm),
    .pkt_done, .pkt_len, .pkt_bits, .pkt_stuff_err, .unstuffing
  );

  usb_nrzi_tx u_tx (
    .clk, .rst_n, .bit_en, .start(tx_start), .nbits(tx_nbits), .bits(tx_bits),
    .busy(tx_busy), .dp(txdp), .dm(txdm), .oe(tx_oe), .stuffing(tx_stuffing)
  );

  // Checks on the received packet.
  logic [7:0]  rx_pid;
  logic        tok_ok, tok_crc_ok, data_pid_ok, ack_ok;
  assign rx_pid      = pkt_bits[7:0];
  assign tok_ok      = (pkt_len == 6'(LEN_TOKEN)) && !pkt_stuff_err && pid_ok(rx_pid) &&
                       (rx_pid[3:0] == PID_IN || rx_pid[3:0] == PID_OUT);
  assign tok_crc_ok  = (pkt_bits[23:19] == crc5_field(pkt_bits[18:8]));
  assign data_pid_ok = (pkt_len == 6'(LEN_DATA)) && !pkt_stuff_err && pid_ok(rx_pid) &&
                       (rx_pid[3:0] == PID_DATA0 || rx_pid[3:0] == PID_DATA1);
  assign ack_ok      = (pkt_len == 6'(LEN_HANDSHAKE)) && !pkt_stuff_err &&
                       (rx_pid == pid_byte(PID_ACK));

  logic [31:0] rx_hold;   // data packet kept for the CRC step

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= U_WAIT_TOKEN;
      div_cnt    <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      ep         <= '0;
      addr       <= '0;
      din_taken  <= 1'b0;
      tx_start   <= 1'b0;
      tx_nbits   <= '0;
      tx_bits    <= '0;
      is_in      <= 1'b0;
      toggle     <= 1'b0;
      sent       <= 1'b0;
      wait_cnt   <= '0;
      rx_hold    <= '0;
    end else begin
      div_cnt    <= bit_en ? '0 : div_cnt + 1'b1;
      dout_valid <= 1'b0;
      din_taken  <= 1'b0;
      tx_start   <= 1'b0;
      unique case (state)
        U_WAIT_TOKEN: if (pkt_done && tok_ok && tok_crc_ok) begin
          addr  <= pkt_bits[14:8];
          ep    <= pkt_bits[18:15];
          is_in <= (rx_pid[3:0] == PID_IN);
          state <= U_TOKEN_DECODE;
        end
        U_TOKEN_DECODE: state <= is_in ? U_WAIT_DEVICE_DATA : U_WAIT_HOST_DATA;
        U_WAIT_HOST_DATA: if (pkt_done) begin
          rx_hold <= pkt_bits;
          state   <= data_pid_ok ? U_DATA_RXD : U_WAIT_TOKEN;
        end
        U_DATA_RXD: begin
          if (rx_hold[31:16] == crc16_field(rx_hold[15:8])) begin
            dout       <= rx_hold[15:8];
            dout_valid <= 1'b1;
            state      <= U_DEVICE_ACK;
          end else state <= U_DEVICE_NACK;
        end
        U_DEVICE_ACK, U_DEVICE_NACK: begin
          if (!sent) begin
            tx_bits  <= 32'(pid_byte(state == U_DEVICE_ACK ? PID_ACK : PID_NAK));
            tx_nbits <= 6'(LEN_HANDSHAKE);
            tx_start <= 1'b1;
            sent     <= 1'b1;
          end else if (!tx_busy && !tx_start) begin
            sent  <= 1'b0;
            state <= U_WAIT_TOKEN;
          end
        end
        U_WAIT_DEVICE_DATA: begin
          if (din_valid) begin
            tx_bits  <= {crc16_field(din), din, pid_byte(toggle ? PID_DATA1 : PID_DATA0)};
            tx_nbits <= 6'(LEN_DATA);
            tx_start <= 1'b1;
            sent     <= 1'b0;
            wait_cnt <= '0;
            state    <= U_DATA_TXD;
          end else state <= U_WAIT_TOKEN;
        end
        U_DATA_TXD: begin
          if (!sent) begin
            if (!tx_busy && !tx_start) sent <= 1'b1;
          end else if (pkt_done) begin
            state <= ack_ok ? U_HOST_ACK : U_HOST_NACK;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
            if (int'(wait_cnt) == TIMEOUT * DIV) state <= U_HOST_NACK;
          end
        end
        U_HOST_ACK: begin
          din_taken <= 1'b1;
          toggle    <= !toggle;
          sent      <= 1'b0;
          state     <= U_WAIT_TOKEN;
        end
        U_HOST_NACK: begin
          sent  <= 1'b0;
          state <= U_WAIT_TOKEN;
        end
        default: state <= U_WAIT_TOKEN;
      endcase
    end
  end

endmodule
