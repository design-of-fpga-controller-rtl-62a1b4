// pci_usb: bridge between the PCI core's local side (PCI clock, clk) and
// the USB controller, which runs from its own 60 MHz clock (clk_usb).
//
// A PCI write while this unit is granted places data bits [7:0] in the
// transmit byte (din) and marks it valid; the USB controller sends it in
// answer to the next IN token and reports din_taken once the host has
// acknowledged it, which clears the mark. A write while a byte is still
// waiting is refused with term, and so is the data phase that follows a
// write in a burst. A PCI read returns a status word:
//   [7:0]   last byte received from the host in an OUT transaction
//   [8]     a byte has been received since the last read (cleared when the
//           read ends)
//   [9]     the transmit byte is still waiting
//   [15:12] endpoint of the OUT transaction that delivered byte [7:0]
// Reads never wait (rd_ack is always high).
//
// Clock crossing: each direction uses a toggle handshake. A PCI write
// flips tx_req; the USB side sees the byte as valid while its synchronised
// copy of tx_req differs from tx_ack, and flips tx_ack on din_taken. din
// is written only while no byte is waiting, so it is stable whenever the
// USB side looks at it. A received byte is copied into holding registers
// in the USB clock domain and announced by flipping rx_tog; the PCI side
// copies the holding registers when it sees the synchronised flip. All
// crossings use two flip-flops.
//
// From the document: a PCI_USB block links the PCI core and the USB
// controller, and the USB side runs from a 60 MHz clock. The register
// layout, the flags and the handshake are this design's own.
module pci_usb (
  input  logic        clk,
  input  logic        clk_usb,
  input  logic        rst_n,
  // PCI core local side (clk)
  input  logic        gnt,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] dat_i,
  output logic [31:0] dat_o,
  output logic        rd_ack,
  output logic        term,
  // USB controller side (clk_usb)
  output logic [7:0]  din,
  output logic        din_valid,
  input  logic        din_taken,
  input  logic [7:0]  dout,
  input  logic        dout_valid,
  input  logic [3:0]  ep
);

  // ---------------- PCI clock domain ----------------
  logic       tx_req;            // flipped by each accepted write
  logic [1:0] tx_ack_s;          // tx_ack synchronised to clk
  logic [2:0] rx_tog_s;          // rx_tog synchronised to clk (+1 for edge)
  logic       tx_wait;           // a byte is waiting to be sent
  logic       rx_new;
  logic       rd_q;
  logic [7:0] rx_byte;
  logic [3:0] rx_ep;

  assign tx_wait = (tx_req != tx_ack_s[1]);
  assign rd_ack  = 1'b1;
  assign term    = (tx_wait || (gnt && wr)) && !rd;
  assign dat_o   = {16'b0, rx_ep, 2'b0, tx_wait, rx_new, rx_byte};

  // USB-domain registers read by the PCI side
  logic       tx_ack, rx_tog;
  logic [7:0] rx_hold;
  logic [3:0] ep_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din      <= '0;
      tx_req   <= 1'b0;
      tx_ack_s <= '0;
      rx_tog_s <= '0;
      rx_new   <= 1'b0;
      rd_q     <= 1'b0;
      rx_byte  <= '0;
      rx_ep    <= '0;
    end else begin
      tx_ack_s <= {tx_ack_s[0], tx_ack};
      rx_tog_s <= {rx_tog_s[1:0], rx_tog};
      rd_q     <= gnt && rd;
      if (gnt && wr && !tx_wait) begin
        din    <= dat_i[7:0];
        tx_req <= !tx_req;
      end
      if (rd_q && !(gnt && rd)) rx_new <= 1'b0;
      if (rx_tog_s[2] != rx_tog_s[1]) begin
        rx_byte <= rx_hold;
        rx_ep   <= ep_hold;
        rx_new  <= 1'b1;
      end
    end
  end

  // ---------------- USB clock domain ----------------
  logic [1:0] tx_req_s;          // tx_req synchronised to clk_usb

  assign din_valid = (tx_req_s[1] != tx_ack);

  always_ff @(posedge clk_usb or negedge rst_n) begin
    if (!rst_n) begin
      tx_req_s <= '0;
      tx_ack   <= 1'b0;
      rx_tog   <= 1'b0;
      rx_hold  <= '0;
      ep_hold  <= '0;
    end else begin
      tx_req_s <= {tx_req_s[0], tx_req};
      if (din_taken && din_valid) tx_ack <= !tx_ack;
      if (dout_valid) begin
        rx_hold <= dout;
        ep_hold <= ep;
        rx_tog  <= !rx_tog;
      end
    end
  end

endmodule
