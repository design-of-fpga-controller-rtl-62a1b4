// pci_spi: bridge between the PCI core's local side and one SPI master.
//
// A PCI write while this unit holds the bus grant starts an SPI transfer:
// the N low bits of the data word are the word to send, address bits
// [4:2] of the PCI transaction select one of the eight slaves and address
// bit 5 chooses a read (1) or a write (0). The bridge raises initiate and
// holds it until the master reports busy (busy_bar low). From the write
// strobe until the transfer is over, a further PCI write is refused with
// term (the PCI core then signals STOP#, so the host retries; in a burst
// this stops the next data phase), and a PCI read is held
// in wait states (rd_ack low) until the transfer is over; a read returns
// the last word received, zero-extended to 32 bits.
//
// From the document: a PCI_SPI block hands PCI data to the SPI masters and
// returns their data. The register layout (address bits, zero extension)
// and the term/wait behaviour are this design's choices.
module pci_spi #(
  parameter int unsigned N = 29
) (
  input  logic         clk,
  input  logic         rst_n,
  // PCI core local side
  input  logic         gnt,
  input  logic         wr,
  input  logic         rd,
  input  logic [31:0]  adr,
  input  logic [31:0]  dat_i,
  output logic [31:0]  dat_o,
  output logic         rd_ack,
  output logic         term,
  // SPI master request side
  output logic         initiate,
  output logic         rd_wrbar,
  output logic [2:0]   addr_slav,
  output logic [N-1:0] datain,
  input  logic [N-1:0] dataout,
  input  logic         busy_bar
);

  logic busy;
  assign busy   = initiate || !busy_bar;
  assign rd_ack = !busy;
  // a write that starts a transfer refuses the next data phase at once
  assign term   = (busy || (gnt && wr)) && !rd;
  assign dat_o  = 32'(dataout);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      initiate  <= 1'b0;
      rd_wrbar  <= 1'b0;
      addr_slav <= '0;
      datain    <= '0;
    end else begin
      if (initiate && !busy_bar) initiate <= 1'b0;
      if (gnt && wr && !busy) begin
        datain    <= dat_i[N-1:0];
        addr_slav <= adr[4:2];
        rd_wrbar  <= adr[5];
        initiate  <= 1'b1;
      end
    end
  end

endmodule
