// pci_tdc: PCI to TDC interface for an acam TDC-GPX on its parallel bus
// (4-bit address ADR, 28-bit DATA, active-low CSN, WRN and RDN).
//
// Write: a PCI write while this unit is granted starts a TDC write cycle
// with ADR = data bits [3:0] and DATA = data bits [31:4]. Read: a PCI read
// while granted starts a TDC read cycle at ADR = bits [3:0] of the PCI
// address; the PCI core is held in wait states (rd_ack low) until the word
// has been read, and the word is returned zero-extended to 32 bits.
//
// Bus cycle, in clocks: ADR (and DATA for a write) valid with CSN low;
// then WRN or RDN low for STROBE clocks; read data is captured on the
// clock that ends the strobe; then WRN/RDN high; then CSN high and the
// cycle is over. From the write strobe until the cycle is over a further
// PCI write is refused (term).
//
// From the document: the pin set and widths, the order CSN, then WRN/RDN,
// then release of WRN/RDN and CSN, and the placement of address and data
// in the written word. This design's choices: the strobe length, the
// source of the read address and the wait/term behaviour.
module pci_tdc #(
  parameter int unsigned STROBE = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // PCI core local side
  input  logic        gnt,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] adr_pci,
  input  logic [31:0] dat_i,
  output logic [31:0] dat_o,
  output logic        rd_ack,
  output logic        term,
  // TDC-GPX bus
  output logic [3:0]  adr,
  output logic [27:0] data_o,
  output logic        data_oe,
  input  logic [27:0] data_i,
  output logic        csn,
  output logic        wrn,
  output logic        rdn
);

  typedef enum logic [2:0] {T_IDLE, T_CS, T_STROBE, T_RELEASE, T_DONE} tdc_state_e;

  localparam int unsigned SW = (STROBE > 1) ? $clog2(STROBE) : 1;

  tdc_state_e   state;
  logic         is_read;
  logic         rvalid;
  logic [27:0]  rdata;
  logic [SW-1:0] cnt;
  logic         busy;

  assign busy   = (state != T_IDLE);
  // a write that starts a TDC cycle refuses the next data phase at once
  assign term   = (busy || (gnt && wr)) && !rd;
  assign rd_ack = rvalid;
  assign dat_o  = {4'b0, rdata};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      is_read <= 1'b0;
      rvalid  <= 1'b0;
      rdata   <= '0;
      cnt     <= '0;
      adr     <= '0;
      data_o  <= '0;
      data_oe <= 1'b0;
      csn     <= 1'b1;
      wrn     <= 1'b1;
      rdn     <= 1'b1;
    end else begin
      if (!rd) rvalid <= 1'b0;
      unique case (state)
        T_IDLE: begin
          if (gnt && wr) begin
            adr     <= dat_i[3:0];
            data_o  <= dat_i[31:4];
            data_oe <= 1'b1;
            is_read <= 1'b0;
            csn     <= 1'b0;
            state   <= T_CS;
          end else if (gnt && rd && !rvalid) begin
            adr     <= adr_pci[3:0];
            is_read <= 1'b1;
            csn     <= 1'b0;
            state   <= T_CS;
          end
        end
        T_CS: begin
          if (is_read) rdn <= 1'b0;
          else         wrn <= 1'b0;
          cnt   <= '0;
          state <= T_STROBE;
        end
        T_STROBE: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == STROBE - 1) begin
            if (is_read) rdata <= data_i;
            wrn   <= 1'b1;
            rdn   <= 1'b1;
            state <= T_RELEASE;
          end
        end
        T_RELEASE: begin
          csn   <= 1'b1;
          state <= T_DONE;
        end
        T_DONE: begin
          data_oe <= 1'b0;
          if (is_read) rvalid <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_strobe_in_cs: assert property (@(posedge clk) disable iff (!rst_n)
                                   (!wrn || !rdn) |-> !csn);

endmodule
