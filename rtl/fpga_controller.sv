// fpga_controller: FPGA main controller of a PC-based linear and
// mixed-signal test system.
//
// The system console (a PC) reaches the controller over a 32-bit PCI bus.
// The PCI core (pci_target) turns each I/O read or write into a transfer on
// a simple local side (wr strobe with write data, rd level with read data
// and a ready flag, term to refuse a transfer). A fairness-rotation arbiter
// (pci_arbiter) takes one request line per family-board unit and grants
// the bus to one unit at a time; the grant also selects which unit the
// PCI core's local side is connected to:
//   device 0  TDC     pci_tdc  -> TDC-GPX parallel bus (4-bit ADR, 28-bit DATA)
//   device 1  DDS     pci_dds  -> AD9851 parallel load (8-bit data, word clock, FQ_UD)
//   device 2  APMU    pci_spi + spi_master (29-bit words) -> AD5522 SPI
//   device 3  DPMU    pci_spi + spi_master (27-bit words) -> ADATE318 SPI
//   device 4  ADC     pci_adc  -> AD7870 parallel read (12 bits)
//   device 5  TST     test_ckt_if -> 32 relay-control bits of the test circuit
//   device 6  USB     pci_usb + usb_controller -> USB 1.1 full-speed link to the DSP
// A unit that is busy refuses PCI writes with term, which makes the PCI
// core signal STOP# (the host retries); a unit whose read data is not yet
// ready holds the read in wait states. With no grant the local side reads
// zero and ignores writes.
//
// The unit list, the bus, SPI word lengths, pin widths and protocols
// follow the document; the routing of transfers by arbiter grant, the
// register layouts of the bridges and the wait/term flow control are this
// design's choices (see each unit). All logic runs on the PCI clock (clk)
// except the USB controller, which runs on clk_usb (60 MHz, one bit per
// USB_DIV = 5 clocks, i.e. 12 Mb/s); pci_usb crosses between the two.
module fpga_controller
  import fpga_ctrl_pkg::*;
#(
  parameter int unsigned SPI_HALF   = 1,
  parameter int unsigned TDC_STROBE = 2,
  parameter int unsigned USB_DIV    = 5
) (
  input  logic        clk,
  input  logic        clk_usb,
  input  logic        rst_n,
  // PCI bus
  input  logic        frame_n,
  input  logic [31:0] ad_i,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  input  logic [3:0]  cbe_n,
  input  logic        irdy_n,
  output logic        trdy_n,
  output logic        devsel_n,
  output logic        stop_n,
  input  logic        par_i,
  output logic        par_o,
  output logic        par_oe,
  output logic        perr_n,
  input  logic [N_DEV-1:0] req_n,
  output logic [N_DEV-1:0] gnt_n,
  // TDC
  output logic [3:0]  tdc_adr,
  output logic [27:0] tdc_data_o,
  output logic        tdc_data_oe,
  input  logic [27:0] tdc_data_i,
  output logic        tdc_csn,
  output logic        tdc_wrn,
  output logic        tdc_rdn,
  // DDS
  output logic [7:0]  dds_data,
  output logic        dds_wd_clk,
  output logic        dds_fr_up,
  // APMU SPI
  output logic        apmu_sclk,
  output logic        apmu_mosi,
  output logic        apmu_mosi_oe,
  input  logic        apmu_miso,
  output logic [7:0]  apmu_cs_n,
  // DPMU SPI
  output logic        dpmu_sclk,
  output logic        dpmu_mosi,
  output logic        dpmu_mosi_oe,
  input  logic        dpmu_miso,
  output logic [7:0]  dpmu_cs_n,
  // ADC
  output logic        adc_convst,
  output logic        adc_cs,
  output logic        adc_rd,
  input  logic        adc_int,
  input  logic [11:0] adc_data,
  // test circuit parallel IO
  output logic [31:0] tst_ctrl_bits,
  output logic        tst_enable,
  // USB to the DSP board
  input  logic        usb_rxdp,
  input  logic        usb_rxdm,
  output logic        usb_txdp,
  output logic        usb_txdm,
  output logic        usb_tx_oe
);

  localparam int unsigned N_APMU = 29;
  localparam int unsigned N_DPMU = 27;

  // ---------------- PCI core and arbiter ----------------
  logic [31:0] l_adr, l_wdata, l_rdata;
  logic        l_rd, l_wr, l_rd_ack, l_term;
  pci_state_e  pci_state;
  logic [N_DEV-1:0] gnt;

  pci_target u_pci (
    .clk, .rst_n, .frame_n, .ad_i, .ad_o, .ad_oe, .cbe_n, .irdy_n, .trdy_n,
    .devsel_n, .stop_n, .par_i, .par_o, .par_oe, .perr_n,
    .adr(l_adr), .rd(l_rd), .wr(l_wr), .dat_o(l_wdata), .dat_i(l_rdata),
    .rd_ack(l_rd_ack), .term(l_term), .state_o(pci_state)
  );

  pci_arbiter #(.N(N_DEV)) u_arb (
    .clk, .rst_n, .req_n, .frame_n, .irdy_n, .gnt_n
  );
  assign gnt = ~gnt_n;

  // Per-unit local-side returns.
  logic [31:0] u_rdata [N_DEV];
  logic        u_ack   [N_DEV];
  logic        u_term  [N_DEV];

  always_comb begin
    l_rdata  = '0;
    l_rd_ack = 1'b1;
    l_term   = 1'b0;
    for (int i = 0; i < N_DEV; i++) begin
      if (gnt[i]) begin
        l_rdata  = u_rdata[i];
        l_rd_ack = u_ack[i];
        l_term   = u_term[i];
      end
    end
  end

  // ---------------- TDC ----------------
  pci_tdc #(.STROBE(TDC_STROBE)) u_tdc (
    .clk, .rst_n, .gnt(gnt[DEV_TDC]), .wr(l_wr), .rd(l_rd), .adr_pci(l_adr),
    .dat_i(l_wdata), .dat_o(u_rdata[DEV_TDC]), .rd_ack(u_ack[DEV_TDC]),
    .term(u_term[DEV_TDC]),
    .adr(tdc_adr), .data_o(tdc_data_o), .data_oe(tdc_data_oe), .data_i(tdc_data_i),
    .csn(tdc_csn), .wrn(tdc_wrn), .rdn(tdc_rdn)
  );

  // ---------------- DDS (write only) ----------------
  logic dds_busy;
  pci_dds u_dds (
    .clk, .rst_n, .gnt(gnt[DEV_DDS]), .wr(l_wr), .dat_i(l_wdata), .busy(dds_busy),
    .wd_clk(dds_wd_clk), .fr_up(dds_fr_up), .data(dds_data)
  );
  assign u_rdata[DEV_DDS] = '0;
  assign u_ack[DEV_DDS]   = 1'b1;
  assign u_term[DEV_DDS]  = dds_busy && !l_rd;

  // ---------------- APMU SPI ----------------
  logic              apmu_init, apmu_rdwr, apmu_busy_bar;
  logic [2:0]        apmu_addr;
  logic [N_APMU-1:0] apmu_din, apmu_dout;

  pci_spi #(.N(N_APMU)) u_apmu_br (
    .clk, .rst_n, .gnt(gnt[DEV_APMU]), .wr(l_wr), .rd(l_rd), .adr(l_adr),
    .dat_i(l_wdata), .dat_o(u_rdata[DEV_APMU]), .rd_ack(u_ack[DEV_APMU]),
    .term(u_term[DEV_APMU]),
    .initiate(apmu_init), .rd_wrbar(apmu_rdwr), .addr_slav(apmu_addr),
    .datain(apmu_din), .dataout(apmu_dout), .busy_bar(apmu_busy_bar)
  );

  spi_master #(.N(N_APMU), .HALF(SPI_HALF)) u_apmu_spi (
    .clk, .rst_n, .initiate(apmu_init), .rd_wrbar(apmu_rdwr), .addr_slav(apmu_addr),
    .datain(apmu_din), .dataout(apmu_dout), .busy_bar(apmu_busy_bar),
    .sclk(apmu_sclk), .mosi(apmu_mosi), .mosi_oe(apmu_mosi_oe), .miso(apmu_miso),
    .cs_n_bar(apmu_cs_n)
  );

  // ---------------- DPMU SPI ----------------
  logic              dpmu_init, dpmu_rdwr, dpmu_busy_bar;
  logic [2:0]        dpmu_addr;
  logic [N_DPMU-1:0] dpmu_din, dpmu_dout;

  pci_spi #(.N(N_DPMU)) u_dpmu_br (
    .clk, .rst_n, .gnt(gnt[DEV_DPMU]), .wr(l_wr), .rd(l_rd), .adr(l_adr),
    .dat_i(l_wdata), .dat_o(u_rdata[DEV_DPMU]), .rd_ack(u_ack[DEV_DPMU]),
    .term(u_term[DEV_DPMU]),
    .initiate(dpmu_init), .rd_wrbar(dpmu_rdwr), .addr_slav(dpmu_addr),
    .datain(dpmu_din), .dataout(dpmu_dout), .busy_bar(dpmu_busy_bar)
  );

  spi_master #(.N(N_DPMU), .HALF(SPI_HALF)) u_dpmu_spi (
    .clk, .rst_n, .initiate(dpmu_init), .rd_wrbar(dpmu_rdwr), .addr_slav(dpmu_addr),
    .datain(dpmu_din), .dataout(dpmu_dout), .busy_bar(dpmu_busy_bar),
    .sclk(dpmu_sclk), .mosi(dpmu_mosi), .mosi_oe(dpmu_mosi_oe), .miso(dpmu_miso),
    .cs_n_bar(dpmu_cs_n)
  );

  // ---------------- ADC ----------------
  pci_adc u_adc (
    .clk, .rst_n, .gnt(gnt[DEV_ADC]), .wr(l_wr), .rd(l_rd), .dat_i(l_wdata),
    .dat_o(u_rdata[DEV_ADC]), .rd_ack(u_ack[DEV_ADC]), .term(u_term[DEV_ADC]),
    .adc_convst, .adc_cs, .adc_rd, .adc_int, .adc_data
  );

  // ---------------- test circuit parallel IO ----------------
  test_ckt_if u_tst (
    .clk, .rst_n, .grant_tst_ckt(gnt[DEV_TST]), .wr(l_wr), .dat_i(l_wdata),
    .ctrl_bits_tst_ckt(tst_ctrl_bits), .enable(tst_enable)
  );
  assign u_rdata[DEV_TST] = tst_ctrl_bits;
  assign u_ack[DEV_TST]   = 1'b1;
  assign u_term[DEV_TST]  = 1'b0;

  // ---------------- USB ----------------
  logic [7:0] usb_din, usb_dout;
  logic       usb_din_valid, usb_din_taken, usb_dout_valid;
  logic [3:0] usb_ep;
  logic [6:0] usb_addr;
  logic [3:0] usb_state;

  pci_usb u_usb_br (
    .clk, .clk_usb, .rst_n, .gnt(gnt[DEV_USB]), .wr(l_wr), .rd(l_rd), .dat_i(l_wdata),
    .dat_o(u_rdata[DEV_USB]), .rd_ack(u_ack[DEV_USB]), .term(u_term[DEV_USB]),
    .din(usb_din), .din_valid(usb_din_valid), .din_taken(usb_din_taken),
    .dout(usb_dout), .dout_valid(usb_dout_valid), .ep(usb_ep)
  );

  usb_controller #(.DIV(USB_DIV)) u_usb (
    .clk(clk_usb), .rst_n, .rxdp(usb_rxdp), .rxdm(usb_rxdm), .txdp(usb_txdp), .txdm(usb_txdm),
    .tx_oe(usb_tx_oe), .dout(usb_dout), .dout_valid(usb_dout_valid), .ep(usb_ep),
    .addr(usb_addr), .din(usb_din), .din_valid(usb_din_valid),
    .din_taken(usb_din_taken), .state_o(usb_state)
  );

endmodule
