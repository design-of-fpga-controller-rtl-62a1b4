// tb_fpga_controller: end-to-end test of the whole controller at its
// default parameters.
//
// A behavioural PCI initiator (the system console) requests the bus on
// behalf of a unit, waits for that unit's grant and runs I/O reads and
// writes; when the target stops a write it gets the bus again and resumes
// with the data phase that was refused. Behavioural models stand
// for the family-board parts: a TDC-GPX register file, an AD9851 input
// register, an AD5522 and an ADATE318 SPI slave, an AD7870 ADC, the relay
// bits of the test circuit and a USB host for the DSP link.
//
// Scenario: test-circuit relay bits; a DDS frequency word; TDC write and
// read-back; ADC conversion and read; APMU SPI write to slave 5; DPMU SPI
// read from slave 7 with a write retried while the transfer runs; an APMU
// two-word burst whose second word is stopped and resumed; a USB
// OUT byte from the host read over PCI and a USB IN byte written over PCI
// and delivered to the host; a byte-enabled write; a write with bad
// parity; back-to-back burst reads and writes (one word per clock); and
// three units requesting at once to show the rotation. Every mechanism is
// counted and must have occurred at least once. The USB side runs from its
// own 60 MHz clock.
module tb_fpga_controller;
  import fpga_ctrl_pkg::*;

  logic clk = 0, clk_usb = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #15 clk = !clk;            // 33 MHz PCI clock
  always #8.333 clk_usb = !clk_usb; // 60 MHz USB clock

  // PCI
  logic        frame_n = 1, irdy_n = 1, par_i = 0;
  logic [31:0] ad_i = '0, ad_o;
  logic [3:0]  cbe_n = '1;
  logic        ad_oe, trdy_n, devsel_n, stop_n, par_o, par_oe, perr_n;
  logic [6:0]  req_n = '1, gnt_n;
  // units
  logic [3:0]  tdc_adr;
  logic [27:0] tdc_data_o, tdc_data_i;
  logic        tdc_data_oe, tdc_csn, tdc_wrn, tdc_rdn;
  logic [7:0]  dds_data;
  logic        dds_wd_clk, dds_fr_up;
  logic        apmu_sclk, apmu_mosi, apmu_mosi_oe, apmu_miso;
  logic [7:0]  apmu_cs_n;
  logic        dpmu_sclk, dpmu_mosi, dpmu_mosi_oe, dpmu_miso;
  logic [7:0]  dpmu_cs_n;
  logic        adc_convst, adc_cs, adc_rd, adc_int;
  logic [11:0] adc_data;
  logic [31:0] tst_ctrl_bits;
  logic        tst_enable;
  logic        usb_rxdp, usb_rxdm, usb_txdp, usb_txdm, usb_tx_oe;

  fpga_controller dut (.*);

  // ---------------- family-board models ----------------
  // TDC
  logic [27:0] tdc_regs [16];
  initial for (int i = 0; i < 16; i++) tdc_regs[i] = 28'(i * 32'h0011_1111);
  assign tdc_data_i = (!tdc_rdn && !tdc_csn) ? tdc_regs[tdc_adr] : 28'h0;
  always @(posedge tdc_wrn) if (rst_n && !tdc_csn) tdc_regs[tdc_adr] = tdc_data_o;
  // DDS
  logic [7:0]  dds_bytes[$];
  logic [39:0] dds_reg = '0;
  int          n_fr_up = 0;
  always @(posedge dds_wd_clk) if (rst_n) dds_bytes.push_back(dds_data);
  always @(posedge dds_fr_up) if (rst_n && dds_bytes.size() >= 5) begin
    dds_reg = {dds_bytes[0], dds_bytes[1], dds_bytes[2], dds_bytes[3], dds_bytes[4]};
    dds_bytes.delete();
    n_fr_up++;
  end
  // SPI slaves: APMU slave 5, DPMU slave 7
  logic [28:0] apmu_rx;  logic [26:0] dpmu_rx;
  logic [28:0] apmu_tx = '0; logic [26:0] dpmu_tx = 27'h5c3_a1f0;
  int apmu_bits, apmu_done, dpmu_bits, dpmu_done;
  spi_slave_model #(.N(29)) m_apmu (.sclk(apmu_sclk), .cs_n(apmu_cs_n[5]), .mosi(apmu_mosi),
    .miso(apmu_miso), .tx_word(apmu_tx), .rx_word(apmu_rx), .nbits(apmu_bits), .done(apmu_done));
  spi_slave_model #(.N(27)) m_dpmu (.sclk(dpmu_sclk), .cs_n(dpmu_cs_n[7]), .mosi(dpmu_mosi),
    .miso(dpmu_miso), .tx_word(dpmu_tx), .rx_word(dpmu_rx), .nbits(dpmu_bits), .done(dpmu_done));
  // ADC
  logic [11:0] adc_result = 12'hace;
  int          adc_t = -1, n_conv = 0;
  logic        cv_q = 1;
  initial adc_int = 1;
  assign adc_data = (!adc_cs && !adc_rd) ? adc_result : 12'h0;
  always @(posedge clk) if (rst_n) begin
    cv_q <= adc_convst;
    if (adc_convst && !cv_q) begin adc_t = 0; n_conv++; end
    else if (adc_t >= 0) begin adc_t++; if (adc_t == 10) begin adc_int = 0; adc_t = -1; end end
    if (!adc_cs && !adc_rd) adc_int = 1;
  end
  // USB host (12 Mb/s: one bit per 5 clocks of 60 MHz)
  usb_host_model #(.DIV(5)) host (.clk(clk_usb), .dp(usb_rxdp), .dm(usb_rxdm), .rx_dp(usb_txdp), .rx_dm(usb_txdm));

  // ---------------- mechanism counters ----------------
  int n_wr_phase = 0, n_rd_phase = 0, n_burst = 0, n_turn = 0, n_wait = 0, n_stop = 0,
      n_perr = 0, n_masked = 0, n_rot = 0, n_usb_ack = 0, n_usb_in = 0,
      n_wr_b2b = 0, n_rd_b2b = 0, n_resume = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_pci.state == PCI_WR_DTA) n_wr_phase++;
    if (dut.u_pci.state == PCI_RD_DTA) n_rd_phase++;
    if (dut.u_pci.state == PCI_TURN_AR) n_turn++;
    if (dut.u_pci.state == PCI_READ && trdy_n) n_wait++;
    if (dut.u_pci.state == PCI_STOP) n_stop++;
    if (dut.u_pci.state == PCI_WR_DTA && !dut.u_pci.last) n_burst++;
    if (!perr_n) n_perr++;
    // a data phase completing in the clock right after another one
    if (dut.u_pci.state == PCI_WR_DTA && !irdy_n && !trdy_n) n_wr_b2b++;
    if (dut.u_pci.state == PCI_RD_DTA && !irdy_n && !trdy_n) n_rd_b2b++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- PCI initiator ----------------
  task automatic get_bus(input int dev);
    int t = 0;
    req_n[dev] = 0;
    while (gnt_n[dev] && t < 200) begin @(posedge clk); #1; t++; end
    check(!gnt_n[dev], $sformatf("grant for device %0d", dev));
  endtask

  task automatic drop_bus(input int dev);
    req_n[dev] = 1;
    @(posedge clk); #1;
  endtask

  // burst I/O write; retries the whole transaction when stopped
  task automatic pci_write(input logic [31:0] a, input logic [31:0] d[], input logic [3:0] be[]);
    bit stopped;
    int tries = 0, first = 0;
    do begin
      stopped = 0;
      if (tries > 0) begin
        // a stopped master gives up the bus and must win it again
        int dev = -1;
        for (int k = 0; k < 7; k++) if (!gnt_n[k]) dev = k;
        if (dev >= 0) begin
          req_n[dev] = 1; @(posedge clk); #1;
          get_bus(dev);
        end
        if (first > 0) n_resume++;
      end
      @(posedge clk); #1;
      frame_n = 0; ad_i = a; cbe_n = CMD_IO_WRITE;
      for (int i = first; i < d.size(); i++) begin
        @(posedge clk); #1;
        par_i = ^{ad_i, cbe_n};
        ad_i = d[i]; cbe_n = be[i]; irdy_n = 0;
        if (i == d.size() - 1) frame_n = 1;
        forever begin
          @(negedge clk);
          if (!trdy_n || !stop_n) break;
        end
        if (!stop_n) begin stopped = 1; first = i; break; end
      end
      @(posedge clk); #1;
      par_i = ^{ad_i, cbe_n};
      frame_n = 1; irdy_n = 1; cbe_n = '1; ad_i = '0;
      @(posedge clk); #1;
      while (!stop_n) begin @(posedge clk); #1; end
      tries++;
      if (stopped) repeat (20) @(posedge clk);
    end while (stopped && tries < 200);
    check(!stopped, "write completed");
  endtask

  task automatic pci_write1(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] dd[] = '{d};
    logic [3:0]  bb[] = '{4'b0000};
    pci_write(a, dd, bb);
  endtask

  task automatic pci_read(input logic [31:0] a, output logic [31:0] v);
    int t = 0;
    @(posedge clk); #1;
    frame_n = 0; ad_i = a; cbe_n = CMD_IO_READ;
    @(posedge clk); #1;
    cbe_n = 4'b0000; irdy_n = 0; frame_n = 1; ad_i = '0;
    forever begin
      @(negedge clk);
      if (!trdy_n || t > 500) break;
      t++;
    end
    v = ad_o;
    check(ad_oe, "target drives AD");
    @(posedge clk); #1;
    irdy_n = 1; cbe_n = '1;
    repeat (2) @(posedge clk); #1;
  endtask

  // burst I/O read of n words, one word per clock when the unit is ready
  task automatic pci_read_burst(input logic [31:0] a, input int n, output logic [31:0] v[]);
    int t = 0;
    v = new[n];
    @(posedge clk); #1;
    frame_n = 0; ad_i = a; cbe_n = CMD_IO_READ;
    @(posedge clk); #1;
    cbe_n = 4'b0000; irdy_n = 0; ad_i = '0;
    for (int i = 0; i < n; i++) begin
      if (i == n - 1) frame_n = 1;
      forever begin
        @(negedge clk);
        if (!trdy_n || t > 500) break;
        t++;
      end
      v[i] = ad_o;
      @(posedge clk); #1;
    end
    irdy_n = 1; cbe_n = '1;
    repeat (2) @(posedge clk); #1;
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [31:0] v;
    logic [31:0] d[];
    logic [3:0]  be[];
    logic [31:0] b; int n;
    int order[$];

    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk); #1;

    // test circuit relays: burst of two words, the last one stays
    get_bus(DEV_TST);
    d = '{32'h8798_acfd, 32'hab6d_f89e}; be = '{4'b0000, 4'b0000};
    pci_write(32'h0, d, be);
    check(tst_ctrl_bits == 32'hab6d_f89e && tst_enable, "test circuit bits");
    // byte-enabled write: only byte 0
    d = '{32'h38ad_9ef8}; be = '{4'b1110};
    pci_write(32'h0, d, be);
    check(tst_ctrl_bits == 32'h0000_00f8, $sformatf("byte-enable write %h", tst_ctrl_bits));
    if (tst_ctrl_bits == 32'h0000_00f8) n_masked++;
    pci_read(32'h0, v);
    check(v == 32'h0000_00f8, "test circuit read back");
    pci_read_burst(32'h0, 3, d);
    check(d[0] == 32'hf8 && d[1] == 32'hf8 && d[2] == 32'hf8, "test circuit burst read");
    check(n_rd_b2b >= 2, $sformatf("back-to-back read phases %0d", n_rd_b2b));
    // bad parity on a write
    @(posedge clk); #1;
    frame_n = 0; ad_i = 32'h0; cbe_n = CMD_IO_WRITE;
    @(posedge clk); #1;
    ad_i = 32'h1; cbe_n = 4'b0000; irdy_n = 0; frame_n = 1;
    forever begin @(negedge clk); if (!trdy_n) break; end
    @(posedge clk); #1;
    par_i = !(^{ad_i, cbe_n}); irdy_n = 1; ad_i = '0; cbe_n = '1;
    repeat (3) @(posedge clk); #1;
    check(n_perr == 1, "PERR# on bad parity");
    drop_bus(DEV_TST);

    // DDS: 40-bit word in two writes
    get_bus(DEV_DDS);
    pci_write1(32'h0, 32'habcd_1234);
    pci_write1(32'h0, 32'h0000_0042);
    repeat (20) @(posedge clk);
    check(n_fr_up == 1 && dds_reg == 40'hab_cd12_3442, $sformatf("DDS word %h", dds_reg));
    drop_bus(DEV_DDS);

    // TDC write reg 4, read reg e and reg 4
    get_bus(DEV_TDC);
    pci_write1(32'h0, 32'habcd_1234);
    repeat (8) @(posedge clk);
    check(tdc_regs[4] == 28'habcd123, "TDC register 4 written");
    tdc_regs[14] = 28'h1234567;
    pci_read(32'h0000_000e, v);
    check(v == 32'h0123_4567, $sformatf("TDC read e: %h", v));
    pci_read(32'h0000_0004, v);
    check(v == 32'h0abc_d123, $sformatf("TDC read 4: %h", v));
    drop_bus(DEV_TDC);

    // ADC conversion and read
    get_bus(DEV_ADC);
    pci_write1(32'h0, 32'h1);
    pci_read(32'h0, v);
    check(v == 32'h0000_0ace && n_conv == 1, $sformatf("ADC result %h", v));
    drop_bus(DEV_ADC);

    // APMU: write to slave 5 (address bits [4:2] = 5, bit 5 = 0)
    get_bus(DEV_APMU);
    pci_write1(32'h0000_0014, 32'h1932_649f);
    repeat (80) @(posedge clk);
    check(apmu_rx == 29'h1932_649f && apmu_bits == 29, $sformatf("APMU received %h", apmu_rx));
    // two-word burst: the second data phase is stopped (the SPI master is
    // busy with the first word) and resumed after the bus is won again
    begin
      int s0, r0, d0;
      logic [28:0] first_rx;
      s0 = n_stop; r0 = n_resume; d0 = apmu_done;
      d = '{32'h0aaa_5555, 32'h1555_aaaa}; be = '{4'b0000, 4'b0000};
      fork
        pci_write(32'h0000_0014, d, be);
        begin wait (apmu_done == d0 + 1); first_rx = apmu_rx; end
      join
      repeat (80) @(posedge clk);
      check(n_stop > s0 && n_resume > r0, "burst stopped and resumed");
      check(first_rx == 29'h0aaa_5555 && apmu_rx == 29'h1555_aaaa && apmu_done == d0 + 2,
            $sformatf("APMU burst words %h %h (%0d)", first_rx, apmu_rx, apmu_done - d0));
    end
    drop_bus(DEV_APMU);

    // DPMU: read from slave 7 (bits [4:2] = 7, bit 5 = 1), then a write
    // while the read runs (stopped and retried), then read the result
    get_bus(DEV_DPMU);
    pci_write1(32'h0000_003c, 32'h0);
    pci_write1(32'h0000_001c, 32'h0555_1234);
    check(n_stop > 0, "write to a busy SPI unit was stopped");
    repeat (80) @(posedge clk);
    check(dpmu_rx == 27'(32'h0555_1234), $sformatf("DPMU write after retry %h", dpmu_rx));
    pci_write1(32'h0000_003c, 32'h0);
    pci_read(32'h0, v);
    check(v == {5'b0, dpmu_tx}, $sformatf("DPMU read %h", v));
    drop_bus(DEV_DPMU);

    // USB OUT from the host: byte a5 to endpoint 1, then read over PCI
    host.send_packet(host.token(4'b0001, 7'h03, 4'h1), 24);
    host.send_packet(host.data_pkt(4'b0011, 8'ha5), 32);
    host.receive_packet(b, n, 500);
    check(n == 8 && b[7:0] == 8'hd2, "device ACK for OUT");
    if (n == 8 && b[7:0] == 8'hd2) n_usb_ack++;
    get_bus(DEV_USB);
    pci_read(32'h0, v);
    check(v[7:0] == 8'ha5 && v[8] && v[15:12] == 4'h1, $sformatf("USB status %h", v));
    // USB IN: byte 98 written over PCI, fetched by the host
    pci_write1(32'h0, 32'h98);
    drop_bus(DEV_USB);
    host.send_packet(host.token(4'b1001, 7'h03, 4'h1), 24);
    host.receive_packet(b, n, 500);
    check(n == 32 && b == host.data_pkt(4'b0011, 8'h98), $sformatf("USB IN data %h", b));
    host.send_packet({24'b0, 8'hd2}, 8);
    repeat (30) @(posedge clk);
    check(!dut.usb_din_valid, "IN byte consumed");
    if (!dut.usb_din_valid) n_usb_in++;

    // rotation: TDC, ADC and test circuit request together (even data:
    // the ADC starts no conversion, so no unit refuses a write)
    req_n = 7'b1001110;
    for (int k = 0; k < 6; k++) begin
      automatic int who = -1;
      while (gnt_n == '1) begin @(posedge clk); #1; end
      for (int i = 0; i < 7; i++) if (!gnt_n[i]) who = i;
      order.push_back(who);
      pci_write1(32'h0, 32'(k) << 1);
    end
    req_n = '1;
    check(order.size() == 6 && order[0] == 0 && order[1] == 4 && order[2] == 5 &&
          order[3] == 0 && order[4] == 4 && order[5] == 5,
          $sformatf("rotation order %p", order));
    if (order[1] == 4 && order[2] == 5) n_rot++;
    repeat (100) @(posedge clk);

    // every mechanism has happened
    check(n_wr_phase > 0, $sformatf("write data phases %0d", n_wr_phase));
    check(n_rd_phase > 0, $sformatf("read data phases %0d", n_rd_phase));
    check(n_burst > 0,    $sformatf("burst data phases %0d", n_burst));
    check(n_wr_b2b > 0,   $sformatf("back-to-back write phases %0d", n_wr_b2b));
    check(n_resume > 0,   $sformatf("resumed bursts %0d", n_resume));
    check(n_turn > 0,     $sformatf("turnarounds %0d", n_turn));
    check(n_wait > 0,     $sformatf("read wait states %0d", n_wait));
    check(n_stop > 0,     $sformatf("target stops %0d", n_stop));
    check(n_perr > 0,     $sformatf("parity errors %0d", n_perr));
    check(n_masked > 0,   "byte-enable masking");
    check(n_rot > 0,      "arbiter rotation");
    check(n_fr_up > 0,    "DDS frequency update");
    check(n_conv > 0,     "ADC conversion");
    check(n_usb_ack > 0,  "USB OUT transaction");
    check(n_usb_in > 0,   "USB IN transaction");
    $display("mechanisms: b2b_wr=%0d b2b_rd=%0d resume=%0d", n_wr_b2b, n_rd_b2b, n_resume);
    $display("mechanisms: wr=%0d rd=%0d burst=%0d turn=%0d wait=%0d stop=%0d perr=%0d mask=%0d rot=%0d fr_up=%0d conv=%0d usb_out=%0d usb_in=%0d",
             n_wr_phase, n_rd_phase, n_burst, n_turn, n_wait, n_stop, n_perr, n_masked, n_rot,
             n_fr_up, n_conv, n_usb_ack, n_usb_in);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
