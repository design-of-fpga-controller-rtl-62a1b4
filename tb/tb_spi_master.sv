// tb_spi_master: self-checking test of the SPI master, instantiated for
// the APMU word length (29 bits) and the DPMU word length (27 bits).
//
// A behavioural slave on each chip-select line checks what is written and
// supplies words to read. The test checks the chip-select decode of the
// 3-bit slave address, the written and read words, the number of SCLK
// edges, that MOSI is released in reads, busy_bar, and the transfer time:
// N bits at 2*HALF clocks per bit.
module tb_spi_master;
  localparam int NA = 29, ND = 27, HALF = 2;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // APMU instance
  logic          a_init = 0, a_rdwr = 0, a_busy_bar, a_sclk, a_mosi, a_mosi_oe, a_miso;
  logic [2:0]    a_addr = '0;
  logic [NA-1:0] a_din = '0, a_dout, a_tx = '0, a_rx;
  logic [7:0]    a_cs;
  int            a_nbits, a_done;
  spi_master #(.N(NA), .HALF(HALF)) dut_a (
    .clk, .rst_n, .initiate(a_init), .rd_wrbar(a_rdwr), .addr_slav(a_addr), .datain(a_din),
    .dataout(a_dout), .busy_bar(a_busy_bar), .sclk(a_sclk), .mosi(a_mosi), .mosi_oe(a_mosi_oe),
    .miso(a_miso), .cs_n_bar(a_cs));
  spi_slave_model #(.N(NA)) sl_a (.sclk(a_sclk), .cs_n(&a_cs), .mosi(a_mosi), .miso(a_miso),
    .tx_word(a_tx), .rx_word(a_rx), .nbits(a_nbits), .done(a_done));

  // DPMU instance
  logic          d_init = 0, d_rdwr = 0, d_busy_bar, d_sclk, d_mosi, d_mosi_oe, d_miso;
  logic [2:0]    d_addr = '0;
  logic [ND-1:0] d_din = '0, d_dout, d_tx = '0, d_rx;
  logic [7:0]    d_cs;
  int            d_nbits, d_done;
  spi_master #(.N(ND), .HALF(HALF)) dut_d (
    .clk, .rst_n, .initiate(d_init), .rd_wrbar(d_rdwr), .addr_slav(d_addr), .datain(d_din),
    .dataout(d_dout), .busy_bar(d_busy_bar), .sclk(d_sclk), .mosi(d_mosi), .mosi_oe(d_mosi_oe),
    .miso(d_miso), .cs_n_bar(d_cs));
  spi_slave_model #(.N(ND)) sl_d (.sclk(d_sclk), .cs_n(&d_cs), .mosi(d_mosi), .miso(d_miso),
    .tx_word(d_tx), .rx_word(d_rx), .nbits(d_nbits), .done(d_done));

  // MOSI must be released during a read
  always @(posedge clk) if (rst_n && !a_busy_bar && a_rdwr && a_mosi_oe) begin
    failures++; $display("FAIL: MOSI driven in read");
  end

  // one APMU transfer; returns clocks from busy_bar low to busy_bar high
  task automatic a_xfer(input bit rdwr, input logic [2:0] sl, input logic [NA-1:0] w, output int cyc);
    int t = 0;
    @(posedge clk); #1;
    a_rdwr = rdwr; a_addr = sl; a_din = w; a_init = 1;
    while (a_busy_bar) begin @(posedge clk); #1; end
    a_init = 0;
    a_din = '0;  // latched at start
    check(a_cs == ~(8'b1 << sl), $sformatf("APMU cs_n_bar %b for slave %0d", a_cs, sl));
    while (!a_busy_bar) begin @(posedge clk); #1; t++; end
    cyc = t;
  endtask

  task automatic d_xfer(input bit rdwr, input logic [2:0] sl, input logic [ND-1:0] w, output int cyc);
    int t = 0;
    @(posedge clk); #1;
    d_rdwr = rdwr; d_addr = sl; d_din = w; d_init = 1;
    while (d_busy_bar) begin @(posedge clk); #1; end
    d_init = 0;
    check(d_cs == ~(8'b1 << sl), $sformatf("DPMU cs_n_bar %b for slave %0d", d_cs, sl));
    while (!d_busy_bar) begin @(posedge clk); #1; t++; end
    cyc = t;
  endtask

  initial begin
    int cyc, a_base, d_base;
    logic [NA-1:0] wa;
    logic [ND-1:0] wd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(a_cs == 8'hff && d_cs == 8'hff, "no chip select when idle");
    a_base = a_done; d_base = d_done;

    // APMU write to slave 5 (the simulated example's address 101)
    wa = 29'b11001001011001001010010011111;
    a_xfer(0, 3'd5, wa, cyc);
    check(a_rx == wa, $sformatf("APMU write word %h got %h", wa, a_rx));
    check(a_nbits == NA, $sformatf("APMU write %0d SCLK edges", a_nbits));
    check(cyc == NA * 2 * HALF, $sformatf("APMU write time %0d clocks", cyc));

    // APMU read from slave 7
    a_tx = 29'h1abc_5a3c & {NA{1'b1}};
    a_xfer(1, 3'd7, '0, cyc);
    check(a_dout == a_tx, $sformatf("APMU read %h expected %h", a_dout, a_tx));
    check(cyc == NA * 2 * HALF, $sformatf("APMU read time %0d clocks", cyc));

    // random APMU transfers
    for (int k = 0; k < 6; k++) begin
      automatic logic [2:0] sl = 3'($urandom_range(0, 7));
      wa = NA'({$urandom, $urandom});
      if (k % 2 == 0) begin
        a_xfer(0, sl, wa, cyc);
        check(a_rx == wa, $sformatf("APMU random write %0d", k));
      end else begin
        a_tx = wa;
        a_xfer(1, sl, '0, cyc);
        check(a_dout == wa, $sformatf("APMU random read %0d", k));
      end
    end

    // DPMU write and read
    wd = 27'h5b1_c3d2 & {ND{1'b1}};
    d_xfer(0, 3'd2, wd, cyc);
    check(d_rx == wd, $sformatf("DPMU write word %h got %h", wd, d_rx));
    check(d_nbits == ND, $sformatf("DPMU write %0d SCLK edges", d_nbits));
    check(cyc == ND * 2 * HALF, $sformatf("DPMU write time %0d clocks", cyc));
    d_tx = 27'h2ee_0f71 & {ND{1'b1}};
    d_xfer(1, 3'd0, '0, cyc);
    check(d_dout == d_tx, $sformatf("DPMU read %h expected %h", d_dout, d_tx));

    // with initiate low the master stays in Ready
    repeat (20) @(posedge clk);
    check(a_busy_bar && d_busy_bar, "no transfer without initiate");
    check(a_done - a_base == 8 && d_done - d_base == 2,
          $sformatf("transfer counts %0d %0d", a_done - a_base, d_done - d_base));

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
