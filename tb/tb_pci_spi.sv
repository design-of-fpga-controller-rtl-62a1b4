// tb_pci_spi: self-checking test of the PCI-to-SPI bridge together with an
// SPI master (27-bit words) and a behavioural slave.
//
// Local-side strobes are driven as the PCI core would drive them. Checked:
// a write reaches the selected slave (address bits [4:2]), a write with
// address bit 5 set performs a read, term refuses writes while busy,
// rd_ack holds reads until the transfer is over and the read returns the
// slave's word zero-extended.
module tb_pci_spi;
  localparam int N = 27;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = !clk;

  logic         gnt = 0, wr = 0, rd = 0;
  logic [31:0]  adr = '0, dat_i = '0, dat_o;
  logic         rd_ack, term;
  logic         initiate, rd_wrbar, busy_bar, sclk, mosi, mosi_oe, miso;
  logic [2:0]   addr_slav;
  logic [N-1:0] datain, dataout, tx_word = '0, rx_word;
  logic [7:0]   cs_n;
  int           nbits, done;

  pci_spi #(.N(N)) dut (.clk, .rst_n, .gnt, .wr, .rd, .adr, .dat_i, .dat_o, .rd_ack, .term,
    .initiate, .rd_wrbar, .addr_slav, .datain, .dataout, .busy_bar);
  spi_master #(.N(N)) u_m (.clk, .rst_n, .initiate, .rd_wrbar, .addr_slav, .datain, .dataout,
    .busy_bar, .sclk, .mosi, .mosi_oe, .miso, .cs_n_bar(cs_n));
  spi_slave_model #(.N(N)) u_s (.sclk, .cs_n(&cs_n), .mosi, .miso, .tx_word, .rx_word, .nbits, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lwrite(input logic [31:0] a, input logic [31:0] d);
    @(posedge clk); #1;
    adr = a; dat_i = d; wr = 1;
    @(posedge clk); #1;
    wr = 0;
  endtask

  initial begin
    int t;
    logic [7:0] cs_seen;
    repeat (3) @(posedge clk);
    rst_n = 1; gnt = 1;
    @(posedge clk);

    // write 27-bit word to slave 7: address bits [4:2] = 7, bit 5 = 0
    lwrite(32'h0000_001c, 32'h0123_4567);
    @(posedge clk); #1;
    check(term, "term while transfer runs");
    repeat (2) @(posedge clk); #1;
    cs_seen = cs_n;
    check(cs_seen == 8'b0111_1111, $sformatf("slave 7 selected (%b)", cs_seen));
    t = 0;
    while (term && t < 500) begin @(posedge clk); #1; t++; end
    check(rx_word == 27'(32'h0123_4567), $sformatf("slave got %h", rx_word));
    check(nbits == N, "27 bits");

    // read from slave 2: bit 5 = 1, bits [4:2] = 2
    tx_word = 27'h4ab_cdef;
    lwrite(32'h0000_0028, 32'h0);
    repeat (3) @(posedge clk); #1;
    check(cs_n == 8'b1111_1011, $sformatf("slave 2 selected (%b)", cs_n));
    check(!mosi_oe, "MOSI released for a read");
    rd = 1;
    t = 0;
    @(posedge clk); #1;
    check(!rd_ack, "read waits while busy");
    check(!term, "no term on a read");
    while (!rd_ack && t < 500) begin @(posedge clk); #1; t++; end
    check(dat_o == {5'b0, 27'h4ab_cdef}, $sformatf("read data %h", dat_o));
    rd = 0;

    // not granted: write ignored
    gnt = 0;
    lwrite(32'h0000_0004, 32'h1);
    repeat (3) @(posedge clk); #1;
    check(busy_bar && !initiate, "ungranted write ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
