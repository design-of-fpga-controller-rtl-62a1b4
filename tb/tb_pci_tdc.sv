// tb_pci_tdc: self-checking test of the PCI-to-TDC interface.
//
// A behavioural TDC-GPX register file (16 x 28 bits) answers the bus
// cycles: a write is taken on the rising edge of WRN, read data is driven
// while RDN is low. The model checks the strobe order (CSN low before the
// strobe falls, strobe high before CSN rises). The testbench writes and
// reads back registers, checks the read wait states, the strobe length and
// term while busy.
module tb_pci_tdc;
  localparam int STROBE = 2;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = !clk;

  logic        gnt = 0, wr = 0, rd = 0;
  logic [31:0] adr_pci = '0, dat_i = '0, dat_o;
  logic        rd_ack, term;
  logic [3:0]  adr;
  logic [27:0] data_o, data_i;
  logic        data_oe, csn, wrn, rdn;

  pci_tdc #(.STROBE(STROBE)) dut (.clk, .rst_n, .gnt, .wr, .rd, .adr_pci, .dat_i, .dat_o,
    .rd_ack, .term, .adr, .data_o, .data_oe, .data_i, .csn, .wrn, .rdn);

  // TDC model
  logic [27:0] regs [16];
  int          order_err = 0, n_wr = 0, wrn_low = 0;
  initial for (int i = 0; i < 16; i++) regs[i] = 28'(32'h0100_0000 * i + 32'h55);
  assign data_i = (!rdn && !csn) ? regs[adr] : 28'h0;
  always @(posedge wrn) if (rst_n) begin
    if (csn || !data_oe) order_err++;
    regs[adr] = data_o;
    n_wr++;
  end
  always @(negedge wrn or negedge rdn) if (rst_n && csn) order_err++;
  always @(posedge csn) if (rst_n && (!wrn || !rdn)) order_err++;
  always @(posedge clk) if (rst_n && !wrn) wrn_low++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lwrite(input logic [31:0] d);
    @(posedge clk); #1;
    dat_i = d; wr = 1;
    @(posedge clk); #1;
    wr = 0;
    while (term) begin @(posedge clk); #1; end
  endtask

  task automatic lread(input logic [31:0] a, output logic [31:0] v, output int waits);
    int t = 0;
    @(posedge clk); #1;
    adr_pci = a; rd = 1;
    while (!rd_ack && t < 50) begin @(posedge clk); #1; t++; end
    v = dat_o; waits = t;
    @(posedge clk); #1;
    rd = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] v;
    int waits;
    repeat (3) @(posedge clk);
    rst_n = 1; gnt = 1;
    @(posedge clk);

    // write abcd1234: address 4, data abcd123
    lwrite(32'habcd_1234);
    check(regs[4] == 28'habcd123, $sformatf("reg 4 = %h", regs[4]));
    check(wrn_low == STROBE, $sformatf("WRN low for %0d clocks", wrn_low));

    // read address e (model content 1234567)
    regs[14] = 28'h1234567;
    lread(32'h0000_000e, v, waits);
    check(v == 32'h0123_4567, $sformatf("read reg e = %h", v));
    check(waits == STROBE + 4, $sformatf("read wait states %0d", waits));

    // read back what was written
    lread(32'h0000_0004, v, waits);
    check(v == 32'h0abc_d123, $sformatf("read back reg 4 = %h", v));

    // random write/read of all registers
    for (int i = 0; i < 16; i++) begin
      automatic logic [27:0] d = 28'($urandom);
      lwrite({d, 4'(i)});
      lread(32'(i), v, waits);
      check(v == {4'b0, d}, $sformatf("reg %0d readback %h", i, v));
    end

    // term while a write cycle runs
    @(posedge clk); #1; dat_i = 32'h0000_0013; wr = 1;
    @(posedge clk); #1; wr = 0;
    check(term, "term while TDC cycle runs");
    while (term) begin @(posedge clk); #1; end
    check(n_wr == 18, $sformatf("18 TDC writes (%0d)", n_wr));
    check(order_err == 0, $sformatf("strobe order errors %0d", order_err));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
