// tb_pci_usb: self-checking test of the PCI-to-USB bridge with its two
// clocks (PCI side 33 MHz, USB side 60 MHz).
//
// The USB controller side is modelled here on clk_usb: it reports received
// bytes (dout_valid) and consumes the transmit byte (din_taken). Checked:
// a granted write makes the byte valid on the USB side, term during the
// write strobe and while the byte waits, the status word read on the
// local side, the crossing of received bytes and their endpoint, the
// clearing of the "byte received" flag at the end of a read, and that a
// taken byte is seen exactly once on the USB side.
module tb_pci_usb;
  logic clk = 0, clk_usb = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #15 clk = !clk;          // 33.3 MHz
  always #8.333 clk_usb = !clk_usb; // 60 MHz

  logic        gnt = 0, wr = 0, rd = 0, rd_ack, term;
  logic [31:0] dat_i = '0, dat_o;
  logic [7:0]  din, dout = '0;
  logic        din_valid, din_taken = 0, dout_valid = 0;
  logic [3:0]  ep = '0;

  pci_usb dut (.clk, .clk_usb, .rst_n, .gnt, .wr, .rd, .dat_i, .dat_o, .rd_ack, .term,
    .din, .din_valid, .din_taken, .dout, .dout_valid, .ep);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lwrite(input logic [31:0] d);
    @(posedge clk); #1; dat_i = d; wr = 1;
    #1 check(!gnt || term, "term during a granted write strobe");
    @(posedge clk); #1; wr = 0;
  endtask

  task automatic lread(output logic [31:0] v);
    @(posedge clk); #1; rd = 1;
    check(rd_ack, "read never waits");
    v = dat_o;
    @(posedge clk); #1; rd = 0;
    @(posedge clk); #1;
  endtask

  // USB-side: wait until a byte is valid, return it, then take it
  task automatic usb_take(output logic [7:0] b, output bit seen);
    int t = 0;
    seen = 0;
    while (!din_valid && t < 50) begin @(posedge clk_usb); #1; t++; end
    if (din_valid) begin
      seen = 1; b = din;
      @(posedge clk_usb); #1; din_taken = 1;
      @(posedge clk_usb); #1; din_taken = 0;
    end
  endtask

  task automatic usb_receive(input logic [7:0] b, input logic [3:0] e);
    @(posedge clk_usb); #1; dout = b; ep = e; dout_valid = 1;
    @(posedge clk_usb); #1; dout_valid = 0; ep = 4'hf;
  endtask

  initial begin
    logic [31:0] v;
    logic [7:0]  b;
    bit          seen;
    int          t;
    repeat (3) @(posedge clk);
    rst_n = 1; gnt = 1;
    @(posedge clk); #1;
    check(!din_valid && !term, "idle after reset");

    lwrite(32'hffff_ff98);
    check(term, "term while a byte waits");
    lread(v);
    check(v[9] && !v[8], $sformatf("status: tx pending (%h)", v));
    usb_take(b, seen);
    check(seen && b == 8'h98, $sformatf("USB side got byte 98 (%h)", b));
    // the taken byte is not offered again
    t = 0;
    repeat (20) begin @(posedge clk_usb); #1; if (din_valid) t++; end
    check(t == 0, "taken byte not offered again");
    repeat (4) @(posedge clk); #1;
    check(!term, "term released after the byte was taken");
    lread(v);
    check(!v[9], $sformatf("status: nothing pending (%h)", v));

    // a second byte right away
    lwrite(32'h0000_0033);
    usb_take(b, seen);
    check(seen && b == 8'h33, $sformatf("USB side got byte 33 (%h)", b));

    // controller receives a5 on endpoint 1
    usb_receive(8'ha5, 4'h1);
    repeat (4) @(posedge clk);
    lread(v);
    check(v == 32'h0000_11a5, $sformatf("status word %h", v));
    lread(v);
    check(v == 32'h0000_10a5, $sformatf("received flag cleared by read (%h)", v));
    usb_receive(8'h3c, 4'h2);
    repeat (4) @(posedge clk);
    lread(v);
    check(v == 32'h0000_213c, $sformatf("second received byte %h", v));

    gnt = 0;
    lwrite(32'h12);
    repeat (6) @(posedge clk_usb); #1;
    check(!din_valid, "ungranted write ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
