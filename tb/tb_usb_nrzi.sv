// tb_usb_nrzi: self-checking test of the USB packet transmitter and
// receiver (SYNC, NRZI, bit stuffing, EOP, bit count).
//
// The transmitter's output is decoded by the behavioural host receiver and
// also looped into the design's receiver; packets from the behavioural
// host transmitter go into the design's receiver. Packets of 8, 24 and 32
// bits are used, including runs of 1s that force stuffed bits (also at the
// end of a packet), and the number of stuffed bits is compared with the
// number a reference count of the bit stream expects.
module tb_usb_nrzi;
  localparam int DIV = 5;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = !clk;

  // bit-rate strobe
  int   dc = 0;
  logic bit_en;
  assign bit_en = (dc == DIV - 1);
  always @(posedge clk) dc <= bit_en ? 0 : dc + 1;

  logic        start = 0, busy, tx_dp, tx_dm, tx_oe, stuffing;
  logic [5:0]  nbits = '0;
  logic [31:0] bits = '0;
  usb_nrzi_tx dut_tx (.clk, .rst_n, .bit_en, .start, .nbits, .bits, .busy,
                      .dp(tx_dp), .dm(tx_dm), .oe(tx_oe), .stuffing);

  logic h_dp, h_dm;
  usb_host_model #(.DIV(DIV)) host (.clk, .dp(h_dp), .dm(h_dm), .rx_dp(tx_dp), .rx_dm(tx_dm));

  // receiver 1 listens to the host, receiver 2 to the transmitter
  logic        d1, l1, e1, u1, d2, l2_e, e2, u2;
  logic [5:0]  len1, len2;
  logic [31:0] b1, b2;
  usb_nrzi_rx #(.DIV(DIV)) dut_rx1 (.clk, .rst_n, .dp(h_dp), .dm(h_dm), .pkt_done(d1),
    .pkt_len(len1), .pkt_bits(b1), .pkt_stuff_err(e1), .unstuffing(u1));
  usb_nrzi_rx #(.DIV(DIV)) dut_rx2 (.clk, .rst_n, .dp(tx_dp), .dm(tx_dm), .pkt_done(d2),
    .pkt_len(len2), .pkt_bits(b2), .pkt_stuff_err(e2), .unstuffing(u2));

  int n_done1 = 0, n_done2 = 0, n_stuff = 0, n_unstuff = 0;
  logic [31:0] last1, last2;
  logic [5:0]  llen1, llen2;
  always @(posedge clk) if (rst_n) begin
    if (d1) begin n_done1++; last1 = b1; llen1 = len1; end
    if (d2) begin n_done2++; last2 = b2; llen2 = len2; end
    if (bit_en && stuffing) n_stuff++;
    if (u2 && dut_rx2.sample) n_unstuff++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int count_stuff(input logic [31:0] b, input int n);
    logic [39:0] s = {b, 8'b1000_0000};
    int ones = 0, k = 0;
    for (int i = 0; i < n + 8; i++) begin
      ones = s[i] ? ones + 1 : 0;
      if (ones == 6) begin k++; ones = 0; end
    end
    return k;
  endfunction

  task automatic tx_one(input logic [31:0] b, input int n);
    logic [31:0] got;
    int gn, t0, st0, base2;
    logic [31:0] m = (n == 32) ? 32'hffff_ffff : ((32'h1 << n) - 1);
    st0 = n_stuff; base2 = n_done2;
    @(posedge clk); #1;
    bits = b; nbits = 6'(n); start = 1;
    @(posedge clk); #1;
    start = 0;
    t0 = int'($time);
    fork
      host.receive_packet(got, gn, 2000);
      begin while (busy) @(posedge clk); end
    join
    check(gn == n, $sformatf("host received %0d bits, sent %0d", gn, n));
    check((got & m) == (b & m), $sformatf("host bits %h vs %h", got & m, b & m));
    check(n_stuff - st0 == count_stuff(b, n), $sformatf("stuffed bits %0d expected %0d", n_stuff - st0, count_stuff(b, n)));
    repeat (3 * DIV) @(posedge clk);
    check(n_done2 == base2 + 1 && llen2 == 6'(n) && (last2 & m) == (b & m),
          $sformatf("loopback receiver: len %0d bits %h", llen2, last2 & m));
  endtask

  task automatic rx_one(input logic [31:0] b, input int n);
    int base1 = n_done1;
    logic [31:0] m = (n == 32) ? 32'hffff_ffff : ((32'h1 << n) - 1);
    host.send_packet(b, n);
    repeat (3 * DIV) @(posedge clk);
    check(n_done1 == base1 + 1, "receiver saw one packet");
    check(llen1 == 6'(n), $sformatf("receiver length %0d expected %0d", llen1, n));
    check((last1 & m) == (b & m), $sformatf("receiver bits %h expected %h", last1 & m, b & m));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    // handshake ACK (8 bits), token, data with long runs of ones
    tx_one(32'h0000_00d2, 8);
    tx_one(host.token(4'b0001, 7'h15, 4'h1), 24);
    tx_one(host.data_pkt(4'b0011, 8'hff), 32);
    tx_one(32'hffff_ffff, 32);
    tx_one(32'h0000_003f, 6);       // stuffed bit right before EOP
    tx_one(32'h0000_0000, 32);
    for (int k = 0; k < 4; k++) tx_one($urandom, 32);

    rx_one(32'h0000_00d2, 8);
    rx_one(host.token(4'b1001, 7'h03, 4'h1), 24);
    rx_one(host.data_pkt(4'b0011, 8'ha5), 32);
    rx_one(32'hffff_ffff, 32);
    rx_one(32'h0000_003f, 6);
    for (int k = 0; k < 4; k++) rx_one($urandom, 32);
    check(n_unstuff > 0, $sformatf("receiver removed %0d stuffed bits", n_unstuff));
    check(n_unstuff == n_stuff, $sformatf("unstuffed %0d = stuffed %0d on loopback", n_unstuff, n_stuff));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
