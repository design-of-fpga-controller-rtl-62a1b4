// tb_usb_controller: self-checking test of the USB transaction state
// machine with a behavioural host.
//
// Transactions: OUT + DATA0 (byte received, device ACK), OUT with a bad
// CRC16 (device NAK), tokens with a CRC5 or PID error (discarded), OUT
// followed by a packet that is not data (back to waiting), IN with no byte
// loaded (no answer), IN with a byte loaded and host ACK (byte consumed,
// DATA0/DATA1 toggle), IN answered by host NAK (byte kept, resent). The
// host checks the CRC16 of every data packet the device sends. Each state
// of the machine is counted and must have been visited.
module tb_usb_controller;
  localparam int DIV = 5;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = !clk;

  logic       rxdp, rxdm, txdp, txdm, tx_oe, dout_valid, din_valid = 0, din_taken;
  logic [7:0] dout, din = '0;
  logic [3:0] ep, state;
  logic [6:0] addr;

  usb_controller #(.DIV(DIV)) dut (.clk, .rst_n, .rxdp, .rxdm, .txdp, .txdm, .tx_oe,
    .dout, .dout_valid, .ep, .addr, .din, .din_valid, .din_taken, .state_o(state));
  usb_host_model #(.DIV(DIV)) host (.clk, .dp(rxdp), .dm(rxdm), .rx_dp(txdp), .rx_dm(txdm));

  int n_dout = 0, n_taken = 0;
  int visits [10];
  initial foreach (visits[i]) visits[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (dout_valid) n_dout++;
    if (din_taken) begin n_taken++; din_valid <= 0; end
    visits[state]++;
  end

  localparam logic [3:0] OUT = 4'b0001, IN = 4'b1001, DATA0 = 4'b0011, DATA1 = 4'b1011,
                         ACK = 4'b0010, NAK = 4'b1010;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_reply(input logic [3:0] pid, input string what);
    logic [31:0] b; int n;
    host.receive_packet(b, n, 400);
    check(n == 8 && b[7:0] == {~pid, pid}, $sformatf("%s: reply n=%0d pid=%h", what, n, b[7:0]));
  endtask

  task automatic expect_silence(input string what);
    logic [31:0] b; int n;
    host.receive_packet(b, n, 300);
    check(n == -1, $sformatf("%s: no reply expected, got %0d bits", what, n));
  endtask

  task automatic expect_data(input logic [3:0] pid, input logic [7:0] d, input string what);
    logic [31:0] b; int n;
    host.receive_packet(b, n, 400);
    check(n == 32, $sformatf("%s: data packet length %0d", what, n));
    check(b == host.data_pkt(pid, d), $sformatf("%s: data packet %h expected %h", what, b, host.data_pkt(pid, d)));
  endtask

  initial begin
    logic [31:0] t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);

    // OUT to endpoint 1 with data a5 (the simulated example's values)
    host.send_packet(host.token(OUT, 7'h03, 4'h1), 24);
    host.send_packet(host.data_pkt(DATA0, 8'ha5), 32);
    expect_reply(ACK, "OUT good data");
    check(dout == 8'ha5 && n_dout == 1, $sformatf("dout %h", dout));
    check(ep == 4'h1 && addr == 7'h03, "endpoint and address from token");

    // OUT with a corrupted CRC16 -> NAK, dout unchanged
    t = host.data_pkt(DATA1, 8'h3c); t[20] = !t[20];
    host.send_packet(host.token(OUT, 7'h03, 4'h2), 24);
    host.send_packet(t, 32);
    expect_reply(NAK, "OUT bad CRC16");
    check(n_dout == 1 && dout == 8'ha5, "no data on CRC error");

    // token with a CRC5 error: discarded, the following data packet is
    // not a token either, no reply
    t = host.token(OUT, 7'h03, 4'h1); t[22] = !t[22];
    host.send_packet(t, 24);
    host.send_packet(host.data_pkt(DATA0, 8'h11), 32);
    expect_silence("token CRC5 error");
    // token with a PID check error
    t = host.token(OUT, 7'h03, 4'h1); t[7] = !t[7];
    host.send_packet(t, 24);
    host.send_packet(host.data_pkt(DATA0, 8'h22), 32);
    expect_silence("token PID error");
    check(n_dout == 1, "nothing received after bad tokens");

    // OUT followed by a handshake instead of data: back to Wait for token
    host.send_packet(host.token(OUT, 7'h03, 4'h1), 24);
    host.send_packet({24'b0, ~ACK, ACK}, 8);
    expect_silence("host data PID error");
    check(state == 4'd0, "waiting for token");

    // IN with nothing loaded: no answer
    host.send_packet(host.token(IN, 7'h03, 4'h1), 24);
    expect_silence("IN without data");

    // IN with byte 98 loaded, host ACK -> consumed, DATA0
    din = 8'h98; din_valid = 1;
    host.send_packet(host.token(IN, 7'h03, 4'h1), 24);
    expect_data(DATA0, 8'h98, "IN first");
    host.send_packet({24'b0, ~ACK, ACK}, 8);
    repeat (20) @(posedge clk);
    check(n_taken == 1 && !din_valid, "byte consumed after host ACK");

    // next byte with DATA1, host NAK first -> kept, resent, then ACK
    @(posedge clk); din = 8'h5e; din_valid = 1;
    host.send_packet(host.token(IN, 7'h03, 4'h1), 24);
    expect_data(DATA1, 8'h5e, "IN second");
    host.send_packet({24'b0, ~NAK, NAK}, 8);
    repeat (20) @(posedge clk);
    check(n_taken == 1 && din_valid, "byte kept after host NAK");
    host.send_packet(host.token(IN, 7'h03, 4'h1), 24);
    expect_data(DATA1, 8'h5e, "IN retry");
    host.send_packet({24'b0, ~ACK, ACK}, 8);
    repeat (20) @(posedge clk);
    check(n_taken == 2, "byte consumed after retry");

    // IN answered by nothing (host timeout path)
    @(posedge clk); din = 8'h77; din_valid = 1;
    host.send_packet(host.token(IN, 7'h03, 4'h1), 24);
    expect_data(DATA0, 8'h77, "IN no handshake");
    repeat (100 * DIV) @(posedge clk);
    check(n_taken == 2 && din_valid, "byte kept after handshake timeout");

    // random OUT bytes
    for (int k = 0; k < 4; k++) begin
      automatic logic [7:0] d = 8'($urandom);
      host.send_packet(host.token(OUT, 7'h03, 4'(k)), 24);
      host.send_packet(host.data_pkt(k[0] ? DATA1 : DATA0, d), 32);
      expect_reply(ACK, "random OUT");
      check(dout == d && ep == 4'(k), $sformatf("random OUT %0d dout %h", k, dout));
    end

    foreach (visits[i]) check(visits[i] > 0, $sformatf("state %0d visited", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
