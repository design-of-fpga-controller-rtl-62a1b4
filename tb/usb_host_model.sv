// usb_host_model: behavioural full-speed USB host side for the testbenches.
//
// send_packet() puts a packet on dp/dm: SYNC, the given bits LSB first
// with bit stuffing and NRZI coding, EOP (SE0, SE0, J), each bit lasting
// DIV clocks. receive_packet() waits for a packet on rx_dp/rx_dm, samples
// it in the middle of each bit, decodes NRZI, removes stuffed bits and
// returns the bits between SYNC and EOP. The packet builders compute the
// CRCs with the bit-reversed (shift-right) form of the generators, which is
// a different formulation from the one in the design.
module usb_host_model #(
  parameter int DIV = 5
) (
  input  logic clk,
  output logic dp,
  output logic dm,
  input  logic rx_dp,
  input  logic rx_dm
);
  initial begin dp = 1; dm = 0; end

  function automatic logic [4:0] crc5_rev(input logic [10:0] d);
    logic [4:0] c = 5'h1f;
    for (int i = 0; i < 11; i++) c = ((c[0] ^ d[i]) ? ((c >> 1) ^ 5'h14) : (c >> 1));
    return ~c;   // sent LSB first
  endfunction

  function automatic logic [15:0] crc16_rev(input logic [7:0] d);
    logic [15:0] c = 16'hffff;
    for (int i = 0; i < 8; i++) c = ((c[0] ^ d[i]) ? ((c >> 1) ^ 16'ha001) : (c >> 1));
    return ~c;
  endfunction

  function automatic logic [31:0] token(input logic [3:0] pid, input logic [6:0] addr, input logic [3:0] endp);
    return {8'b0, crc5_rev({endp, addr}), endp, addr, ~pid, pid};
  endfunction

  function automatic logic [31:0] data_pkt(input logic [3:0] pid, input logic [7:0] d);
    return {crc16_rev(d), d, ~pid, pid};
  endfunction

  task automatic line(input logic p, input logic m);
    dp = p; dm = m;
    repeat (DIV) @(posedge clk);
  endtask

  task automatic send_packet(input logic [31:0] bits, input int n);
    logic l = 1;        // J
    int   ones = 0;
    logic [39:0] s = {bits, 8'b1000_0000};
    #1;
    for (int i = 0; i < n + 8; i++) begin
      if (s[i]) begin ones++; end else begin ones = 0; l = !l; end
      line(l, !l);
      if (ones == 6) begin ones = 0; l = !l; line(l, !l); end
    end
    line(0, 0); line(0, 0); line(1, 0);
    dp = 1; dm = 0;
  endtask

  // Returns n = -1 on timeout (no packet within max_clks clocks).
  task automatic receive_packet(output logic [31:0] bits, output int n, input int max_clks);
    int   t = 0, ones = 0;
    logic prev;
    logic [7:0] sync;
    bits = '0; n = -1;
    while (!(rx_dp == 0 && rx_dm == 1) && t < max_clks) begin @(posedge clk); #1; t++; end
    if (t >= max_clks) return;
    repeat (DIV / 2) @(posedge clk);
    #1;
    sync = '0;
    prev = 1;
    for (int i = 0; i < 8; i++) begin
      sync[i] = (rx_dp == prev);
      prev = rx_dp;
      repeat (DIV) @(posedge clk);
      #1;
    end
    if (sync != 8'b1000_0000) return;
    n = 0; ones = 1;
    while (!(rx_dp == 0 && rx_dm == 0)) begin
      if (ones == 6) begin
        ones = 0;
      end else begin
        logic b = (rx_dp == prev);
        if (n < 32) bits[n] = b;
        n++;
        ones = b ? ones + 1 : 0;
      end
      prev = rx_dp;
      repeat (DIV) @(posedge clk);
      #1;
      if (n > 40) break;
    end
    repeat (3 * DIV) @(posedge clk);
  endtask
endmodule
