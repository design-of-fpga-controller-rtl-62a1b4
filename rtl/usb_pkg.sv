// usb_pkg: packet identifiers, line constants and CRC functions of the USB
// 1.1 full-speed link used between the controller and the DSP board.
//
// Bits travel least significant first. A PID byte is the 4-bit code in
// bits [3:0] and its complement in bits [7:4]. The token CRC uses
// G(x) = x^5 + x^2 + 1 over the 11 address/endpoint bits and the data CRC
// uses G(x) = x^16 + x^15 + x^2 + 1 over the data bits; both registers
// start at all ones, and the complement of the result is sent most
// significant bit first.
package usb_pkg;

  localparam logic [3:0] PID_OUT   = 4'b0001;
  localparam logic [3:0] PID_IN    = 4'b1001;
  localparam logic [3:0] PID_DATA0 = 4'b0011;
  localparam logic [3:0] PID_DATA1 = 4'b1011;
  localparam logic [3:0] PID_ACK   = 4'b0010;
  localparam logic [3:0] PID_NAK   = 4'b1010;

  // Packet lengths in bits between SYNC and EOP, after unstuffing: a
  // handshake is a PID, a token a PID + 11 bits + CRC5, a data packet a
  // PID + one data byte + CRC16.
  localparam int unsigned LEN_HANDSHAKE = 8;
  localparam int unsigned LEN_TOKEN     = 24;
  localparam int unsigned LEN_DATA      = 32;

  function automatic logic [7:0] pid_byte(input logic [3:0] pid);
    return {~pid, pid};
  endfunction

  function automatic logic pid_ok(input logic [7:0] b);
    return b[7:4] == ~b[3:0];
  endfunction

  // CRC5 register after the 11 bits d[0], d[1], ... d[10].
  function automatic logic [4:0] crc5(input logic [10:0] d);
    logic [4:0] c;
    c = 5'h1f;
    for (int i = 0; i < 11; i++) begin
      if (c[4] ^ d[i]) c = {c[3:0], 1'b0} ^ 5'b00101;
      else             c = {c[3:0], 1'b0};
    end
    return c;
  endfunction

  // CRC16 register after the 8 bits d[0] .. d[7].
  function automatic logic [15:0] crc16(input logic [7:0] d);
    logic [15:0] c;
    c = 16'hffff;
    for (int i = 0; i < 8; i++) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ 16'h8005;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  // Field as it lies in the LSB-first packet: complement, bit order reversed
  // so that the register's MSB goes first on the wire.
  function automatic logic [4:0] crc5_field(input logic [10:0] d);
    logic [4:0] c, r;
    c = ~crc5(d);
    for (int i = 0; i < 5; i++) r[i] = c[4 - i];
    return r;
  endfunction

  function automatic logic [15:0] crc16_field(input logic [7:0] d);
    logic [15:0] c, r;
    c = ~crc16(d);
    for (int i = 0; i < 16; i++) r[i] = c[15 - i];
    return r;
  endfunction

endpackage
