// usb_nrzi_tx: full-speed USB packet transmitter (SYNC, bit stuffing,
// NRZI encoding, EOP).
//
// start (one clock, while not busy) loads nbits packet bits, LSB first
// from bits[0]. On each bit_en strobe (the 12 Mb/s bit rate) one bit time
// is sent: first the SYNC pattern (00000001, which NRZI turns into
// K J K J K J K K), then the packet bits, then EOP = SE0, SE0, J, after
// which the driver is released (oe low). NRZI: a 0 toggles the line, a 1
// leaves it as it is. Bit stuffing: after six consecutive 1s a 0 is
// inserted, also when the sixth 1 is the last packet bit. The line is J
// (dp=1, dm=0) when idle and K is dp=0, dm=1. busy is high from start
// until the J of the EOP has been sent.
//
// From the document: NRZI with bit stuffing, the full-speed SYNC and EOP
// patterns. This design's choices: the parallel load interface and the
// 32-bit packet limit (PID, one data byte and CRC16, the largest packet
// the controller sends).
module usb_nrzi_tx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_en,
  input  logic        start,
  input  logic [5:0]  nbits,
  input  logic [31:0] bits,
  output logic        busy,
  output logic        dp,
  output logic        dm,
  output logic        oe,
  output logic        stuffing   // the current bit time is a stuffed bit
);

  typedef enum logic [2:0] {X_IDLE, X_DATA, X_EOP2, X_EOPJ, X_REL} tx_state_e;

  tx_state_e   state;
  logic [39:0] sr;       // SYNC followed by the packet bits
  logic [5:0]  total;
  logic [5:0]  idx;
  logic [2:0]  ones;
  logic        line;     // 1 = J, 0 = K

  assign busy = (state != X_IDLE) || start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= X_IDLE;
      sr       <= '0;
      total    <= '0;
      idx      <= '0;
      ones     <= '0;
      line     <= 1'b1;
      dp       <= 1'b1;
      dm       <= 1'b0;
      oe       <= 1'b0;
      stuffing <= 1'b0;
    end else begin
      if (state == X_IDLE && start) begin
        sr    <= {bits, 8'b1000_0000};
        total <= nbits + 6'd8;
        idx   <= '0;
        ones  <= '0;
        line  <= 1'b1;
        state <= X_DATA;
      end else if (bit_en) begin
        unique case (state)
          X_IDLE: begin
            oe <= 1'b0;
            dp <= 1'b1;
            dm <= 1'b0;
          end
          X_DATA: begin
            oe <= 1'b1;
            stuffing <= 1'b0;
            if (ones == 3'd6) begin
              line <= !line;
              dp <= !line; dm <= line;
              ones <= '0;
              stuffing <= 1'b1;
            end else if (idx == total) begin
              dp <= 1'b0; dm <= 1'b0;
              state <= X_EOP2;
            end else begin
              if (sr[idx]) begin
                ones <= ones + 1'b1;
                dp <= line; dm <= !line;
              end else begin
                ones <= '0;
                line <= !line;
                dp <= !line; dm <= line;
              end
              idx <= idx + 1'b1;
            end
          end
          X_EOP2: begin
            dp <= 1'b0; dm <= 1'b0;
            stuffing <= 1'b0;
            state <= X_EOPJ;
          end
          X_EOPJ: begin
            dp <= 1'b1; dm <= 1'b0;
            state <= X_REL;
          end
          X_REL: begin    // J has been on the line for one bit time
            oe <= 1'b0;
            state <= X_IDLE;
          end
          default: state <= X_IDLE;
        endcase
      end
    end
  end

endmodule
