// usb_nrzi_rx: full-speed USB packet receiver (SYNC detection, NRZI
// decoding, bit unstuffing, bit counting, EOP detection).
//
// D+ and D- first pass through two-flip-flop synchronisers (two clocks
// of latency). The line is then sampled once per bit time. The sampling
// point is recovered from the data: a phase counter running at DIV
// clocks per bit is reset by every change of D+, and the line is sampled DIV/2 clocks after the last
// change, in the middle of the bit. A sequence detector watches the
// sampled line states for the SYNC pattern K J K J K J K K; after it, each
// sample is NRZI-decoded (same state as the previous sample = 1, change =
// 0), a 0 that follows six 1s is dropped as a stuffed bit, and the other
// bits are stored LSB first and counted. A second sequence detector ends
// the packet at SE0, SE0, J: pkt_done then pulses for one clock with
// pkt_len (the number of bits between SYNC and EOP, saturating at 63) and
// pkt_bits (the first 32 of them). An EOP that is not SE0, SE0, J drops
// the packet; a stuffing violation sets pkt_stuff_err for that packet.
//
// From the document: the SYNC and EOP sequence detectors, a counter of the
// bits between them whose value tells the packet type, NRZI decoding and
// bit unstuffing. This design's choices: the phase recovery and the 32-bit
// capture limit.
module usb_nrzi_rx #(
  parameter int unsigned DIV = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dp,
  input  logic        dm,
  output logic        pkt_done,
  output logic [5:0]  pkt_len,
  output logic [31:0] pkt_bits,
  output logic        pkt_stuff_err,
  output logic        unstuffing   // the last sample was a dropped stuffed bit
);

  typedef enum logic [1:0] {R_HUNT, R_DATA, R_EOP1, R_EOP2} rx_state_e;

  localparam int unsigned PW = $clog2(DIV);
  localparam logic [7:0]  SYNC_LINE = 8'b0101_0100;  // K J K J K J K K, oldest first, J = 1

  rx_state_e   state;
  logic [PW-1:0] phase;
  logic        dp_q;
  logic        sample;
  logic [7:0]  hist;
  logic        prev;
  logic [2:0]  ones;
  logic [5:0]  cnt;
  logic [31:0] sr;
  logic        serr;
  logic        se0;

  // The line is asynchronous to clk: two flip-flops on each wire first.
  logic [1:0]  dp_m, dm_m;
  logic        ldp, ldm;
  assign ldp = dp_m[1];
  assign ldm = dm_m[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_m <= '1;                      // idle J: D+ high, D- low
      dm_m <= '0;
    end else begin
      dp_m <= {dp_m[0], dp};
      dm_m <= {dm_m[0], dm};
    end
  end

  assign se0    = !ldp && !ldm;
  assign sample = (int'(phase) == DIV / 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= R_HUNT;
      phase         <= '0;
      dp_q          <= 1'b1;
      hist          <= '1;
      prev          <= 1'b0;
      ones          <= '0;
      cnt           <= '0;
      sr            <= '0;
      serr          <= 1'b0;
      pkt_done      <= 1'b0;
      pkt_len       <= '0;
      pkt_bits      <= '0;
      pkt_stuff_err <= 1'b0;
      unstuffing    <= 1'b0;
    end else begin
      dp_q     <= ldp;
      pkt_done <= 1'b0;
      if (ldp != dp_q)                   phase <= PW'(1);
      else if (int'(phase) == DIV - 1)  phase <= '0;
      else                              phase <= phase + 1'b1;

      if (sample) begin
        unstuffing <= 1'b0;
        unique case (state)
          R_HUNT: begin
            hist <= se0 ? 8'hff : {hist[6:0], ldp};
            if (!se0 && {hist[6:0], ldp} == SYNC_LINE) begin
              state <= R_DATA;
              prev  <= ldp;
              ones  <= 3'd1;      // the SYNC ends with a 1
              cnt   <= '0;
              sr    <= '0;
              serr  <= 1'b0;
            end
          end
          R_DATA: begin
            if (se0) state <= R_EOP1;
            else begin
              prev <= ldp;
              if (ones == 3'd6) begin
                ones       <= '0;
                unstuffing <= 1'b1;
                if (ldp == prev) serr <= 1'b1;   // a 1 where a stuffed 0 belongs
              end else begin
                if (ldp == prev) ones <= ones + 1'b1;
                else            ones <= '0;
                if (cnt < 6'd32) sr[cnt[4:0]] <= (ldp == prev);
                if (cnt != 6'd63) cnt <= cnt + 1'b1;
              end
            end
          end
          R_EOP1: state <= se0 ? R_EOP2 : R_HUNT;
          R_EOP2: begin
            if (!se0 && ldp) begin
              pkt_done      <= 1'b1;
              pkt_len       <= cnt;
              pkt_bits      <= sr;
              pkt_stuff_err <= serr;
            end
            hist  <= '1;
            state <= R_HUNT;
          end
          default: state <= R_HUNT;
        endcase
      end
    end
  end

endmodule
