// spi_slave_model: behavioural SPI slave used by the testbenches.
//
// While its chip select is low it samples MOSI on each rising SCLK edge
// (MSB first) into rx_word and counts the edges in nbits. For reads it
// shifts tx_word out on MISO, MSB first, changing MISO after each rising
// edge so that the master can sample it on the falling edge. When the
// chip select rises, the transfer is reported through `done` (a count of
// finished transfers).
module spi_slave_model #(
  parameter int N = 29
) (
  input  logic         sclk,
  input  logic         cs_n,
  input  logic         mosi,
  output logic         miso,
  input  logic [N-1:0] tx_word,
  output logic [N-1:0] rx_word,
  output int           nbits,
  output int           done
);
  initial begin
    miso = 0; rx_word = '0; nbits = 0; done = 0;
  end

  always @(negedge cs_n) begin
    nbits = 0;
    rx_word = '0;
  end

  always @(posedge sclk) if (!cs_n) begin
    rx_word = {rx_word[N-2:0], mosi};
    #1 miso = (nbits < N) ? tx_word[N - 1 - nbits] : 1'b0;
    nbits++;
  end

  always @(posedge cs_n) done++;
endmodule
