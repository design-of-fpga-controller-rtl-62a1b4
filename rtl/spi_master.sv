// spi_master: SPI master controller for a parametric measurement unit.
//
// The controller has four states: Idle, Ready, Read and Write. initiate=1
// takes it from Idle to Ready. In Ready, a request (initiate=1) latches
// datain, addr_slav and rd_wrbar and enters Write (rd_wrbar=0) or Read
// (rd_wrbar=1); the machine stays there while bitcount < N and returns to
// Ready when bitcount reaches N. The requester holds initiate high until
// busy_bar goes low and then releases it; busy_bar returns high when the
// transfer is over and, after a read, dataout holds the received word.
//
// Serial timing: SCLK idles low and each half period lasts HALF clocks.
// Words go MSB first. On a write, MOSI changes after each falling edge and
// the slave samples it on the rising edge; on a read, MOSI is released
// (mosi_oe=0) and MISO is sampled on the falling edge. cs_n_bar is a
// 3-to-8 decode of addr_slav: the selected line is low for the whole
// transfer.
//
// From the document: the state diagram, the word lengths (N=29 for the
// AD5522 APMU, N=27 for the ADATE318 DPMU), the 3-bit slave address and
// eight chip selects, write sampling on the rising edge and read sampling
// on the falling edge. This design's choices: the initiate/busy_bar
// handshake, the SCLK rate and the idle level of SCLK.
module spi_master #(
  parameter int unsigned N    = 29,
  parameter int unsigned HALF = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         initiate,
  input  logic         rd_wrbar,
  input  logic [2:0]   addr_slav,
  input  logic [N-1:0] datain,
  output logic [N-1:0] dataout,
  output logic         busy_bar,
  output logic         sclk,
  output logic         mosi,
  output logic         mosi_oe,
  input  logic         miso,
  output logic [7:0]   cs_n_bar
);

  typedef enum logic [1:0] {S_IDLE, S_READY, S_READ, S_WRITE} spi_state_e;

  localparam int unsigned BW = $clog2(N + 1);
  localparam int unsigned HW = (HALF > 1) ? $clog2(HALF) : 1;

  spi_state_e     state;
  logic [N-1:0]   shreg;
  logic [BW-1:0]  bitcount;
  logic [2:0]     slave;
  logic [HW-1:0]  hcnt;
  logic           tick;
  logic           active;

  assign active   = (state == S_READ) || (state == S_WRITE);
  assign tick     = (int'(hcnt) == HALF - 1);
  assign busy_bar = !active;
  assign mosi     = (state == S_WRITE) ? shreg[N-1] : 1'b0;
  assign mosi_oe  = (state == S_WRITE);

  always_comb begin
    cs_n_bar = '1;
    if (active) cs_n_bar[slave] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      shreg    <= '0;
      bitcount <= '0;
      slave    <= '0;
      hcnt     <= '0;
      sclk     <= 1'b0;
      dataout  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (initiate) state <= S_READY;
        S_READY: if (initiate) begin
          shreg    <= datain;
          slave    <= addr_slav;
          bitcount <= '0;
          hcnt     <= '0;
          sclk     <= 1'b0;
          state    <= rd_wrbar ? S_READ : S_WRITE;
        end
        S_READ, S_WRITE: begin
          hcnt <= tick ? '0 : hcnt + 1'b1;
          if (tick) begin
            sclk <= !sclk;
            if (sclk) begin
              // falling edge: one bit is complete
              if (state == S_READ) shreg <= {shreg[N-2:0], miso};
              else                 shreg <= {shreg[N-2:0], 1'b0};
              bitcount <= bitcount + 1'b1;
              if (int'(bitcount) == N - 1) begin
                if (state == S_READ) dataout <= {shreg[N-2:0], miso};
                state <= S_READY;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_cs: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0(~cs_n_bar));

endmodule
