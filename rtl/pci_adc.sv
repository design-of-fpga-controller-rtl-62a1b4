// pci_adc: PCI to ADC interface for an AD7870-family 12-bit ADC with a
// parallel output.
//
// A PCI write of a word with bit 0 set, while this unit is granted, starts
// a conversion: adc_convst (idle high) is driven low for CONV_LOW clocks
// and the rising edge that follows starts the conversion. The interface
// then waits for the ADC to pull adc_int low (end of conversion), drives
// adc_cs and adc_rd low together for RD_CYC clocks with adc_convst high,
// captures adc_data on the clock that ends the read, and releases adc_cs
// and adc_rd. A PCI read returns the last result zero-extended to 32
// bits; while a conversion is in progress the read is held in wait states
// (rd_ack low), and from the starting write strobe until the result is in
// writes are refused (term).
//
// From the document: conversion start on a CONVST rising edge caused by
// writing 1 in data bit 0, INT low at the end of conversion, CS and RD low
// to read, CONVST high while they are low, 12-bit data. This design's
// choices: the pulse and read lengths and the wait/term behaviour.
module pci_adc #(
  parameter int unsigned CONV_LOW = 2,
  parameter int unsigned RD_CYC   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // PCI core local side
  input  logic        gnt,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] dat_i,
  output logic [31:0] dat_o,
  output logic        rd_ack,
  output logic        term,
  // ADC pins (active-low controls)
  output logic        adc_convst,
  output logic        adc_cs,
  output logic        adc_rd,
  input  logic        adc_int,
  input  logic [11:0] adc_data
);

  typedef enum logic [1:0] {A_IDLE, A_CONVST, A_WAIT_INT, A_READ} adc_state_e;

  localparam int unsigned CW = $clog2(((CONV_LOW > RD_CYC) ? CONV_LOW : RD_CYC) + 1);

  adc_state_e   state;
  logic [CW-1:0] cnt;
  logic [11:0]  result;
  logic         busy;

  assign busy   = (state != A_IDLE);
  assign rd_ack = !busy;
  // a write that starts a conversion refuses the next data phase at once
  assign term   = (busy || (gnt && wr && dat_i[0])) && !rd;
  assign dat_o  = {20'b0, result};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= A_IDLE;
      cnt        <= '0;
      result     <= '0;
      adc_convst <= 1'b1;
      adc_cs     <= 1'b1;
      adc_rd     <= 1'b1;
    end else begin
      unique case (state)
        A_IDLE: if (gnt && wr && dat_i[0]) begin
          adc_convst <= 1'b0;
          cnt        <= '0;
          state      <= A_CONVST;
        end
        A_CONVST: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CONV_LOW - 1) begin
            adc_convst <= 1'b1;
            state      <= A_WAIT_INT;
          end
        end
        A_WAIT_INT: if (!adc_int) begin
          adc_cs <= 1'b0;
          adc_rd <= 1'b0;
          cnt    <= '0;
          state  <= A_READ;
        end
        A_READ: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == RD_CYC - 1) begin
            result <= adc_data;
            adc_cs <= 1'b1;
            adc_rd <= 1'b1;
            state  <= A_IDLE;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  a_convst_high_on_read: assert property (@(posedge clk) disable iff (!rst_n)
                                          (!adc_cs || !adc_rd) |-> adc_convst);

endmodule
