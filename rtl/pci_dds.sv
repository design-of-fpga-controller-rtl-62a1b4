// pci_dds: PCI to DDS interface for an AD9851 in parallel-load mode.
//
// The DDS takes a 40-bit control word as five bytes W0..W4. Two PCI writes
// (while this unit is granted) supply it: the first carries W0..W3 in
// data bits [31:24], [23:16], [15:8], [7:0], the second carries W4 in bits
// [7:0]. From the clock edge that takes the second write, the interface
// puts one byte per clock on data[7:0], W0 first, and gives one word-clock
// pulse per byte: wd_clk rises at the falling edge of clk in the middle of
// the byte and falls at the next rising edge, so the DDS latches each byte
// on a rising edge of wd_clk with half a clock of setup and of hold. After
// W4, fr_up (frequency update) is high for one clock and the DDS copies
// the 40 bits into its working register. The five bytes take five clocks.
//
// wd_clk is the exclusive OR of two flip-flops, one toggled on the falling
// edge of clk while a byte is on the bus and one copying it on the rising
// edge, so only one of its inputs changes at a time and it cannot glitch.
//
// busy is high during the strobe of the second write and for 6 clocks
// after it (five bytes and the update pulse); while it is high further
// writes are refused (term). The first/second word order is reset only by
// rst_n.
//
// From the document: 40 bits as five bytes, byte order W0 first, one byte
// per system-clock cycle, each latched on the rising word-clock edge, a
// one-clock frequency-update pulse, two PCI writes per word. This design's
// choices: the split of the 40 bits over the two PCI words (as in the
// simulated example, first word then low byte of the second) and the
// two-flip-flop word-clock generator.
module pci_dds (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        gnt,
  input  logic        wr,
  input  logic [31:0] dat_i,
  output logic        busy,
  output logic        wd_clk,
  output logic        fr_up,
  output logic [7:0]  data
);

  logic [4:0][7:0] word;   // word[4] = W0 ... word[0] = W4
  logic        second;   // next PCI write is the second word
  logic [2:0]  step;     // 0..4: byte W(step) on data, 5: frequency update
  logic        run;      // sending the bytes and the update pulse
  logic        on_bus;   // a byte is on data in this clock
  logic        tog_n;    // toggled on the falling edge while on_bus
  logic        tog_p;    // tog_n copied on the rising edge

  assign busy   = run || (gnt && wr && second);
  assign wd_clk = tog_n ^ tog_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word   <= '0;
      second <= 1'b0;
      run    <= 1'b0;
      on_bus <= 1'b0;
      step   <= '0;
      fr_up  <= 1'b0;
      data   <= '0;
      tog_p  <= 1'b0;
    end else begin
      tog_p <= tog_n;
      if (run) begin
        step <= step + 1'b1;
        if (step < 3'd4) begin
          data <= word[3'd3 - step];
        end else if (step == 3'd4) begin
          on_bus <= 1'b0;
          fr_up  <= 1'b1;
        end else begin
          fr_up <= 1'b0;
          run   <= 1'b0;
        end
      end else if (gnt && wr) begin
        if (!second) begin
          word[4:1] <= dat_i;
          second    <= 1'b1;
        end else begin
          word[0]   <= dat_i[7:0];
          data      <= word[4];
          second    <= 1'b0;
          run       <= 1'b1;
          on_bus    <= 1'b1;
          step      <= '0;
        end
      end
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)      tog_n <= 1'b0;
    else if (on_bus) tog_n <= !tog_n;
  end

endmodule
