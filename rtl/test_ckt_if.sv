// test_ckt_if: parallel IO that sets the 32 relay-control bits of the
// family board's test circuit.
//
// A PCI write while the test-circuit interface holds the bus grant loads
// the 32-bit data word into the ctrl_bits_tst_ckt register on the next
// clock edge; the bits then hold until the next such write. enable goes
// high with the first load and stays high, telling the board that the
// control bits are valid (they are all zero out of reset). A PCI read
// returns the current control bits.
//
// From the document: 32 control bits loaded from PCI data while the grant
// is active. This design's choices: the enable flag, read-back and reset
// value.
module test_ckt_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        grant_tst_ckt,
  input  logic        wr,
  input  logic [31:0] dat_i,
  output logic [31:0] ctrl_bits_tst_ckt,
  output logic        enable
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_bits_tst_ckt <= '0;
      enable            <= 1'b0;
    end else if (grant_tst_ckt && wr) begin
      ctrl_bits_tst_ckt <= dat_i;
      enable            <= 1'b1;
    end
  end

endmodule
