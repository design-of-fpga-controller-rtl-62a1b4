// fpga_ctrl_pkg: constants shared by the PCI core, the arbiter and the
// top level of the test-system controller.
//
// The PCI command codes are the ones listed for the address phase (I/O
// read 0010, I/O write 0011, memory read/write 0110/0111, configuration
// read/write 1010/1011). The target implements the I/O read and I/O write
// commands, which are the two its state diagram branches on.
//
// Device numbering follows the order in which the bus devices are listed:
// device 0 is the TDC, which the arbiter serves first after reset; the
// remaining order is this design's reading of that list.
package fpga_ctrl_pkg;

  localparam int unsigned N_DEV = 7;

  typedef enum logic [3:0] {
    CMD_IO_READ    = 4'b0010,
    CMD_IO_WRITE   = 4'b0011,
    CMD_MEM_READ   = 4'b0110,
    CMD_MEM_WRITE  = 4'b0111,
    CMD_CFG_READ   = 4'b1010,
    CMD_CFG_WRITE  = 4'b1011
  } pci_cmd_e;

  // Index of each unit in the arbiter's req/gnt vectors.
  localparam int unsigned DEV_TDC  = 0;
  localparam int unsigned DEV_DDS  = 1;
  localparam int unsigned DEV_APMU = 2;
  localparam int unsigned DEV_DPMU = 3;
  localparam int unsigned DEV_ADC  = 4;
  localparam int unsigned DEV_TST  = 5;
  localparam int unsigned DEV_USB  = 6;

  // States of the PCI target (Idle, Adr, Turn_ar, Read, Rd_dta, Write,
  // Wr_dta, Stop).
  typedef enum logic [2:0] {
    PCI_IDLE, PCI_ADR, PCI_TURN_AR, PCI_READ, PCI_RD_DTA,
    PCI_WRITE, PCI_WR_DTA, PCI_STOP
  } pci_state_e;

  // Keep the bytes whose active-low byte enable is 0, clear the others.
  function automatic logic [31:0] be_mask(input logic [31:0] d, input logic [3:0] cbe_n);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = cbe_n[i] ? 8'h00 : d[8*i +: 8];
    return r;
  endfunction

endpackage
