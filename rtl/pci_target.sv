// pci_target: 32-bit, 33 MHz PCI target ("PCI core") of the controller.
//
// A state machine with the states Idle, Adr, Turn_ar, Read, Rd_dta, Write,
// Wr_dta and Stop follows each transaction on the bus. The cycle in which
// FRAME# is first sampled low is the address phase: address and command
// are latched and the machine enters Adr. Adr branches on the command: an
// I/O read (0010) passes through the one-cycle turnaround state Turn_ar
// before the target drives AD, an I/O write (0011) goes straight to Write;
// any other command is ignored until FRAME# is released. A data phase
// completes on a clock edge where IRDY# and TRDY# are both low; the
// machine then enters Rd_dta / Wr_dta. If that was the last data phase
// (FRAME# high) it returns to Idle. Otherwise TRDY# stays asserted in
// Rd_dta / Wr_dta, so a burst moves one word per clock (133 MB/s at
// 33 MHz) while the initiator keeps IRDY# low; when the initiator inserts
// a wait state the machine falls back to Read / Write. When the local unit
// raises term, STOP# is asserted instead of TRDY# and the machine goes
// through Stop back to Idle once the initiator releases FRAME#.
//
// Local side: each completed write data phase gives a one-cycle wr strobe
// (in Wr_dta) with the data on dat_o, the bytes whose C/BE# is high
// cleared. While a read data phase is open, rd is high and dat_i is driven
// onto AD; TRDY# is asserted only while the unit holds rd_ack, which lets
// a slow unit insert wait states. A unit that raises term must do so in
// the same cycle as a wr strobe it cannot follow with another one. par_o
// is the even parity of AD and C/BE# one clock after each read data
// phase; on writes PAR is checked one clock after the data and PERR#
// pulses low on a mismatch.
//
// From the document: the state names and branches, the command codes, the
// byte-enable masking and the term/stop behaviour. This design's choices:
// no address decode (every I/O cycle is claimed), the Stop-to-Idle
// condition, the return from Rd_dta / Wr_dta to Read / Write and the stay
// in Rd_dta / Wr_dta for back-to-back data phases, the rd_ack wait
// mechanism, and the parity timing, which follows the PCI rules.
module pci_target
  import fpga_ctrl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // PCI bus (AD split into in/out/enable, active-low controls)
  input  logic        frame_n,
  input  logic [31:0] ad_i,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  input  logic [3:0]  cbe_n,
  input  logic        irdy_n,
  output logic        trdy_n,
  output logic        devsel_n,
  output logic        stop_n,
  input  logic        par_i,
  output logic        par_o,
  output logic        par_oe,
  output logic        perr_n,
  // local side
  output logic [31:0] adr,      // address latched in the address phase
  output logic        rd,       // a read data phase is in progress
  output logic        wr,       // one-cycle strobe: dat_o holds write data
  output logic [31:0] dat_o,
  input  logic [31:0] dat_i,
  input  logic        rd_ack,   // unit has valid dat_i
  input  logic        term,     // unit cannot take the transfer: stop
  output pci_state_e  state_o
);

  pci_state_e state;
  logic [3:0] cmd;
  logic       last;      // FRAME# was high in the data phase just done
  logic       exp_par;   // expected PAR for the last write data phase
  logic       chk_par;

  assign state_o  = state;
  // A data phase is open in Read / Write, and in Rd_dta / Wr_dta unless
  // the phase just completed was the last one.
  logic rd_open, wr_open;
  assign rd_open  = (state == PCI_READ)  || ((state == PCI_RD_DTA) && !last);
  assign wr_open  = (state == PCI_WRITE) || ((state == PCI_WR_DTA) && !last);

  assign rd       = rd_open;
  assign wr       = (state == PCI_WR_DTA);
  assign ad_oe    = rd_open;
  assign ad_o     = dat_i;
  assign devsel_n = !(state inside {PCI_TURN_AR, PCI_READ, PCI_RD_DTA,
                                    PCI_WRITE, PCI_WR_DTA, PCI_STOP});
  assign stop_n   = !((state == PCI_STOP) || ((rd_open || wr_open) && term));
  assign trdy_n   = !((wr_open && !term) || (rd_open && !term && rd_ack));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= PCI_IDLE;
      adr     <= '0;
      cmd     <= '0;
      last    <= 1'b0;
      dat_o   <= '0;
      exp_par <= 1'b0;
      chk_par <= 1'b0;
      perr_n  <= 1'b1;
      par_o   <= 1'b0;
      par_oe  <= 1'b0;
    end else begin
      // read parity follows the data phase by one clock
      par_o   <= ^{ad_o, cbe_n};
      par_oe  <= ad_oe;
      // write parity: PAR arrives one clock after the data
      chk_par <= 1'b0;
      perr_n  <= !(chk_par && (par_i != exp_par));
      unique case (state)
        PCI_IDLE: if (!frame_n) begin
          adr   <= ad_i;
          cmd   <= cbe_n;
          state <= PCI_ADR;
        end
        PCI_ADR: begin
          if (cmd == CMD_IO_READ)       state <= PCI_TURN_AR;
          else if (cmd == CMD_IO_WRITE) state <= PCI_WRITE;
          else if (frame_n)             state <= PCI_IDLE;
        end
        PCI_TURN_AR: state <= PCI_READ;
        PCI_READ, PCI_RD_DTA: begin
          if (!rd_open)  state <= PCI_IDLE;          // Rd_dta after the last phase
          else if (term) state <= PCI_STOP;
          else if (!irdy_n && rd_ack) begin
            last  <= frame_n;
            state <= PCI_RD_DTA;
          end else state <= PCI_READ;
        end
        PCI_WRITE, PCI_WR_DTA: begin
          if (!wr_open)  state <= PCI_IDLE;          // Wr_dta after the last phase
          else if (term) state <= PCI_STOP;
          else if (!irdy_n) begin
            dat_o   <= be_mask(ad_i, cbe_n);
            exp_par <= ^{ad_i, cbe_n};
            chk_par <= 1'b1;
            last    <= frame_n;
            state   <= PCI_WR_DTA;
          end else state <= PCI_WRITE;
        end
        PCI_STOP: if (frame_n) state <= PCI_IDLE;
        default: state <= PCI_IDLE;
      endcase
    end
  end

  // TRDY# and STOP# are never driven without DEVSEL#.
  a_trdy_devsel: assert property (@(posedge clk) disable iff (!rst_n)
                                  !trdy_n |-> !devsel_n);
  a_stop_devsel: assert property (@(posedge clk) disable iff (!rst_n)
                                  !stop_n |-> !devsel_n);
  // The target never drives AD during a write.
  a_no_drive_wr: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_open |-> !ad_oe);

endmodule
