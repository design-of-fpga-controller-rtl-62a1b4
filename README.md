# FPGA controller for a PC-based linear and mixed-signal tester

A PC controls a rack of analog and mixed-signal test hardware through one
FPGA on a PCI card. The FPGA is a 32-bit, 33 MHz PCI target. Behind it sit
the chips of the "family board" that drive and measure the device under
test:

- a time-to-digital converter (acam TDC-GPX) on a parallel bus;
- a direct digital synthesizer (AD9851) loaded in parallel;
- two parametric measurement units on SPI: an analog PMU (AD5522, 29-bit
  words) and a digital pin-electronics PMU (ADATE318, 27-bit words);
- a 12-bit ADC (AD7870) read in parallel;
- 32 relay-control bits for the test circuit;
- a full-speed USB 1.1 link to a DSP board.

The central idea is simple routing. Each of the seven units has its own
request/grant pair on a fairness-rotation arbiter. Before the PC touches a
unit it requests the bus for that unit. The grant does two jobs: it gives
the PC the bus, and it connects the PCI target's local side to that unit.
So the design has no address decoder. The PCI address is left free for
each unit to use as a sub-address (the SPI units use it to pick a slave
and a direction, the TDC uses it as a register number).

All RTL is SystemVerilog in `rtl/`, one module or package per file. Each
file opens with a comment giving its interface and timing. Testbenches and
behavioural models of the external chips are in `tb/`.

## Block map

| Device | Unit | Modules | Pins |
|---|---|---|---|
| – | PCI target | `pci_target` | FRAME#, AD[31:0], C/BE#[3:0], IRDY#, TRDY#, DEVSEL#, STOP#, PAR, PERR# |
| – | arbiter | `pci_arbiter` | REQ#[6:0], GNT#[6:0] |
| 0 | TDC | `pci_tdc` | ADR[3:0], DATA[27:0], CSN, WRN, RDN |
| 1 | DDS | `pci_dds` | D[7:0], W_CLK, FQ_UD |
| 2 | APMU | `pci_spi` + `spi_master` (N=29) | SCLK, MOSI, MISO, CS#[7:0] |
| 3 | DPMU | `pci_spi` + `spi_master` (N=27) | SCLK, MOSI, MISO, CS#[7:0] |
| 4 | ADC | `pci_adc` | CONVST, CS, RD, INT, DATA[11:0] |
| 5 | test circuit | `test_ckt_if` | 32 control bits, enable |
| 6 | USB | `pci_usb` + `usb_controller` (`usb_nrzi_rx`, `usb_nrzi_tx`) | D+/D- receive and transmit |

The top module is `fpga_controller`. It brings the PCI bus out as split
in/out/enable signals. It also brings out the pins of every chip above,
because the chips themselves are outside the FPGA. Shared constants are in
`fpga_ctrl_pkg` and `usb_pkg`. The USB package holds the PIDs and the CRC
functions.

## The local side: how a PCI transfer reaches a unit

`pci_target` turns bus cycles into a small handshake. The top
multiplexes this handshake by the grant:

- **Write.** Each completed write data phase gives a one-clock `wr` strobe
  with the data on `dat_o`. Bytes whose C/BE# bit is high read as zero.
- **Read.** `rd` is high while a read data phase is open, and the unit
  drives `dat_i`. TRDY# is only asserted while the unit raises `rd_ack`.
  A slow unit (TDC, ADC, an SPI read) therefore holds the PC in wait
  states until its data is ready.
- **Refusal.** A unit that cannot take a write raises `term`. The target
  then asserts STOP# in place of TRDY#, and the transaction ends without
  moving data. A unit raises `term` in the same clock as the write strobe
  that makes it busy, so the next word of a burst is stopped, not lost.
- **No grant.** With no grant, the local side reads zero and ignores
  writes.

A transaction ended by STOP# also ends the arbiter's grant. The PC must
request the bus again and resume with the word that was refused. The
end-to-end testbench does exactly this, and checks that a two-word SPI
burst arrives whole.

## PCI target state machine

The states are Idle, Adr, Turn_ar, Read, Rd_dta, Write, Wr_dta and Stop.

- **Address phase.** FRAME# falling in Idle latches the address and
  command, and the machine enters Adr.
- **Command.** An I/O read (0010) goes through the one-clock turnaround
  Turn_ar into Read. An I/O write (0011) goes straight to Write. Any other
  command is not claimed; Adr waits for FRAME# to rise and returns to
  Idle.
- **Data phases.** A data phase completes on a clock edge where IRDY# and
  TRDY# are both low, and the machine moves to Rd_dta or Wr_dta. If FRAME#
  was high in that phase it was the last one, and the machine returns to
  Idle.
- **Bursts.** Otherwise TRDY# stays asserted in Rd_dta/Wr_dta and the
  next phase can complete at once. A burst therefore moves one 32-bit word
  per clock (133 MB/s at 33 MHz) as long as neither side waits. If the
  initiator inserts a wait, the machine falls back to Read or Write.
- **Stop.** If `term` is raised in any open data phase, STOP# is driven.
  The machine then sits in Stop until FRAME# is released.

Latency: TRDY# comes two clocks after FRAME# on a write and three clocks
after on a read (because of the turnaround), when the unit is ready.

Parity follows the PCI rule. `par_o` is driven one clock after each read
data phase. On writes, PAR is checked one clock after the data, and
PERR# pulses low on a mismatch.

There is no configuration space and no address decode. Every I/O cycle on
the bus is claimed. The card is assumed to be the only I/O target that
the PC addresses while it holds a grant.

## Arbiter

`pci_arbiter` takes seven active-low requests and gives at most one
active-low grant.

- From idle, the search starts at device 0 (the TDC).
- Each later search starts at the device after the last owner, so
  pending requests are served in the order 0, 1, ..., 6, 0, ...
- A grant lasts for one transaction: FRAME# seen low, then FRAME# and
  IRDY# both high.
- A grant also ends when its owner withdraws the request before starting.

The next grant is given on the clock after the bus goes idle. Arbitration
is not hidden behind the current transaction.

## Unit register conventions

| Unit | Write | Read |
|---|---|---|
| TDC | data[3:0] = ADR, data[31:4] = DATA; runs one TDC write cycle (CSN low, then WRN low for `TDC_STROBE` clocks, then WRN high, then CSN high) | a TDC read cycle at ADR = PCI address[3:0]; the PC waits until the word is read; returns {4'b0, DATA} |
| DDS | first write: bytes W0..W3 in data[31:24]..[7:0]; second write: W4 in data[7:0] | – (reads 0) |
| APMU / DPMU | data[N-1:0] = SPI word; PCI address[4:2] = slave (chip select 0..7); address[5] = 1 for a read, 0 for a write | last received SPI word, zero-extended; waits while a transfer runs |
| ADC | data[0] = 1 starts a conversion | last 12-bit result, zero-extended; waits while a conversion runs |
| test circuit | 32 control bits; `enable` rises with the first load | current control bits |
| USB | data[7:0] = byte for the next IN transaction | [7:0] last byte received in an OUT transaction, [8] new byte since the last read, [9] transmit byte still waiting, [15:12] its endpoint |

**DDS.** From the clock that takes the second write, `pci_dds` sends W0
to W4 on D[7:0], one byte per clock. W_CLK rises at the falling edge of
the clock, in the middle of each byte, and falls at the next rising edge.
The chip latches on the rising edge, so it gets half a clock of setup and
half a clock of hold. W_CLK is the XOR of a falling-edge flip-flop (which
toggles while a byte is out) and a rising-edge copy of it. Only one input
changes at a time, so the output cannot glitch. After W4, FQ_UD is high
for one clock. The unit refuses writes from the second strobe until the
update pulse is over, which is 6 clocks.

**SPI.** An SPI read is two PCI operations. First, a write with
address[5] = 1 starts the serial transfer. Then a PCI read collects the
word; it is held in wait states until the transfer is done.

`spi_master` has the states Idle, Ready, Read and Write. Words go MSB
first. On a write, MOSI changes after the falling SCLK edge, and the slave
samples it on the rising edge. On a read, MOSI is released and MISO is
sampled on the falling edge. SCLK idles low, with `SPI_HALF` clocks per
half period.

**ADC.** `pci_adc` pulses CONVST low; the rising edge starts the
conversion. It then waits for INT low and drives CS and RD low together
with CONVST high. It captures the data as they rise.

## USB link

The DSP board talks to the controller over full-speed USB (12 Mb/s). The
controller plays the device role: the DSP side is the host.

**Line coding.** `usb_nrzi_tx` and `usb_nrzi_rx` handle the bit level:
- SYNC is K J K J K J K K.
- The packet bits go LSB first.
- NRZI: a 0 is a change of line state, a 1 is no change.
- A 0 is stuffed after six 1s.
- EOP is SE0, SE0, J.

D+ and D- pass through two-flop synchronisers before the receiver uses
them. The receiver recovers the bit phase from the transitions of the
data. It counts the bits between SYNC and EOP. The count (8, 24 or 32)
tells a handshake from a token or a one-byte data packet.

**Transactions.** `usb_controller` runs the transaction state machine:
- **Tokens.** Only IN and OUT tokens with a good PID check and a good
  CRC5 are accepted (polynomial x^5+x^2+1, register starts at all ones,
  complement sent). Anything else is dropped, and the machine waits for
  the next token.
- **OUT.** It expects a DATA0/DATA1 packet. With a good CRC16
  (x^16+x^15+x^2+1), it stores the byte and answers ACK. With a bad CRC16
  it answers NAK.
- **IN with a byte waiting.** It sends a DATA packet. The host's ACK
  consumes the byte and flips the DATA0/DATA1 toggle. A NAK, any other
  packet, or silence for `TIMEOUT` bit times keeps the byte for a retry.
- **IN with nothing waiting.** It sends nothing.

**Clocks.** The USB controller runs from its own 60 MHz clock `clk_usb`,
at five clocks per bit. `pci_usb` crosses between the two clocks with
toggle handshakes through two-flop synchronisers. A transmit byte is held
stable while it waits. A received byte is copied into holding registers
before its toggle is sent across.

## Clocks, reset, parameters

- `clk` is the PCI clock. Everything runs from it except the USB
  controller, which uses `clk_usb` (60 MHz).
- `rst_n` is an asynchronous active-low reset for both clock domains.
  Release it synchronously to each clock on the board.

| Parameter (top) | Default | Meaning |
|---|---|---|
| `SPI_HALF` | 1 | clocks per SCLK half period (SCLK = clk/2) |
| `TDC_STROBE` | 2 | clocks WRN/RDN stay low |
| `USB_DIV` | 5 | USB clocks per bit (60 MHz / 5 = 12 Mb/s) |

Lower-level parameters: `spi_master.N` (word length), the `pci_adc` pulse
lengths `CONV_LOW` and `RD_CYC`, and `usb_controller.TIMEOUT`.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog. With Verilator
5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/fpga_ctrl_pkg.sv rtl/usb_pkg.sv \
  tb/tb_fpga_controller.sv --top-module tb_fpga_controller --Mdir obj
./obj/Vtb_fpga_controller
```

To run another testbench, replace `tb_fpga_controller` by its name. The
testbenches are:

| Testbench | Covers |
|---|---|
| `tb_fpga_controller` | Whole controller at default parameters, 33 MHz PCI and 60 MHz USB clocks, with models of every chip. Covers relay bits, DDS load, TDC write/read, ADC conversion, an APMU write and two-word burst (stopped and resumed), a DPMU read with a write refused during it, USB OUT and IN transactions, a byte-enabled write, a parity error, and back-to-back burst reads/writes. Three units request at once to show the rotation. It counts each mechanism and fails if one never happened. |
| `tb_pci_target` | Single and burst reads/writes, byte enables, wait states, one-word-per-clock bursts, STOP#, parity, ignored commands, latencies |
| `tb_pci_arbiter` | Start at device 0, rotation order, end of grant, withdrawn requests |
| `tb_spi_master` | Both word lengths, all chip selects, edges, MSB-first order |
| `tb_pci_spi`, `tb_pci_dds`, `tb_pci_tdc`, `tb_pci_adc`, `tb_test_ckt_if`, `tb_pci_usb` | One unit each, against a model of its chip |
| `tb_usb_nrzi` | Transmitter into receiver: SYNC/EOP, NRZI, stuffing at the six-ones boundary |
| `tb_usb_controller` | A host model runs OUT/IN transactions, bad PIDs and CRCs, NAK and timeout retries |

The models in `tb/`: `spi_slave_model` is a generic N-bit SPI slave.
`usb_host_model` builds tokens and data packets with their CRCs and sends
and receives NRZI packets. The TDC, DDS and ADC are modelled inline in
the testbenches that use them.

## Where this design departs from its source, and how far to trust it

The state machines of the PCI target, SPI master and USB controller follow
published state diagrams. So do the arbiter's rotation, the chip pin sets,
the bit orders and the packet formats. The following are this design's own
choices:

- **Routing and registers.** Routing by grant, the local-side handshake
  (`rd_ack`, `term`) and every register layout in the table above.
- **Burst states.** The stay in Rd_dta/Wr_dta during a burst, and the
  return to Read/Write on an initiator wait. Without them a burst would
  need two clocks per word and could not reach 133 MB/s.
- **DDS timing.** Where W_CLK rises inside each clock, and how it is
  generated, are this design's choice. The bytes are sent only after the
  second PCI word has arrived.
- **DDS byte count.** The source gives the byte count once as five and
  once as eight. Five (40 bits / 8) is used.
- **Arbiter size.** The source gives the number of arbitrated devices
  once as seven and once as five. Seven is used, one per unit.
- **Byte enables.** An example in the source reads as if C/BE#[3] low
  selects the last byte. Its simulated waveform shows standard PCI
  behaviour (C/BE#[i] low enables byte i), which is what is built.
- **Not built.** The PCI 64-bit extension, configuration cycles, memory
  cycles and hidden (overlapped) arbitration.
- **USB scope.** No device-address filtering, one data byte per packet,
  and no SOF or frame handling.

Every block has a self-checking testbench. Each testbench has been shown
to fail on a deliberately broken copy of its block. The expected values
are computed in the testbenches, not read from the design. The chip
models are written from the chips' published behaviour, not from vendor
models, so timing against real parts (setup and hold around W_CLK, TDC
strobe widths, the AD7870 conversion time) still has to be checked
against the datasheets at the target clock. A generic Yosys synthesis
finds no latches. No FPGA place-and-route or timing analysis has been
done.
