// pci_arbiter: bus arbiter with fairness rotation for the controller's
// seven bus devices (TDC, DDS, APMU, DPMU, ADC, test circuit, USB).
//
// Requests (req_n) and grants (gnt_n) are active low, one bit per device.
// Leaving the idle state, the arbiter searches for a requester starting at
// device 0. A grant is held until the owner has run one transaction: FRAME#
// seen low and afterwards FRAME# and IRDY# both high again (bus idle). A
// granted device that withdraws its request before starting loses the
// grant. Each time a grant ends, the search for the next owner starts at
// the device after the previous owner (Device0 -> Device1 -> ... ->
// Device6 -> Device0), so with several requests pending each is served
// once per round. With no request pending the arbiter is idle, no grant
// is given, and the next search again starts at device 0. The grant moves
// on the clock edge after the transaction ends.
//
// From the document: the device count, the rotation order and starting at
// device 0 from idle. This design's choices: the end-of-transaction rule
// and the handling of withdrawn requests.
module pci_arbiter
  import fpga_ctrl_pkg::*;
#(
  parameter int unsigned N = N_DEV
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_n,
  input  logic         frame_n,
  input  logic         irdy_n,
  output logic [N-1:0] gnt_n
);

  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;

  logic         granted;
  logic         started;
  logic [W-1:0] owner;

  // First requester at or after position `from`, searching circularly.
  function automatic logic [W-1:0] pick(input logic [N-1:0] req,
                                        input logic [W-1:0] from);
    logic [W-1:0] r;
    int unsigned  idx;
    r = from;
    for (int i = N - 1; i >= 0; i--) begin
      idx = (int'(from) + i) % N;
      if (req[idx]) r = W'(idx);
    end
    return r;
  endfunction

  logic [N-1:0] req;
  logic [W-1:0] after_owner;
  logic         done;
  assign req         = ~req_n;
  assign after_owner = (int'(owner) == N - 1) ? '0 : owner + 1'b1;
  assign done        = granted && ((started && frame_n && irdy_n) ||
                                   (!started && frame_n && req_n[owner]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      granted <= 1'b0;
      started <= 1'b0;
      owner   <= '0;
    end else if (!granted) begin
      if (|req) begin
        owner   <= pick(req, '0);
        granted <= 1'b1;
        started <= 1'b0;
      end
    end else if (done) begin
      started <= 1'b0;
      if (|req) owner <= pick(req, after_owner);
      else begin
        granted <= 1'b0;
        owner   <= '0;
      end
    end else if (!frame_n) begin
      started <= 1'b1;
    end
  end

  always_comb begin
    gnt_n = '1;
    if (granted) gnt_n[owner] = 1'b0;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0(~gnt_n));

endmodule
