// tb_pci_target: self-checking test of the PCI target.
//
// A behavioural initiator runs I/O writes and reads, single and burst
// (with and without initiator wait states, one word per clock when neither
// side waits), with byte enables, wait states from a slow local unit (rd_ack), target
// stop (term), a bad write parity and an ignored command. The local side
// is a model that counts wr strobes and serves reads from a formula of the
// address. Expected values are computed here, not taken from the target.
module tb_pci_target;
  import fpga_ctrl_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        frame_n = 1, irdy_n = 1, par_i = 0;
  logic [31:0] ad_i = '0;
  logic [3:0]  cbe_n = '1;
  logic [31:0] ad_o, adr, dat_o, dat_i;
  logic        ad_oe, trdy_n, devsel_n, stop_n, par_o, par_oe, perr_n;
  logic        rd, wr, rd_ack, term = 0;
  pci_state_e  state;
  int          checks = 0, failures = 0;
  int          ack_delay = 0, rd_cnt = 0;
  logic [31:0] wq[$];
  int          perr_seen = 0;

  always #5 clk = !clk;

  pci_target dut (.clk, .rst_n, .frame_n, .ad_i, .ad_o, .ad_oe, .cbe_n, .irdy_n,
                  .trdy_n, .devsel_n, .stop_n, .par_i, .par_o, .par_oe, .perr_n,
                  .adr, .rd, .wr, .dat_o, .dat_i, .rd_ack, .term, .state_o(state));

  // local unit model: rd_cnt counts the clocks of the open read data phase
  int          wr_b2b = 0, rd_b2b = 0;
  assign dat_i  = adr ^ 32'h5a5a_0000 ^ 32'(rd_cnt);
  assign rd_ack = rd && (rd_cnt >= ack_delay);
  always @(posedge clk) begin
    if (rd && !(!irdy_n && !trdy_n)) rd_cnt <= rd_cnt + 1; else rd_cnt <= 0;
    // data phases completing in the clock right after the previous one
    if (state == PCI_WR_DTA && !irdy_n && !trdy_n) wr_b2b <= wr_b2b + 1;
    if (state == PCI_RD_DTA && !irdy_n && !trdy_n) rd_b2b <= rd_b2b + 1;
    if (wr) wq.push_back(dat_o);
    if (rst_n && !perr_n) perr_seen <= perr_seen + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] mask(input logic [31:0] d, input logic [3:0] be);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = be[i] ? 8'h00 : d[8*i +: 8];
    return r;
  endfunction

  // I/O write burst; returns the number of clocks from FRAME# to first TRDY#
  task automatic io_write(input logic [31:0] a, input logic [31:0] d[], input logic [3:0] be[],
                          input logic [3:0] cmd, input bit bad_par, output int lat, output bit stopped);
    int n = d.size();
    int t0;
    stopped = 0; lat = -1;
    @(posedge clk); #1;
    frame_n = 0; ad_i = a; cbe_n = cmd; t0 = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      par_i = ^{ad_i, cbe_n};            // parity of the previous phase
      if (i == 0) t0 = 1;
      ad_i = d[i]; cbe_n = be[i]; irdy_n = 0;
      if (i == n - 1) frame_n = 1;
      forever begin
        @(negedge clk);
        if (!trdy_n || !stop_n || (cmd != CMD_IO_WRITE && t0 > 6)) break;
        t0++;
      end
      if (lat < 0) lat = t0;
      if (!stop_n) begin stopped = 1; frame_n = 1; break; end
      if (cmd != CMD_IO_WRITE) break;
    end
    @(posedge clk); #1;
    par_i = ^{ad_i, cbe_n} ^ bad_par;
    irdy_n = 1; frame_n = 1; cbe_n = '1; ad_i = '0;
    @(posedge clk); #1;
    par_i = 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic io_read(input logic [31:0] a, input int n, output logic [31:0] got[$], output int lat);
    int t0 = 0;
    logic [31:0] v;
    lat = -1;
    @(posedge clk); #1;
    frame_n = 0; ad_i = a; cbe_n = CMD_IO_READ;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      cbe_n = 4'b0000; irdy_n = 0; ad_i = '0;
      if (i == 0) t0 = 1;
      if (i == n - 1) frame_n = 1;
      forever begin
        @(negedge clk);
        if (!trdy_n) break;
        t0++;
        if (t0 > 50) break;
      end
      if (lat < 0) lat = t0;
      check(ad_oe, "target drives AD in read data phase");
      v = ad_o;
      got.push_back(v);
      @(posedge clk); #1;
      irdy_n = 1;
      @(negedge clk);
      check(par_oe && par_o == ^{v, 4'b0000}, "read parity one clock after data");
    end
    frame_n = 1; cbe_n = '1;
    repeat (3) @(posedge clk);
  endtask

  // burst read with IRDY# held low throughout; parity checked per word
  task automatic io_read_fast(input logic [31:0] a, input int n, output logic [31:0] got[$]);
    int t = 0;
    logic [31:0] v;
    bit have = 0;
    @(posedge clk); #1;
    frame_n = 0; ad_i = a; cbe_n = CMD_IO_READ;
    @(posedge clk); #1;
    cbe_n = 4'b0000; irdy_n = 0; ad_i = '0;
    if (n == 1) frame_n = 1;
    while (got.size() < n && t < 100) begin
      @(negedge clk);
      if (have) check(par_oe && par_o == ^{v, 4'b0000}, "burst read parity");
      have = 0;
      if (!trdy_n) begin
        v = ad_o; got.push_back(v); have = 1;
      end
      @(posedge clk); #1;
      if (got.size() == n - 1) frame_n = 1;
      t++;
    end
    irdy_n = 1; cbe_n = '1;
    @(negedge clk);
    if (have) check(par_oe && par_o == ^{v, 4'b0000}, "burst read parity");
    repeat (3) @(posedge clk);
    check(ad_oe == 0 && devsel_n, "bus released after burst read");
  endtask

  initial begin
    int lat;
    bit st;
    logic [31:0] got[$];
    logic [31:0] d[];
    logic [3:0]  be[];
    repeat (3) @(posedge clk);
    rst_n = 1;

    // single write, all bytes
    d = '{32'h8744_cbcf}; be = '{4'b0000};
    io_write(32'h0000_0010, d, be, CMD_IO_WRITE, 0, lat, st);
    check(wq.size() == 1 && wq[0] == 32'h8744_cbcf, "single write data");
    check(lat == 2, $sformatf("write TRDY# two clocks after FRAME# (got %0d)", lat));
    check(adr == 32'h10, "address latched");
    wq.delete();

    // burst write with byte enables
    d = '{32'hfe56_7842, 32'h00a8_9676, 32'h0000_d97a, 32'h1122_3344};
    be = '{4'b1110, 4'b1000, 4'b1100, 4'b0101};
    io_write(32'h0000_0020, d, be, CMD_IO_WRITE, 0, lat, st);
    check(wq.size() == 4, $sformatf("burst write gives 4 strobes (got %0d)", wq.size()));
    for (int i = 0; i < 4 && i < wq.size(); i++)
      check(wq[i] == mask(d[i], be[i]), $sformatf("burst word %0d masked: %h", i, wq[i]));
    check(perr_seen == 0, "no parity error on good parity");
    check(wr_b2b == 3, $sformatf("burst write one word per clock (%0d)", wr_b2b));
    wq.delete();

    // bad parity -> PERR#
    d = '{32'h1234_5678}; be = '{4'b0000};
    io_write(32'h0000_0030, d, be, CMD_IO_WRITE, 1, lat, st);
    check(perr_seen == 1, $sformatf("PERR# on bad parity (%0d)", perr_seen));
    wq.delete();

    // burst read with no waits on either side: one word per clock
    ack_delay = 0;
    io_read_fast(32'h0000_0400, 4, got);
    check(got.size() == 4, "fast burst read 4 words");
    foreach (got[i]) check(got[i] == (32'h400 ^ 32'h5a5a_0000), $sformatf("fast burst word %0d %h", i, got[i]));
    check(rd_b2b == 3, $sformatf("burst read one word per clock (%0d)", rd_b2b));
    got.delete();

    // memory write is not claimed
    io_write(32'h0000_0040, d, be, CMD_MEM_WRITE, 0, lat, st);
    check(wq.size() == 0, "memory write ignored");
    check(state == PCI_IDLE, "back to idle after ignored command");

    // term -> STOP#
    term = 1;
    io_write(32'h0000_0050, d, be, CMD_IO_WRITE, 0, lat, st);
    term = 0;
    check(st, "STOP# when term");
    check(wq.size() == 0, "no write strobe when stopped");
    check(state == PCI_IDLE, "idle after stop");

    // single read, no wait: turnaround makes TRDY# come 3 clocks after FRAME#
    ack_delay = 0;
    io_read(32'h0000_0100, 1, got, lat);
    check(got[0] == (32'h100 ^ 32'h5a5a_0000 ^ 32'd0), $sformatf("read data %h", got[0]));
    check(lat == 3, $sformatf("read TRDY# three clocks after FRAME# (got %0d)", lat));
    got.delete();

    // read with 4 wait states from the unit
    ack_delay = 4;
    io_read(32'h0000_0200, 1, got, lat);
    check(got[0] == (32'h200 ^ 32'h5a5a_0000 ^ 32'd4), $sformatf("slow read data %h", got[0]));
    check(lat == 7, $sformatf("slow read latency 7 (got %0d)", lat));
    got.delete();

    // burst read of 3
    ack_delay = 1;
    io_read(32'h0000_0300, 3, got, lat);
    check(got.size() == 3, "burst read 3 words");
    foreach (got[i]) check(got[i] == (32'h300 ^ 32'h5a5a_0000 ^ 32'd1), $sformatf("burst read %0d", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
