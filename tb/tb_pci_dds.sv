// tb_pci_dds: self-checking test of the PCI-to-DDS parallel-load interface.
//
// A behavioural AD9851 input register latches data[7:0] on each rising
// edge of wd_clk and copies the 40 bits on fr_up. Two 40-bit words are
// loaded, each from two local-side writes; the bytes latched, their order,
// one byte per clock (five word-clock rises spanning four clock periods),
// each rise in the middle of a clock (clk low), the single-clock fr_up
// pulse, the term (busy) flag and the total time are checked.
module tb_pci_dds;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = !clk;

  logic        gnt = 0, wr = 0, busy, wd_clk, fr_up;
  logic [31:0] dat_i = '0;
  logic [7:0]  data;

  pci_dds dut (.clk, .rst_n, .gnt, .wr, .dat_i, .busy, .wd_clk, .fr_up, .data);

  // DDS model
  logic [7:0]  bytes[$];
  logic [39:0] freg = '0;
  int          fr_len = 0, fr_pulses = 0;
  realtime     rise_t[$];
  int          rise_clk_high = 0;
  always @(posedge wd_clk) if (rst_n) begin
    bytes.push_back(data);
    rise_t.push_back($realtime);
    if (clk) rise_clk_high++;
  end
  always @(posedge clk) begin
    if (rst_n && fr_up) begin
      fr_len++;
      if (bytes.size() >= 5) freg = {bytes[0], bytes[1], bytes[2], bytes[3], bytes[4]};
    end
  end
  always @(negedge fr_up) if (rst_n) fr_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lwrite(input logic [31:0] d);
    @(posedge clk); #1;
    dat_i = d; wr = 1;
    @(posedge clk); #1;
    wr = 0;
  endtask

  task automatic load(input logic [31:0] w1, input logic [31:0] w2, output int cyc);
    int t = 0;
    bytes.delete(); rise_t.delete(); fr_len = 0;
    lwrite(w1);
    #1 check(!busy, "not busy after first word");
    @(posedge clk); #1;
    dat_i = w2; wr = 1;
    #1 check(busy, "busy during the second write strobe");
    @(posedge clk); #1;
    wr = 0;
    while (busy && t < 100) begin @(posedge clk); #1; t++; end
    cyc = t;
  endtask

  initial begin
    int cyc, base;
    repeat (3) @(posedge clk);
    rst_n = 1; gnt = 1;
    @(posedge clk);
    base = fr_pulses;

    load(32'habcd_1234, 32'h0000_0042, cyc);
    check(bytes.size() == 5, $sformatf("5 word clocks (got %0d)", bytes.size()));
    check(freg == 40'hab_cd12_3442, $sformatf("DDS register %h", freg));
    check(fr_len == 1, $sformatf("fr_up high for one clock (got %0d)", fr_len));
    check(cyc == 6, $sformatf("busy 6 clocks after the second write (got %0d)", cyc));
    check(rise_t.size() == 5 && rise_t[4] - rise_t[0] == 40.0,
          $sformatf("five bytes in five clocks (span %0t)", rise_t[rise_t.size()-1] - rise_t[0]));
    check(rise_clk_high == 0, "word clock rises in the middle of the clock");

    load(32'h4567_abcf, 32'h0000_006a, cyc);
    check(freg == 40'h45_67ab_cf6a, $sformatf("DDS register %h", freg));
    check(fr_pulses - base == 2, "two frequency updates");

    // a write while busy is refused by the PCI core (term); here: not granted
    gnt = 0;
    lwrite(32'h1111_1111); lwrite(32'h2222_2222);
    repeat (15) @(posedge clk);
    check(fr_pulses - base == 2, "ungranted writes ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
