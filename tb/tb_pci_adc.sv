// tb_pci_adc: self-checking test of the PCI-to-ADC interface.
//
// A behavioural AD7870 starts converting on the rising edge of CONVST,
// pulls INT low CONV_CLKS clocks later, drives its 12-bit result while CS
// and RD are both low and returns INT high when they fall. The testbench
// starts conversions through local-side writes, reads the results back,
// and checks the read wait states, term during a conversion, that a write
// with bit 0 clear starts nothing, and that CONVST is high whenever CS or
// RD is low.
module tb_pci_adc;
  localparam int CONV_CLKS = 20;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = !clk;

  logic        gnt = 0, wr = 0, rd = 0;
  logic [31:0] dat_i = '0, dat_o;
  logic        rd_ack, term;
  logic        adc_convst, adc_cs, adc_rd, adc_int;
  logic [11:0] adc_data;

  pci_adc dut (.clk, .rst_n, .gnt, .wr, .rd, .dat_i, .dat_o, .rd_ack, .term,
    .adc_convst, .adc_cs, .adc_rd, .adc_int, .adc_data);

  // ADC model
  logic [11:0] sample = '0, result = '0;
  int          conv_t = -1, n_conv = 0, bad_convst = 0;
  logic        cv_q = 1;
  initial adc_int = 1;
  assign adc_data = (!adc_cs && !adc_rd) ? result : 12'h000;
  always @(posedge clk) if (rst_n) begin
    cv_q <= adc_convst;
    if (adc_convst && !cv_q) begin conv_t = 0; n_conv++; end
    else if (conv_t >= 0) begin
      conv_t++;
      if (conv_t == CONV_CLKS) begin result = sample; adc_int = 0; conv_t = -1; end
    end
    if (!adc_cs && !adc_rd) adc_int = 1;
    if ((!adc_cs || !adc_rd) && !adc_convst) bad_convst++;
  end

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

  task automatic lread(output logic [31:0] v, output int waits);
    int t = 0;
    @(posedge clk); #1;
    rd = 1;
    while (!rd_ack && t < 200) begin @(posedge clk); #1; t++; end
    v = dat_o; waits = t;
    @(posedge clk); #1;
    rd = 0;
  endtask

  initial begin
    logic [31:0] v;
    int waits, base;
    repeat (3) @(posedge clk);
    rst_n = 1; gnt = 1;
    @(posedge clk);
    base = n_conv;

    sample = 12'hace;   // 1010 1100 1110, as in the simulated example
    lwrite(32'h1);
    @(posedge clk); #1;
    check(term, "term during conversion");
    lread(v, waits);
    check(v == 32'h0000_0ace, $sformatf("result %h", v));
    check(waits > CONV_CLKS, $sformatf("read waited %0d clocks", waits));
    check(adc_int, "INT high again after read");

    // bit 0 clear: no conversion
    lwrite(32'h2);
    repeat (30) @(posedge clk); #1;
    check(n_conv - base == 1, "write with bit 0 clear starts nothing");
    lread(v, waits);
    check(v == 32'h0000_0ace && waits == 0, "result held, no wait when idle");

    for (int k = 0; k < 5; k++) begin
      sample = 12'($urandom);
      lwrite(32'h1);
      lread(v, waits);
      check(v == {20'b0, sample}, $sformatf("conversion %0d result %h", k, v));
    end
    check(n_conv - base == 6, $sformatf("6 conversions (%0d)", n_conv - base));
    check(bad_convst == 0, "CONVST high during CS/RD");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
