// tb_test_ckt_if: self-checking test of the test-circuit parallel IO.
//
// Writes with and without the grant are applied; the control bits must
// take the data of granted writes only, hold between writes, and enable
// must rise with the first load. Uses the data values of the simulated
// example (8798acfd, ab6df89e, 38ad9ef8) and random words.
module tb_test_ckt_if;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = !clk;

  logic        grant = 0, wr = 0, enable;
  logic [31:0] dat_i = '0, ctrl;

  test_ckt_if dut (.clk, .rst_n, .grant_tst_ckt(grant), .wr, .dat_i, .ctrl_bits_tst_ckt(ctrl), .enable);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lwrite(input bit g, input logic [31:0] d);
    @(posedge clk); #1;
    grant = g; dat_i = d; wr = 1;
    @(posedge clk); #1;
    wr = 0; dat_i = ~d;
  endtask

  initial begin
    logic [31:0] exp_v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(ctrl == 0 && !enable, "reset state");
    lwrite(0, 32'h1234_5678);
    check(ctrl == 0 && !enable, "no load without grant");
    lwrite(1, 32'h8798_acfd);
    check(ctrl == 32'h8798_acfd && enable, "first load");
    lwrite(1, 32'hab6d_f89e);
    check(ctrl == 32'hab6d_f89e, "second load");
    lwrite(0, 32'h38ad_9ef8);
    check(ctrl == 32'hab6d_f89e, "held without grant");
    lwrite(1, 32'h38ad_9ef8);
    check(ctrl == 32'h38ad_9ef8, "third load");
    exp_v = ctrl;
    for (int k = 0; k < 20; k++) begin
      automatic logic [31:0] d = $urandom;
      automatic bit g = 1'($urandom);
      lwrite(g, d);
      if (g) exp_v = d;
      check(ctrl == exp_v, $sformatf("random %0d", k));
    end
    repeat (5) @(posedge clk); #1;
    check(ctrl == exp_v, "holds between writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
