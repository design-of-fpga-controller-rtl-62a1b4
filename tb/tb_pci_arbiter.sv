// tb_pci_arbiter: self-checking test of the fairness-rotation arbiter.
//
// Bus masters are modelled in the testbench: whichever device holds the
// grant runs one short transaction (FRAME# one clock, IRDY# one clock).
// The order of grants is compared with a reference round-robin model
// written here, for fixed request patterns, for a change of requests,
// for a return to idle (search restarts at device 0) and for a device
// that withdraws its request before using its grant.
module tb_pci_arbiter;
  localparam int N = 7;
  logic         clk = 0, rst_n = 0;
  logic [N-1:0] req_n = '1, gnt_n;
  logic         frame_n = 1, irdy_n = 1;
  int           checks = 0, failures = 0;

  always #5 clk = !clk;

  pci_arbiter #(.N(N)) dut (.clk, .rst_n, .req_n, .frame_n, .irdy_n, .gnt_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int owner_of(input logic [N-1:0] g);
    for (int i = 0; i < N; i++) if (!g[i]) return i;
    return -1;
  endfunction

  function automatic int next_rr(input logic [N-1:0] rq_n, input int last);
    for (int k = 1; k <= N; k++) if (!rq_n[(last + k) % N]) return (last + k) % N;
    return -1;
  endfunction

  // Wait for a grant, run one transaction, return the owner.
  task automatic one_transaction(output int who);
    int t = 0;
    who = -1;
    while (owner_of(gnt_n) < 0 && t < 20) begin @(posedge clk); #1; t++; end
    who = owner_of(gnt_n);
    frame_n = 0;
    @(posedge clk); #1;
    frame_n = 1; irdy_n = 0;
    @(posedge clk); #1;
    irdy_n = 1;
    @(posedge clk); #1;   // grant moves on this edge
  endtask

  initial begin
    int who, exp_who;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(gnt_n == '1, "no grant without requests");

    // devices 0,1,2 request (pattern 1111000): 0,1,2,0,1,2
    req_n = 7'b1111000;
    exp_who = 0;
    for (int k = 0; k < 6; k++) begin
      one_transaction(who);
      check(who == exp_who, $sformatf("grant %0d: got %0d expected %0d", k, who, exp_who));
      exp_who = next_rr(req_n, exp_who);
    end

    // requests change to device 3 only (pattern 1110111)
    req_n = 7'b1110111;
    repeat (2) @(posedge clk); #1;   // device 0 drops its unused grant
    one_transaction(who);
    check(who == 3, $sformatf("device 3 after request change, got %0d", who));

    // devices 1, 4, 6 with the rotation continuing from device 3
    req_n = 7'b0101101;
    repeat (2) @(posedge clk); #1;   // device 3 drops its unused grant
    exp_who = next_rr(req_n, 3);
    for (int k = 0; k < 6; k++) begin
      one_transaction(who);
      check(who == exp_who, $sformatf("rotation %0d: got %0d expected %0d", k, who, exp_who));
      exp_who = next_rr(req_n, exp_who);
    end

    // back to idle, then 2 and 5 request: first grant is 2 (search from 0)
    req_n = '1;
    repeat (3) @(posedge clk); #1;
    check(gnt_n == '1, "idle: no grant");
    req_n = 7'b1011011;
    one_transaction(who);
    check(who == 2, $sformatf("after idle search starts at device 0, got %0d", who));
    one_transaction(who);
    check(who == 5, $sformatf("then device 5, got %0d", who));

    // withdrawn request: device 2 is granted, withdraws, grant goes to 5
    req_n = 7'b1011011;
    while (owner_of(gnt_n) != 2) begin @(posedge clk); #1; end
    req_n = 7'b1011111;
    @(posedge clk); #1; @(posedge clk); #1;
    check(owner_of(gnt_n) == 5, $sformatf("grant moves after withdrawal, got %0d", owner_of(gnt_n)));

    // the grant is held while a transaction runs
    req_n = 7'b1011011;
    while (owner_of(gnt_n) != 5) begin @(posedge clk); #1; end
    frame_n = 0;
    repeat (4) begin @(posedge clk); #1; check(owner_of(gnt_n) == 5, "grant held during transaction"); end
    frame_n = 1; irdy_n = 0;
    @(posedge clk); #1; irdy_n = 1;
    @(posedge clk); #1;
    check(owner_of(gnt_n) == 2, $sformatf("grant moves one clock after bus idle, got %0d", owner_of(gnt_n)));

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
