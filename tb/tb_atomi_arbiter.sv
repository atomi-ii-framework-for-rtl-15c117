// tb_atomi_arbiter - self-checking test of the reservation/arbitration logic.
//
// Two arbiters are wired as neighbours on a chain: A first, B behind it. SET
// is the wired-AND of the testbench's own SET drive and both arbiters' SET
// pulls; B's ACK input is grounded while A cuts the chain. The test checks
//   * a lone request is granted one clock after the bus is free, and not
//     while ADDR, SET or ACK is low;
//   * the grant holds although the arbiter's own SET pull makes SET low;
//   * lowering ADDR ends the grant, and BUS_REQ driven low ends it;
//   * simultaneous requests: both may show a grant for one clock, then only
//     the upstream object A keeps it (geographical priority);
//   * a random phase compares every output each clock with a reference model.
module tb_atomi_arbiter;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_a, req_b, addr_n, set_tb_n, ack_tb_n;
  logic grant_a, grant_b, set_pull_a, set_pull_b, cut_a, cut_b;
  logic set_n, ack_b_n;

  assign set_n   = set_tb_n & ~set_pull_a & ~set_pull_b;
  assign ack_b_n = ack_tb_n & ~cut_a;

  atomi_arbiter u_a (.clk, .rst_n, .req(req_a), .addr_n, .set_n, .ack_in_n(ack_tb_n),
                     .grant(grant_a), .set_pull(set_pull_a), .ack_cut(cut_a));
  atomi_arbiter u_b (.clk, .rst_n, .req(req_b), .addr_n, .set_n, .ack_in_n(ack_b_n),
                     .grant(grant_b), .set_pull(set_pull_b), .ack_cut(cut_b));

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s (ga=%b gb=%b)", $time, what, grant_a, grant_b);
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Reference: grant' = req & ADDR & ACK & (SET or own grant)
  logic ref_a, ref_b;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_a = 0; req_b = 0; addr_n = 1; set_tb_n = 1; ack_tb_n = 1;
    tick(2); rst_n = 1; tick();
    check(!grant_a && !grant_b, "no grant after reset");

    // Lone request on a free bus.
    req_a = 1; tick();
    check(grant_a && set_pull_a && cut_a, "A granted one clock after request");
    check(set_n == 0 && ack_b_n == 0, "SET pulled low, B's ACK grounded");
    tick(3);
    check(grant_a, "grant holds against own SET pull");
    // Another requester cannot win while A holds.
    req_b = 1; tick(3);
    check(!grant_b, "B refused while A holds the bus");
    // A starts its transaction: ADDR low ends the grant, bus stays reserved.
    addr_n = 0; tick(); tick();
    check(!grant_a && !grant_b, "ADDR low ends grant, no one else granted");
    req_a = 0; addr_n = 1; tick(); tick();
    check(grant_b && !grant_a, "B granted after A released the bus");
    req_b = 0; tick();
    check(!grant_b, "BUS_REQ driven low ends the grant");

    // Busy bus: each control line low blocks a grant.
    req_a = 1;
    set_tb_n = 0; tick(2); check(!grant_a, "SET low blocks"); set_tb_n = 1;
    addr_n = 0; tick(2); check(!grant_a, "ADDR low blocks"); addr_n = 1;
    ack_tb_n = 0; tick(2); check(!grant_a, "ACK low blocks");
    req_a = 0; ack_tb_n = 1; tick(2);

    // Simultaneous requests: upstream wins.
    req_a = 1; req_b = 1; tick();
    check(grant_a, "A granted in the first clock");
    tick();
    check(grant_a && !grant_b, "only A keeps the grant after the chain settles");
    tick(3);
    check(grant_a && !grant_b, "A still alone");
    req_a = 0; req_b = 0; tick(2);

    // Random phase against a reference model.
    ref_a = grant_a; ref_b = grant_b;
    for (int i = 0; i < 3000; i++) begin
      logic nra, nrb, ns, nab;
      req_a    = $urandom_range(0, 3) != 0;
      req_b    = $urandom_range(0, 3) != 0;
      addr_n   = $urandom_range(0, 5) != 0;
      set_tb_n = $urandom_range(0, 5) != 0;
      ack_tb_n = $urandom_range(0, 5) != 0;
      #1;
      ns  = set_tb_n & ~ref_a & ~ref_b;
      nab = ack_tb_n & ~ref_a;
      nra = req_a & addr_n & ack_tb_n & (ref_a | ns);
      nrb = req_b & addr_n & nab & (ref_b | ns);
      tick();
      ref_a = nra; ref_b = nrb;
      check(grant_a == ref_a && grant_b == ref_b, "random: grant matches reference");
      check(set_pull_a == grant_a && cut_a == grant_a && set_pull_b == grant_b && cut_b == grant_b,
            "random: switch outputs follow the node");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
