// tb_atomi_chain_workload - a longer daisy chain: six active objects on one
// bus, all asking for it at once.
//
// The chain is meant to be freely expandable with a priority fixed by the
// position on the bus. Here atomi_system is built with N_ACTIVE = 6 (the
// rest at its defaults). In each round a random subset of the six active
// objects issues a SET to the variable-table object in the same clock, each
// to its own variable. Checks:
//   * every SET completes without error;
//   * they complete in chain order, nearest the start first;
//   * no two active objects keep a grant for two clocks in a row;
//   * the table holds every value afterwards (read through its local port).
// All requests of one round are queued behind each other, so the last one
// waits for up to five transactions; the watchdog bounds the whole run.
module tb_atomi_chain_workload;
  import atomi_pkg::*;

  localparam int NA     = 6;
  localparam int ROUNDS = 12;

  logic clk_a = 0, clk_p = 0, rst_n = 0;
  always #62.5 clk_a = ~clk_a;
  initial #40 forever #125 clk_p = ~clk_p;

  logic [NA-1:0] cmd_valid = '0, cmd_ready, rsp_valid, grant_o;
  cmd_t [NA-1:0] cmd;
  rsp_t [NA-1:0] rsp;
  logic          var_we = 0, var_bus_wr, var_selected;
  logic [6:0]    var_idx = '0;
  logic [7:0]    var_wdata = '0, var_rdata;
  logic [3:0]    pa_mod_in, pb_mod_in;
  logic          pa_cs, pb_cs;
  bus_t          bus_o;
  logic [NA+2:0] ack_o;

  atomi_system #(.N_ACTIVE(NA)) dut (
    .clk_a, .clk_p, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp, .grant_o,
    .var_we, .var_idx, .var_wdata, .var_rdata, .var_bus_wr, .var_selected,
    .pa_mod_pull(4'b0000), .pa_mod_in, .pa_cs, .pb_mod_pull(4'b0000), .pb_mod_in, .pb_cs,
    .bus_o, .ack_o
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // At most one settled grant.
  logic [NA-1:0] grant_d;
  int n_multi = 0;
  always @(posedge clk_a) begin
    grant_d <= grant_o;
    if (rst_n && $countones(grant_o) > 1) n_multi++;
    if (rst_n && $countones(grant_o & grant_d) > 1) begin
      failures++; checks++;
      $display("FAIL %0t: two grants held for two clocks", $time);
    end
  end

  task automatic run(input int m, input cmd_t c, output rsp_t r);
    @(posedge clk_a); #1;
    cmd[m] = c; cmd_valid[m] = 1;
    @(posedge clk_a); #1;
    cmd_valid[m] = 0;
    while (!rsp_valid[m]) begin @(posedge clk_a); #1; end
    r = rsp[m];
  endtask

  logic [7:0] model [16];
  time        done_at [NA];
  bit         err_seen [NA];
  int         n_full = 0, n_rounds = 0;

  initial begin
    for (int i = 0; i < 16; i++) model[i] = '0;
    cmd = '0;
    #1000 rst_n = 1;
    #2000;
    for (int rnd = 0; rnd < ROUNDS; rnd++) begin
      logic [NA-1:0] who;
      logic [7:0]    v [NA];
      who = (rnd < 2) ? '1 : NA'($urandom);
      if (who == '0) who = NA'(1) << (rnd % NA);
      if (&who) n_full++;
      for (int m = 0; m < NA; m++) begin
        v[m] = 8'($urandom); done_at[m] = 0; err_seen[m] = 0;
      end
      for (int m = 0; m < NA; m++) begin
        automatic int mm = m;
        if (who[mm]) fork
          begin
            cmd_t c; rsp_t r;
            c = '0; c.sel = byte_sel(8'h21); c.op = OP_SET; c.idx = 7'(mm);
            c.wdata = {1'b0, v[mm]};
            run(mm, c, r);
            done_at[mm] = $time; err_seen[mm] = r.err;
          end
        join_none
      end
      wait fork;
      // Completion order follows chain position.
      begin
        time last; last = 0;
        for (int m = 0; m < NA; m++) if (who[m]) begin
          check(!err_seen[m], $sformatf("round %0d: SET by object %0d", rnd, m));
          check(done_at[m] > last, $sformatf("round %0d: object %0d served in chain order", rnd, m));
          last = done_at[m];
          model[m] = v[m];
        end
      end
      n_rounds++;
      #1000;
    end
    for (int i = 0; i < NA; i++) begin
      var_idx = 7'(i); #1;
      check(var_rdata == model[i], $sformatf("table entry %0d", i));
    end
    $display("rounds=%0d all_six=%0d multi_grant_clocks=%0d", n_rounds, n_full, n_multi);
    check(n_full > 0, "all six requested together");
    check(n_multi > 0, "simultaneous grants resolved by the chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
