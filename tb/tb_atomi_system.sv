// tb_atomi_system - end-to-end test of a bus with five objects, at the
// default parameters.
//
// Active objects run at 8 MHz, the variable-table object at 4 MHz, as in the
// reference system. The test plays the software of the two active objects
// through their command ports and checks:
//   * SET and GET of the variable table by 8-bit object number, against a
//     table kept here; active 0 uses variables 0-7, active 1 variables 8-15,
//     so results do not depend on which wins the bus;
//   * local writes by the table's own object, read back over the bus;
//   * PIO access to the passive objects, by one-line and by 8-bit address:
//     module pulls show up in the sampled IO lines, the master's pattern
//     shows up at the module pins;
//   * simultaneous requests: both active objects ask in the same clock, the
//     one nearer the start of the chain gets the bus first;
//   * an access to an absent object ends with the timeout error;
//   * the address is held 24 clocks (3 us) on the IO lines after ADDR falls,
//     and only one object ever holds a settled grant.
// Every mechanism is counted; one that never happened is a failure.
module tb_atomi_system;
  import atomi_pkg::*;

  localparam int NA = 2;

  logic clk_a = 0, clk_p = 0, rst_n = 0;
  always #62.5 clk_a = ~clk_a;
  initial #40 forever #125 clk_p = ~clk_p;

  logic [NA-1:0] cmd_valid = '0, cmd_ready, rsp_valid, grant_o;
  cmd_t [NA-1:0] cmd;
  rsp_t [NA-1:0] rsp;
  logic          var_we = 0, var_bus_wr, var_selected;
  logic [6:0]    var_idx = '0;
  logic [7:0]    var_wdata = '0, var_rdata;
  logic [3:0]    pa_mod_pull = '0, pa_mod_in, pb_mod_pull = '0, pb_mod_in;
  logic          pa_cs, pb_cs;
  bus_t          bus_o;
  logic [4:0]    ack_o;

  atomi_system dut (
    .clk_a, .clk_p, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp, .grant_o,
    .var_we, .var_idx, .var_wdata, .var_rdata, .var_bus_wr, .var_selected,
    .pa_mod_pull, .pa_mod_in, .pa_cs, .pb_mod_pull, .pb_mod_in, .pb_cs,
    .bus_o, .ack_o
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ------------------------------------
  int n_set = 0, n_get = 0, n_pio_line = 0, n_pio_byte = 0, n_timeout = 0;
  int n_contend = 0, n_double_grant = 0, n_chain_cut = 0, n_local = 0;
  int n_upstream_first = 0, n_hold_ok = 0, n_addr = 0;

  // Grants: a transient double grant may last one clock, never two.
  logic [NA-1:0] grant_d;
  always @(posedge clk_a) begin
    grant_d <= grant_o;
    if (rst_n && &grant_o) n_double_grant++;
    if (rst_n && &grant_o && &grant_d) begin
      failures++; checks++;
      $display("FAIL %0t: two grants held for two clocks", $time);
    end
    // Active 0 granted, bus otherwise idle: ACK behind it is grounded.
    if (grant_o[0] && bus_o.addr_n && !ack_o[1]) n_chain_cut++;
  end

  // Address hold: the pattern must stay for 24 master clocks after ADDR falls.
  always @(negedge bus_o.addr_n) begin
    logic [IO_W-1:0] p; int k;
    p = bus_o.io; k = 0;
    n_addr++;
    while (bus_o.io == p && !bus_o.addr_n) begin @(posedge clk_a); #1; k++; end
    if (k >= 24) n_hold_ok++;
    else if (!bus_o.addr_n) begin
      failures++; checks++;
      $display("FAIL %0t: address held %0d clocks", $time, k);
    end
  end

  // ---------------- command helpers ---------------------------------------
  task automatic run(input int m, input cmd_t c, output rsp_t r);
    @(posedge clk_a); #1;
    cmd[m] = c; cmd_valid[m] = 1;
    while (!cmd_ready[m]) begin @(posedge clk_a); #1; end
    @(posedge clk_a); #1;
    cmd_valid[m] = 0;
    while (!rsp_valid[m]) begin @(posedge clk_a); #1; end
    r = rsp[m];
  endtask

  function automatic cmd_t mk_var(input op_e op, input logic [7:0] obj, input logic [6:0] idx,
                                  input logic [7:0] v);
    cmd_t c;
    c = '0; c.sel = byte_sel(obj); c.op = op; c.idx = idx; c.wdata = {1'b0, v};
    return c;
  endfunction

  function automatic cmd_t mk_pio(input logic [IO_W-1:0] sel, input logic [IO_W-1:0] pat);
    cmd_t c;
    c = '0; c.sel = sel; c.op = OP_PIO; c.wdata = pat; c.pio_len = 8'd8;
    return c;
  endfunction

  logic [7:0] model [16];

  task automatic var_set(input int m, input logic [6:0] idx, input logic [7:0] v);
    rsp_t r;
    run(m, mk_var(OP_SET, 8'h21, idx, v), r);
    check(!r.err, "SET acknowledged");
    model[idx[3:0]] = v;
    n_set++;
  endtask

  task automatic var_get(input int m, input logic [6:0] idx);
    rsp_t r;
    run(m, mk_var(OP_GET, 8'h21, idx, 8'h00), r);
    check(!r.err && r.rdata[7:0] == model[idx[3:0]],
          $sformatf("GET var %0d by active %0d: %0h vs %0h", idx, m, r.rdata[7:0], model[idx[3:0]]));
    n_get++;
  endtask

  task automatic pio(input int m, input bit byte_obj, input logic [3:0] pat);
    rsp_t r; logic [IO_W-1:0] w; logic [3:0] mp, seen;
    w = {1'b1, pat, 4'hF};
    mp = byte_obj ? pb_mod_pull : pa_mod_pull;
    fork
      run(m, mk_pio(byte_obj ? byte_sel(8'h42) : line_sel(9'b000000100), w), r);
      begin
        // module pins while the switch is closed
        for (int k = 0; k < 400 && !(byte_obj ? pb_cs : pa_cs); k++) @(posedge clk_a);
        repeat (30) @(posedge clk_a);
        seen = byte_obj ? pb_mod_in : pa_mod_in;
      end
    join
    check(!r.err && r.rdata == {1'b1, pat & ~mp, 4'hF}, $sformatf("PIO sample %0h", r.rdata));
    check(seen == (pat & ~mp), "module pins see the master's pattern");
    if (byte_obj) n_pio_byte++; else n_pio_line++;
  endtask

  initial begin
    rsp_t r0, r1; time t0, t1;
    for (int i = 0; i < 16; i++) model[i] = '0;
    cmd = '0;
    #1000 rst_n = 1;
    #2000;

    // Directed: one of each.
    var_set(0, 7'd3, 8'h5A);
    var_idx = 7'd3; #1;
    check(var_rdata == 8'h5A, "SET reached the table");
    var_get(0, 7'd3);
    var_set(1, 7'd9, 8'hA7);
    var_get(1, 7'd9);

    // Local write by the table's own object.
    @(posedge clk_p); #1;
    var_we = 1; var_idx = 7'd4; var_wdata = 8'h3C;
    @(posedge clk_p); #1;
    var_we = 0; model[4] = 8'h3C; n_local++;
    var_get(1, 7'd4);

    // Passive objects.
    pa_mod_pull = 4'b0101; pb_mod_pull = 4'b0011;
    pio(0, 0, 4'b1111);
    pio(1, 1, 4'b1111);
    pio(0, 0, 4'b1010);
    pio(1, 1, 4'b0110);

    // Absent object: timeout.
    run(0, mk_var(OP_GET, 8'h55, 7'd0, 8'h00), r0);
    check(r0.err, "absent object: error");
    n_timeout++;

    // Simultaneous requests: issue both in the same clock.
    for (int k = 0; k < 8; k++) begin
      logic [7:0] v0, v1;
      v0 = 8'($urandom); v1 = 8'($urandom);
      fork
        begin run(0, mk_var(OP_SET, 8'h21, 7'(k % 8), v0), r0); t0 = $time; end
        begin run(1, mk_var(OP_SET, 8'h21, 7'(8 + k % 8), v1), r1); t1 = $time; end
      join
      model[k % 8] = v0; model[8 + k % 8] = v1;
      n_set += 2; n_contend++;
      check(!r0.err && !r1.err, "both contended SETs done");
      check(t0 < t1, "upstream object served first");
      if (t0 < t1) n_upstream_first++;
    end

    // Random traffic from both active objects at once.
    fork
      for (int i = 0; i < 60; i++) begin
        logic [6:0] idx;
        idx = 7'($urandom_range(0, 7));
        case ($urandom_range(0, 3))
          0, 1: var_set(0, idx, 8'($urandom));
          2:    var_get(0, idx);
          default: pio(0, 0, 4'($urandom));
        endcase
      end
      for (int i = 0; i < 60; i++) begin
        logic [6:0] idx;
        idx = 7'($urandom_range(8, 15));
        case ($urandom_range(0, 3))
          0, 1: var_set(1, idx, 8'($urandom));
          2:    var_get(1, idx);
          default: pio(1, 1, 4'($urandom));
        endcase
      end
    join

    // Final read-back of the whole table over the local port.
    for (int i = 0; i < 16; i++) begin
      var_idx = 7'(i); #1;
      check(var_rdata == model[i], $sformatf("table entry %0d", i));
    end

    $display("mechanisms: set=%0d get=%0d pio_line=%0d pio_byte=%0d timeout=%0d local=%0d",
             n_set, n_get, n_pio_line, n_pio_byte, n_timeout, n_local);
    $display("            contend=%0d upstream_first=%0d double_grant_clocks=%0d chain_cut=%0d addr=%0d hold_ok=%0d",
             n_contend, n_upstream_first, n_double_grant, n_chain_cut, n_addr, n_hold_ok);
    check(n_set > 0,  "SET happened");
    check(n_get > 0,  "GET happened");
    check(n_pio_line > 0, "one-line addressing happened");
    check(n_pio_byte > 0, "byte-addressed passive access happened");
    check(n_timeout > 0, "timeout happened");
    check(n_local > 0, "local write happened");
    check(n_contend > 0 && n_upstream_first == n_contend, "arbitration by chain position");
    check(n_double_grant > 0, "simultaneous grant resolved");
    check(n_chain_cut > 0, "ACK chain cut");
    check(n_hold_ok == n_addr && n_addr > 0, "address hold on every transaction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
