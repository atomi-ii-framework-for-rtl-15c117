// tb_atomi_bus_master - self-checking test of an active object's bus logic.
//
// The master runs at 8 MHz (125 ns clock). The testbench provides:
//   * the grant, from a reference of the arbitration rule, plus a spurious
//     one-clock grant that the master must not act on;
//   * a responder object written behaviourally, on its own unrelated clock,
//     that keeps a variable table and answers GET/SET with the four-phase
//     handshake, and can be switched off to provoke the timeout;
//   * the open-drain resolution of the lines.
// It checks the result of every GET, SET and PIO command against a table
// kept in the testbench, the address pattern seen at the ADDR edge, that the
// pattern stays on the IO lines for ADDR_HOLD clocks (3 us), that the master
// never lowers ADDR without a two-clock grant, and the timeout error.
module tb_atomi_bus_master;
  import atomi_pkg::*;

  localparam int unsigned HOLD = 24;

  logic clk = 0, rclk = 0, rst_n = 0;
  always #62.5 clk  = ~clk;
  always #97   rclk = ~rclk;

  logic   cmd_valid = 0, cmd_ready, rsp_valid, req, grant = 0;
  cmd_t   cmd;
  rsp_t   rsp;
  drive_t drv;
  bus_t   bus;
  logic   ack_n;

  // Responder pulls.
  logic [IO_W-1:0] r_io_pull = '0;
  logic            r_ack_pull = 0;
  logic            resp_on = 1;

  assign bus.io     = ~(drv.io_pull | r_io_pull);
  assign bus.addr_n = ~drv.addr_pull;
  assign bus.set_n  = ~drv.set_pull;
  assign ack_n      = ~(drv.ack_pull | r_ack_pull);

  atomi_bus_master #(.ADDR_HOLD(HOLD), .ACK_TIMEOUT(200)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp,
    .bus, .ack_in_n(ack_n), .grant, .req, .drv
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- grant model: follows req while the bus is free -------
  bit spurious = 0;
  always @(posedge clk) begin
    if (spurious) grant <= 1;
    else          grant <= req & bus.addr_n;
  end

  // ---------------- address phase monitor -------------------------------
  logic [IO_W-1:0] sel_at_fall;
  int              hold_clocks;
  int              grant_run;
  always @(posedge clk) grant_run <= grant ? grant_run + 1 : 0;
  always @(negedge bus.addr_n) begin
    sel_at_fall = bus.io;
    check(grant_run >= 2, "ADDR lowered only after a two-clock grant");
    hold_clocks = 0;
    while (bus.io == sel_at_fall && !bus.addr_n) begin
      @(posedge clk); #1;
      hold_clocks++;
    end
  end

  // ---------------- behavioural responder --------------------------------
  localparam logic [7:0] RESP_ADDR = 8'h33;
  logic [7:0] rvars [128];
  initial for (int i = 0; i < 128; i++) rvars[i] = 8'(i * 7 + 3);

  initial begin
    logic [7:0] c;
    forever begin
      @(negedge bus.addr_n);
      repeat (3) @(posedge rclk);
      if (!resp_on || bus.io[7:0] != RESP_ADDR) begin
        wait (bus.addr_n);
      end else begin
        while (!bus.addr_n) begin
          // command byte
          @(posedge rclk);
          if (bus.set_n) continue;
          c = bus.io[7:0];
          r_ack_pull = 1;
          wait (bus.set_n); @(posedge rclk);
          r_ack_pull = 0;
          // data byte
          wait (!bus.set_n); @(posedge rclk);
          if (c[7]) rvars[c[6:0]] = bus.io[7:0];
          else      r_io_pull = {1'b0, ~rvars[c[6:0]]};
          r_ack_pull = 1;
          wait (bus.set_n); @(posedge rclk);
          r_io_pull = '0;
          r_ack_pull = 0;
        end
      end
    end
  end

  // ---------------- command driver ----------------------------------------
  task automatic run(input cmd_t c, output rsp_t r, output int cycles);
    @(posedge clk); #1;
    cmd = c; cmd_valid = 1;
    cycles = 0;
    do begin @(posedge clk); #1; end while (!cmd_ready && 0);
    @(posedge clk); #1; cmd_valid = 0;
    while (!rsp_valid) begin @(posedge clk); #1; cycles++; end
    r = rsp;
  endtask

  logic [7:0] model [128];
  initial for (int i = 0; i < 128; i++) model[i] = 8'(i * 7 + 3);

  initial begin
    cmd_t c; rsp_t r; int cyc;
    int n_get = 0, n_set = 0, n_pio = 0;
    cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Spurious one-clock grant while idle: the master must ignore it (it is
    // not even requesting); checked by the ADDR monitor above.
    spurious = 1; @(posedge clk); spurious = 0;
    repeat (5) @(posedge clk);
    check(bus.addr_n == 1, "no transaction from a stray grant");

    for (int i = 0; i < 60; i++) begin
      logic [6:0] idx; logic [7:0] v;
      idx = 7'($urandom);
      v   = 8'($urandom);
      c = '0;
      c.sel = byte_sel(RESP_ADDR);
      c.idx = idx;
      if ($urandom_range(0, 1)) begin
        c.op = OP_SET; c.wdata = {1'b0, v};
        run(c, r, cyc);
        model[idx] = v;
        check(!r.err, "SET acknowledged");
        check(rvars[idx] == v, "SET reached the responder");
        n_set++;
      end else begin
        c.op = OP_GET;
        run(c, r, cyc);
        check(!r.err, "GET acknowledged");
        check(r.rdata[7:0] == model[idx], $sformatf("GET data %0h vs %0h", r.rdata[7:0], model[idx]));
        n_get++;
      end
      check(sel_at_fall == byte_sel(RESP_ADDR), "address pattern at the ADDR edge");
      check(hold_clocks >= HOLD, $sformatf("address held %0d clocks", hold_clocks));
    end

    // PIO: the IO lines are driven with a pattern and sampled after pio_len.
    for (int i = 0; i < 10; i++) begin
      c = '0;
      c.sel = line_sel(9'b000000100);
      c.op = OP_PIO;
      c.wdata = IO_W'($urandom) | 9'h100;
      c.pio_len = 8'd10;
      run(c, r, cyc);
      check(!r.err && r.rdata == c.wdata, "PIO samples the driven pattern");
      check(sel_at_fall == 9'b000000100, "one-line pattern at the ADDR edge");
      n_pio++;
    end

    // Nobody answers: timeout.
    resp_on = 0;
    c = '0; c.sel = byte_sel(8'h77); c.op = OP_GET;
    run(c, r, cyc);
    check(r.err, "unanswered GET ends with an error");
    check(bus.addr_n && bus.set_n, "bus released after the error");
    resp_on = 1;

    check(n_get > 10 && n_set > 10 && n_pio == 10, "all command kinds ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
