// tb_atomi_var_table_slave - self-checking test of the shared variable table.
//
// The object runs at 4 MHz (250 ns clock), the slowest object of the
// reference system. The testbench plays the active object behaviourally:
// it puts an address on the IO lines, lowers ADDR, keeps the address for a
// chosen time, then moves bytes with the SET/ACK handshake. It checks
//   * GET and SET of random variables against a table kept here, through the
//     bus and through the local port, and the `bus_wr` pulse;
//   * several command/data pairs inside one addressing;
//   * the address window: held for 3 us the object answers, held for only
//     2 us (the IO lines then read all ones) it does not;
//   * a foreign address gets no acknowledge;
//   * local writes take priority over nothing else pending and are visible
//     on the bus.
module tb_atomi_var_table_slave;
  import atomi_pkg::*;

  localparam logic [7:0] MY = 8'h21;

  logic clk = 0, rst_n = 0;
  initial #37 forever #125 clk = ~clk;    // 4 MHz, phase unrelated to the tb

  bus_t       bus;
  drive_t     drv;
  logic [8:0] m_io_pull = '0;
  logic       m_addr_pull = 0, m_set_pull = 0;
  logic       ack_n;
  logic       loc_we = 0, bus_wr, selected;
  logic [6:0] loc_idx = '0;
  logic [7:0] loc_wdata = '0, loc_rdata;

  assign bus.io     = ~(m_io_pull | drv.io_pull);
  assign bus.addr_n = ~m_addr_pull;
  assign bus.set_n  = ~m_set_pull;
  assign ack_n      = ~drv.ack_pull;

  atomi_var_table_slave #(.N_VARS(16), .RESP_CYCLES(12), .MY_ADDR(MY)) dut (
    .clk, .rst_n, .bus, .drv, .loc_we, .loc_idx, .loc_wdata, .loc_rdata, .bus_wr, .selected
  );

  int checks = 0, failures = 0, wr_pulses = 0;
  always @(posedge clk) if (bus_wr) wr_pulses++;

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

  task automatic address(input logic [7:0] a, input realtime hold);
    m_io_pull = {1'b0, ~a};
    #200;
    m_addr_pull = 1;
    #(hold);
    m_io_pull = '0;
    #100;
  endtask

  task automatic release_bus();
    m_io_pull = '0; m_set_pull = 0;
    #100;
    m_addr_pull = 0;
    #3000;    // let the object see ADDR high
  endtask

  // One handshaked byte; returns 0 if no acknowledge came within 10 us.
  task automatic xfer(input bit write, input logic [7:0] wbyte, output logic [7:0] rbyte, output bit ok);
    realtime t0;
    ok = 1;
    if (write) m_io_pull = {1'b0, ~wbyte};
    #50;
    m_set_pull = 1;
    t0 = $realtime;
    while (ack_n && $realtime - t0 < 10000) #10;
    if (ack_n) begin ok = 0; m_set_pull = 0; m_io_pull = '0; return; end
    #20;
    rbyte = bus.io[7:0];
    m_set_pull = 0;
    m_io_pull  = '0;
    t0 = $realtime;
    while (!ack_n && $realtime - t0 < 10000) #10;
    if (!ack_n) ok = 0;
  endtask

  logic [7:0] model [16];

  task automatic do_set(input logic [6:0] idx, input logic [7:0] v, output bit ok);
    logic [7:0] d; bit ok1, ok2;
    xfer(1, {1'b1, idx}, d, ok1);
    xfer(1, v, d, ok2);
    ok = ok1 & ok2;
    if (ok && idx < 16) model[idx] = v;
  endtask

  task automatic do_get(input logic [6:0] idx, output logic [7:0] v, output bit ok);
    logic [7:0] d; bit ok1, ok2;
    xfer(1, {1'b0, idx}, d, ok1);
    xfer(0, 8'h00, v, ok2);
    ok = ok1 & ok2;
  endtask

  initial begin
    bit ok; logic [7:0] v; int exp_pulses;
    for (int i = 0; i < 16; i++) model[i] = '0;
    #600 rst_n = 1;
    #1000;

    // SET then GET in separate addressings.
    for (int i = 0; i < 40; i++) begin
      logic [6:0] idx; logic [7:0] val;
      idx = 7'($urandom_range(0, 15)); val = 8'($urandom);
      address(MY, 3000);
      check(selected, "selected after a 3 us address");
      do_set(idx, val, ok);
      check(ok, "SET acknowledged");
      release_bus();
      loc_idx = idx; #1;
      check(loc_rdata == val, "SET visible on the local port");
      address(MY, 3000);
      do_get(7'($urandom_range(0, 15)), v, ok);
      release_bus();
      check(ok, "GET acknowledged");
    end

    // Several accesses inside one addressing, GET results checked.
    address(MY, 3000);
    for (int i = 0; i < 30; i++) begin
      logic [6:0] idx;
      idx = 7'($urandom_range(0, 15));
      if ($urandom_range(0, 1)) begin
        do_set(idx, 8'($urandom), ok);
        check(ok, "SET in burst");
      end else begin
        do_get(idx, v, ok);
        check(ok && v == model[idx], $sformatf("GET %0d in burst: %0h vs %0h", idx, v, model[idx]));
      end
    end
    release_bus();

    // Local write, read through the bus.
    @(posedge clk); #1;
    loc_we = 1; loc_idx = 7'd5; loc_wdata = 8'hC3;
    @(posedge clk); #1;
    loc_we = 0;
    model[5] = 8'hC3;
    address(MY, 3000);
    do_get(7'd5, v, ok);
    release_bus();
    check(ok && v == 8'hC3, "local write seen by a bus GET");

    // Out-of-range index: acknowledged, reads 0, writes nothing.
    exp_pulses = wr_pulses;
    address(MY, 3000);
    do_set(7'd100, 8'h55, ok);
    do_get(7'd100, v, ok);
    release_bus();
    check(ok && v == 8'h00 && wr_pulses == exp_pulses, "index outside the table");

    // Address window: 2 us is too short for this object.
    address(MY, 2000);
    do_get(7'd5, v, ok);
    release_bus();
    check(!ok, "address held 2 us: no answer");

    // Foreign address: no answer.
    address(8'h22, 3000);
    check(!selected, "not selected by a foreign address");
    do_get(7'd5, v, ok);
    release_bus();
    check(!ok, "foreign address: no answer");

    check(wr_pulses > 20, "bus writes pulsed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
