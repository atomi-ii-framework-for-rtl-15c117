// tb_atomi_poll_workload - the mixed-traffic workload: one active object polls
// a passive IO object at 50 kHz while another active object keeps reading a
// name string out of a variable table, at the default parameters.
//
// Setup (all in atomi_system):
//   * active object 0 polls the one-line passive object every 20 us with a
//     PIO command: IO[5:4] carry two LED outputs written by the poller, IO[7:6]
//     two key inputs that the module pulls low while a key is pressed;
//   * active object 1 reads the 8-byte name "DCMOTOR1" from variables 0-7 of
//     the 4 MHz table object, one GET per byte, in a continuous loop;
//   * the table object's own side writes the name through its local port.
// Each poll starts at a random point in the first 5 us of its slot, as
// software would. Checks: every poll finishes inside its 20 us slot
// although it competes with the reads and may have to wait for one to end
// (rate), every key sample matches the key state, the LED
// pins see the poller's pattern while the object is selected, and every
// name read is intact (no corruption from the shared lines).
module tb_atomi_poll_workload;
  import atomi_pkg::*;

  localparam int  NPOLL   = 120;
  localparam time SLOT    = 20us;
  localparam string NAME  = "DCMOTOR1";

  logic clk_a = 0, clk_p = 0, rst_n = 0;
  always #62.5 clk_a = ~clk_a;
  initial #40 forever #125 clk_p = ~clk_p;

  logic [1:0]  cmd_valid = '0, cmd_ready, rsp_valid, grant_o;
  cmd_t [1:0]  cmd;
  rsp_t [1:0]  rsp;
  logic        var_we = 0, var_bus_wr, var_selected;
  logic [6:0]  var_idx = '0;
  logic [7:0]  var_wdata = '0, var_rdata;
  logic [3:0]  pa_mod_pull, pa_mod_in, pb_mod_in;
  logic        pa_cs, pb_cs;
  bus_t        bus_o;
  logic [4:0]  ack_o;
  logic [1:0]  keys = '0;       // 1 = pressed

  // Module side of the IO object: keys on channels 3:2 (IO[7:6]).
  assign pa_mod_pull = {keys, 2'b00};

  atomi_system dut (
    .clk_a, .clk_p, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp, .grant_o,
    .var_we, .var_idx, .var_wdata, .var_rdata, .var_bus_wr, .var_selected,
    .pa_mod_pull, .pa_mod_in, .pa_cs, .pb_mod_pull(4'b0000), .pb_mod_in, .pb_cs,
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

  task automatic run(input int m, input cmd_t c, output rsp_t r);
    @(posedge clk_a); #1;
    cmd[m] = c; cmd_valid[m] = 1;
    @(posedge clk_a); #1;
    cmd_valid[m] = 0;
    while (!rsp_valid[m]) begin @(posedge clk_a); #1; end
    r = rsp[m];
  endtask

  // LED pins as seen by the module while selected.
  logic [1:0] led_seen;
  always @(posedge clk_a) if (pa_cs) led_seen <= pa_mod_in[1:0];

  bit   done = 0;
  int   n_names = 0, n_polls = 0, n_waited = 0;
  time  worst = 0;

  initial begin
    #1000 rst_n = 1;
    // The table object publishes its name.
    for (int i = 0; i < 8; i++) begin
      @(posedge clk_p); #1;
      var_we = 1; var_idx = 7'(i); var_wdata = NAME[i];
      @(posedge clk_p); #1;
      var_we = 0;
    end
    #2000;
    fork
      // Poller: one PIO every 20 us.
      begin
        time slot_start, took, issue;
        for (int p = 0; p < NPOLL; p++) begin
          cmd_t c; rsp_t r; logic [1:0] leds, k;
          slot_start = $time;
          #($urandom_range(0, 5000));      // software jitter inside the slot
          issue = $time;
          leds = 2'($urandom);
          k    = 2'($urandom);
          keys = k;
          c = '0;
          c.sel     = line_sel(9'b000000100);
          c.op      = OP_PIO;
          c.wdata   = {1'b1, 2'b11, leds, 4'hF};
          c.pio_len = 8'd8;
          run(0, c, r);
          took = $time - slot_start;
          if (took > worst) worst = took;
          if ($time - issue > 6us) n_waited++;   // bus was busy with a read
          check(took <= SLOT, $sformatf("poll %0d took %0t", p, took));
          check(!r.err && r.rdata[7:6] == ~k, "key sample");
          check(r.rdata[5:4] == leds && led_seen == leds, "LED pattern at the module");
          n_polls++;
          wait ($time >= slot_start + SLOT);
        end
        done = 1;
      end
      // Reader: continuous name reads.
      begin
        while (!done) begin
          bit ok;
          ok = 1;
          for (int i = 0; i < 8; i++) begin
            cmd_t c; rsp_t r;
            c = '0; c.sel = byte_sel(8'h21); c.op = OP_GET; c.idx = 7'(i);
            run(1, c, r);
            ok &= !r.err && r.rdata[7:0] == NAME[i];
          end
          check(ok, "name read intact");
          n_names++;
        end
      end
    join
    $display("polls=%0d waited=%0d (worst %0t, slot %0t) name reads=%0d",
             n_polls, n_waited, worst, SLOT, n_names);
    check(n_polls == NPOLL && n_names > 20, "both streams ran");
    check(n_waited > 0, "a poll had to wait for a read to finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
