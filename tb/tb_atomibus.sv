// tb_atomibus - self-checking test of the bus line resolution.
//
// Random pull requests and switch states for five objects. The expected
// levels are computed here a different way from the module: for every ACK
// segment, walk left and right to the ends of its group of closed switches
// and AND every pull and every ground inside the group. IO, ADDR and SET are
// checked as plain wired-AND lines. Also counts how often an ACK segment was
// low only because of a grounding switch (the daisy-chain cut).
module tb_atomibus;
  import atomi_pkg::*;

  localparam int N = 5;

  drive_t [N-1:0] drv;
  logic   [N-1:0] cut, ack_seg;
  bus_t           bus;
  int checks = 0, failures = 0, cut_lows = 0;

  atomibus #(.NOBJ(N)) dut (.drv(drv), .ack_cut(cut), .bus(bus), .ack_seg(ack_seg));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic [IO_W-1:0] io_exp;
      logic a_exp, s_exp;
      for (int i = 0; i < N; i++) begin
        drv[i].io_pull   = IO_W'($urandom) & IO_W'($urandom);
        drv[i].addr_pull = ($urandom_range(0, 7) == 0);
        drv[i].set_pull  = ($urandom_range(0, 7) == 0);
        drv[i].ack_pull  = ($urandom_range(0, 5) == 0);
        cut[i]           = ($urandom_range(0, 4) == 0);
      end
      #1;
      io_exp = '1; a_exp = 1; s_exp = 1;
      for (int i = 0; i < N; i++) begin
        io_exp &= ~drv[i].io_pull;
        a_exp  &= ~drv[i].addr_pull;
        s_exp  &= ~drv[i].set_pull;
      end
      check(bus.io == io_exp && bus.addr_n == a_exp && bus.set_n == s_exp, "wired-AND lines");
      for (int s = 0; s < N; s++) begin
        int lo, hi;
        bit low, pulled;
        lo = s; hi = s;
        while (lo > 0 && !cut[lo-1]) lo--;   // switch lo-1 joins lo-1 and lo
        while (hi < N && !cut[hi]) hi++;     // segment N is the open end
        low = 0; pulled = 0;
        for (int k = lo; k <= hi; k++) begin
          if (k < N && drv[k].ack_pull) begin low = 1; pulled = 1; end
          if (k > 0 && cut[k-1]) low = 1;
        end
        check(ack_seg[s] == !low, $sformatf("ACK segment %0d", s));
        if (low && !pulled) cut_lows++;
      end
    end
    check(cut_lows > 100, "grounding switch exercised");
    $display("grounded-by-switch segments: %0d", cut_lows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
