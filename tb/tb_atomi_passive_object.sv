// tb_atomi_passive_object - self-checking test of the passive object.
//
// Two instances share the lines driven by the testbench: one selected by
// IO[2] (one-line addressing) and one by the 8-bit number 0x42. For random
// address patterns the test checks which object is selected, that while
// selected the switched lines IO[7:4] carry the module's pulls to the bus and
// the bus levels to the module pins, and that an unselected object neither
// pulls a line nor sees one. A third object, selected by IO[8], shows that
// one pattern can select several one-line objects at once.
module tb_atomi_passive_object;
  import atomi_pkg::*;

  bus_t            bus;
  logic [IO_W-1:0] tb_pull = '0, pull_l, pull_b, pull_l2;
  logic [3:0]      mp_l = '0, mp_b = '0, mp_l2 = '0, mi_l, mi_b, mi_l2;
  logic            cs_l, cs_b, cs_l2;
  logic            addr_n = 1;

  assign bus.io     = ~(tb_pull | pull_l | pull_b | pull_l2);
  assign bus.addr_n = addr_n;
  assign bus.set_n  = 1'b1;

  atomi_passive_object #(.BYTE_MODE(1'b0), .SEL_LINE(2)) u_l (
    .bus, .io_pull(pull_l), .mod_pull(mp_l), .mod_in(mi_l), .cs(cs_l));
  atomi_passive_object #(.BYTE_MODE(1'b0), .SEL_LINE(8)) u_l2 (
    .bus, .io_pull(pull_l2), .mod_pull(mp_l2), .mod_in(mi_l2), .cs(cs_l2));
  atomi_passive_object #(.BYTE_MODE(1'b1), .MY_ADDR(8'h42)) u_b (
    .bus, .io_pull(pull_b), .mod_pull(mp_b), .mod_in(mi_b), .cs(cs_b));

  int checks = 0, failures = 0, n_l = 0, n_b = 0, n_multi = 0;
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
    logic [IO_W-1:0] pat;
    bit el, el2, eb;
    #10;
    for (int i = 0; i < 1500; i++) begin
      case ($urandom_range(0, 3))
        0: pat = {1'b0, 8'h42};
        1: pat = 9'b000000100;
        2: pat = 9'b100000100;
        default: pat = IO_W'($urandom);
      endcase
      el  = pat[2];
      el2 = pat[8];
      eb  = (pat[7:0] == 8'h42);
      mp_l = '0; mp_b = '0; mp_l2 = '0;
      tb_pull = ~pat;
      #5;
      check(!cs_l && !cs_b && !cs_l2, "nothing selected while ADDR high");
      addr_n = 0;
      #5;
      tb_pull = '0;     // lines free after addressing
      #5;
      check(cs_l == el && cs_l2 == el2 && cs_b == eb, "selection matches the pattern");
      if (el) n_l++;
      if (eb) n_b++;
      if (el && el2) n_multi++;
      // Module side to bus.
      mp_l = 4'($urandom); mp_b = 4'($urandom); mp_l2 = 4'($urandom);
      #5;
      check(bus.io[7:4] == ~((el ? mp_l : 4'b0) | (eb ? mp_b : 4'b0) | (el2 ? mp_l2 : 4'b0)),
            "module pulls reach IO[7:4] only when selected");
      check(bus.io[3:0] == 4'hF && bus.io[8] == 1'b1, "other lines untouched");
      // Bus to module side.
      mp_l = '0; mp_b = '0; mp_l2 = '0;
      tb_pull = {1'b0, 4'($urandom), 4'b0};
      #5;
      check(mi_l  == (el  ? bus.io[7:4] : 4'hF), "one-line module sees the bus");
      check(mi_b  == (eb  ? bus.io[7:4] : 4'hF), "byte module sees the bus");
      check(mi_l2 == (el2 ? bus.io[7:4] : 4'hF), "second one-line module sees the bus");
      tb_pull = '0;
      addr_n = 1;
      #5;
      check(!cs_l && !cs_b && !cs_l2 && mi_l == 4'hF, "released with ADDR");
    end
    check(n_l > 100 && n_b > 100 && n_multi > 50, "all selection cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
