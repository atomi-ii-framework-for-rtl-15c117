// tb_atomi_byte_select - self-checking test of 8-bit address recognition.
//
// Puts random object numbers (and, often, the object's own number) on the IO
// lines, lowers ADDR, scrambles the IO lines as data traffic would, and checks
// that `sel` is high exactly when the number present at the ADDR edge was the
// object's own, and only while ADDR is low.
module tb_atomi_byte_select;

  logic       addr_n = 1;
  logic [7:0] io = '0, my_addr = 8'h5A, latched;
  logic       sel;
  int checks = 0, failures = 0, hits = 0;

  atomi_byte_select #(.ADDR_W(8)) dut (.addr_n, .io, .my_addr, .sel, .latched);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a;
    #10;
    for (int i = 0; i < 1000; i++) begin
      if (i % 100 == 0) my_addr = 8'($urandom);
      a  = ($urandom_range(0, 2) == 0) ? my_addr : 8'($urandom);
      io = a;
      #5;
      check(sel == 0, "not selected while ADDR high");
      addr_n = 0;
      #1;
      check(sel == (a == my_addr), "selected iff own number");
      check(latched == a, "address latched");
      if (a == my_addr) hits++;
      io = 8'($urandom);
      #3;
      check(sel == (a == my_addr), "selection held during data");
      addr_n = 1;
      #1;
      check(sel == 0, "released with ADDR");
    end
    check(hits > 200, "enough hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
