// tb_atomi_line_select - self-checking test of one-line address recognition.
//
// Drives random levels on the select line and ADDR pulses. Checks that the
// chip select is off while ADDR is high, that it equals the line level at the
// falling edge of ADDR for the whole low phase, and that later changes of the
// line (the IO lines are free for data after addressing) do not disturb it.
module tb_atomi_line_select;

  logic addr_n = 1, d = 0, cs;
  int checks = 0, failures = 0;
  int selects = 0;

  atomi_line_select dut (.addr_n, .d, .cs);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expect_cs;
    #10;
    for (int i = 0; i < 500; i++) begin
      d = 1'($urandom);
      #5;
      check(cs == 0, "cs off while ADDR high");
      expect_cs = d;
      addr_n = 0;
      #1;
      check(cs == expect_cs, "cs follows the line at the ADDR edge");
      if (expect_cs) selects++;
      for (int k = 0; k < 4; k++) begin
        d = 1'($urandom);
        #3;
        check(cs == expect_cs, "cs held while ADDR low");
      end
      addr_n = 1;
      #1;
      check(cs == 0, "cs drops with ADDR");
    end
    check(selects > 100, "object was selected often enough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
