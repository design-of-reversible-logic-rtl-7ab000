// Self-checking testbench for xs32bcd.
//
// For every excess-3 code 3-12 it expects the digit code - 3, computed with
// integer subtraction. For all sixteen inputs it checks that the outputs
// together with the garbage outputs are all different, and it checks the
// garbage port width. Combinational; a watchdog ends a hung run.
module tb_xs32bcd;
  import rev_pkg::*;

  nibble_t xs3, bcd;
  logic [XS32BCD_GARBAGE-1:0] garbage;
  logic [XS32BCD_GARBAGE+3:0] outs [16];
  int checks = 0, failures = 0;

  xs32bcd dut (.xs3(xs3), .bcd(bcd), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check($bits(garbage) == 12, "garbage width");
    for (int i = 0; i < 16; i++) begin
      xs3 = 4'(i);
      #1;
      if (i >= 3 && i <= 12) check(int'(bcd) == i - 3, $sformatf("code %0d -> %b", i, bcd));
      outs[i] = {bcd, garbage};
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++)
        check(outs[i] != outs[j], $sformatf("inputs %0d and %0d give the same outputs", i, j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
