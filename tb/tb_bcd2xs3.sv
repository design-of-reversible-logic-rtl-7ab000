// Self-checking testbench for bcd2xs3.
//
// For every decimal digit 0-9 it expects the excess-3 code digit + 3,
// computed with integer addition. For all sixteen inputs it checks that
// the outputs together with the garbage outputs are all different, i.e.
// the input can be recovered from what the circuit emits, and it checks
// the garbage port width. Combinational; a watchdog ends a hung run.
module tb_bcd2xs3;
  import rev_pkg::*;

  nibble_t bcd, xs3;
  logic [BCD2XS3_GARBAGE-1:0] garbage;
  logic [BCD2XS3_GARBAGE+3:0] outs [16];
  int checks = 0, failures = 0;

  bcd2xs3 dut (.bcd(bcd), .xs3(xs3), .garbage(garbage));

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
      bcd = 4'(i);
      #1;
      if (i <= 9) check(int'(xs3) == i + 3, $sformatf("digit %0d -> %b", i, xs3));
      outs[i] = {xs3, garbage};
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++)
        check(outs[i] != outs[j], $sformatf("inputs %0d and %0d give the same outputs", i, j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
