// Self-checking testbench for bin2gray.
//
// Runs every input of a 4-bit converter (the default size) and of a 6-bit
// one. The reference is the arithmetic form of the Gray code,
// gray = bin ^ (bin >> 1). The test also checks that successive binary
// values give Gray codes that differ in exactly one bit, that each garbage
// output is the copy of the gate's control bit, that every Gray code occurs
// once, and that the 4-bit garbage port has the published width.
// Combinational; a watchdog ends a hung run.
module tb_bin2gray;
  import rev_pkg::*;

  logic [3:0] bin4, gray4, prev4;
  logic [2:0] garb4;
  logic [5:0] bin6, gray6;
  logic [4:0] garb6;
  logic [15:0] seen4;
  int checks = 0, failures = 0;

  bin2gray dut4 (.bin(bin4), .gray(gray4), .garbage(garb4));
  bin2gray #(.WIDTH(6)) dut6 (.bin(bin6), .gray(gray6), .garbage(garb6));

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
    check($bits(garb4) == B2G_GARBAGE, "garbage width");
    seen4 = '0;
    prev4 = '0;
    for (int i = 0; i < 16; i++) begin
      bin4 = 4'(i);
      #1;
      check(gray4 == (bin4 ^ (bin4 >> 1)), $sformatf("4-bit bin=%b gray=%b", bin4, gray4));
      // garbage[k] is the control copy of gate G(k+1): bin[3-k].
      check(garb4 == {bin4[1], bin4[2], bin4[3]}, $sformatf("4-bit garbage %b", garb4));
      if (i > 0) check($countones(gray4 ^ prev4) == 1, $sformatf("step %0d not one bit", i));
      seen4[gray4] = 1'b1;
      prev4 = gray4;
    end
    check(seen4 == 16'hffff, "4-bit Gray codes not all distinct");
    for (int i = 0; i < 64; i++) begin
      bin6 = 6'(i);
      #1;
      check(gray6 == (bin6 ^ (bin6 >> 1)), $sformatf("6-bit bin=%b gray=%b", bin6, gray6));
      for (int k = 0; k < 5; k++)
        check(garb6[k] == bin6[5-k], $sformatf("6-bit garbage[%0d]", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
