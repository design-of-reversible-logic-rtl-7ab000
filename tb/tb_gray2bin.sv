// Self-checking testbench for gray2bin.
//
// Runs every input of a 4-bit converter (the default size) and of a 6-bit
// one. The reference works the other way round: for every binary value v
// it forms the Gray code v ^ (v >> 1), feeds it in and expects v back. It
// also checks each garbage output (the control copy, i.e. the running xor
// one bit above) and the width of the 4-bit garbage port.
// Combinational; a watchdog ends a hung run.
module tb_gray2bin;
  import rev_pkg::*;

  logic [3:0] gray4, bin4;
  logic [2:0] garb4;
  logic [5:0] gray6, bin6;
  logic [4:0] garb6;
  int checks = 0, failures = 0;

  gray2bin dut4 (.gray(gray4), .bin(bin4), .garbage(garb4));
  gray2bin #(.WIDTH(6)) dut6 (.gray(gray6), .bin(bin6), .garbage(garb6));

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
    logic [3:0] v4;
    logic [5:0] v6;
    check($bits(garb4) == G2B_GARBAGE, "garbage width");
    for (int i = 0; i < 16; i++) begin
      v4 = 4'(i);
      gray4 = v4 ^ (v4 >> 1);
      #1;
      check(bin4 == v4, $sformatf("4-bit gray=%b bin=%b exp=%b", gray4, bin4, v4));
      // The control of the gate producing bin[i] is binary bit i+1.
      check(garb4 == v4[3:1], $sformatf("4-bit garbage %b", garb4));
    end
    for (int i = 0; i < 64; i++) begin
      v6 = 6'(i);
      gray6 = v6 ^ (v6 >> 1);
      #1;
      check(bin6 == v6, $sformatf("6-bit gray=%b bin=%b exp=%b", gray6, bin6, v6));
      check(garb6 == v6[5:1], $sformatf("6-bit garbage %b", garb6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
