// End-to-end testbench for rev_code_converters_top at its default size.
//
// Sweeps every 4-bit value through all converter inputs and the shared gate
// input together. Checks, against references computed independently of the
// design (integer arithmetic and behavioural gate models):
//   - binary to Gray against bin ^ (bin >> 1), and that successive codes
//     differ in one bit;
//   - Gray to binary by feeding it the Gray code just produced and
//     expecting the original binary value back (a round trip);
//   - BCD to excess-3 as digit + 3 and excess-3 to BCD as code - 3, and
//     the round trip digit -> excess-3 -> digit;
//   - every gate of the library against its behavioural model, and that
//     every converter and every gate maps distinct inputs to distinct
//     output-plus-garbage vectors (reversibility).
// Each of these mechanisms is counted; one that never happened counts as a
// failure. Combinational; a watchdog ends a hung run.
module tb_rev_code_converters_top;
  import rev_pkg::*;

  logic [3:0] b2g_bin, b2g_gray, g2b_gray, g2b_bin;
  logic [2:0] b2g_garbage, g2b_garbage;
  nibble_t bcd_in, xs3_out, xs3_in, bcd_out;
  logic [BCD2XS3_GARBAGE-1:0] bcd2xs3_garbage;
  logic [XS32BCD_GARBAGE-1:0] xs32bcd_garbage;
  logic [3:0] gate_in;
  logic [1:0] fg_out;
  logic [2:0] tg_out, frg_out, pg_out, urg_out;
  logic [3:0] hng_out;

  rev_code_converters_top dut (.*);

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_gray_step = 0, n_gray_round = 0, n_bcd_round = 0, n_xs3_valid = 0;
  int n_fg_copy = 0, n_fg_not = 0, n_frg_swap = 0, n_tg_flip = 0, n_hng_carry = 0;
  int n_reversible = 0;

  logic [6:0]  b2g_seen  [16];
  logic [6:0]  g2b_seen  [16];
  logic [15:0] b2x_seen  [16];
  logic [15:0] x2b_seen  [16];
  logic [3:0]  fg_seen;
  logic [15:0] hng_seen;
  logic [3:0]  prev_gray;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Every entry of a table of 16 output vectors must be distinct.
  function automatic bit all_distinct16(input logic [15:0] t [16]);
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++)
        if (t[i] == t[j]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b, c, d;
    int sum;
    fg_seen = '0;
    hng_seen = '0;
    prev_gray = '0;
    g2b_gray = '0;
    xs3_in = '0;
    for (int v = 0; v < 16; v++) begin
      b2g_bin = 4'(v);
      bcd_in  = 4'(v);
      gate_in = 4'(v);
      #1;
      // Binary to Gray.
      check(b2g_gray == (b2g_bin ^ (b2g_bin >> 1)), $sformatf("b2g %b -> %b", b2g_bin, b2g_gray));
      if (v > 0 && $countones(b2g_gray ^ prev_gray) == 1) n_gray_step++;
      prev_gray = b2g_gray;
      b2g_seen[v] = {b2g_gray, b2g_garbage};
      // Gray to binary on the code just produced.
      g2b_gray = b2g_gray;
      // BCD to excess-3, and feed the result back.
      if (v <= 9) check(int'(xs3_out) == v + 3, $sformatf("bcd %0d -> %b", v, xs3_out));
      b2x_seen[v] = {xs3_out, bcd2xs3_garbage};
      xs3_in = xs3_out;
      #1;
      check(g2b_bin == 4'(v), $sformatf("gray round trip %0d -> %b", v, g2b_bin));
      if (g2b_bin == 4'(v)) n_gray_round++;
      g2b_seen[v] = {g2b_bin, g2b_garbage};
      if (v <= 9) begin
        check(bcd_out == 4'(v), $sformatf("bcd round trip %0d -> %b", v, bcd_out));
        if (bcd_out == 4'(v)) n_bcd_round++;
      end
      // Excess-3 to BCD on every code, directly.
      xs3_in = 4'(v);
      #1;
      if (v >= 3 && v <= 12) begin
        check(int'(bcd_out) == v - 3, $sformatf("xs3 %0d -> %b", v, bcd_out));
        n_xs3_valid++;
      end
      x2b_seen[v] = {bcd_out, xs32bcd_garbage};

      // Gate library.
      {a, b, c, d} = gate_in;
      check(fg_out == {a, a ^ b}, $sformatf("FG %b -> %b", gate_in, fg_out));
      if (!b && fg_out[1] == fg_out[0]) n_fg_copy++;
      if (b && fg_out[0] == !a) n_fg_not++;
      check(tg_out == {a, b, (a && b) ? !c : c}, $sformatf("TG %b -> %b", gate_in, tg_out));
      if (a && b) n_tg_flip++;
      check(frg_out == (a ? {a, c, b} : {a, b, c}), $sformatf("FRG %b -> %b", gate_in, frg_out));
      if (a && b != c) n_frg_swap++;
      check(pg_out == {a, a ^ b, (a && b) ? !c : c}, $sformatf("PG %b -> %b", gate_in, pg_out));
      check(urg_out == {c ^ (a && b), b, c ^ (a || b)}, $sformatf("URG %b -> %b", gate_in, urg_out));
      sum = int'(a) + int'(b) + int'(c);
      check(hng_out == {a, b, sum[0], sum[1] ^ d}, $sformatf("HNG %b -> %b", gate_in, hng_out));
      if (!d && sum >= 2 && hng_out[0]) n_hng_carry++;
      fg_seen[fg_out] = 1'b1;
      hng_seen[hng_out] = 1'b1;
    end

    // Three-input gates over their eight patterns (gate_in[0] = 0 only).
    begin
      logic [7:0] s_tg, s_frg, s_pg, s_urg;
      s_tg = '0; s_frg = '0; s_pg = '0; s_urg = '0;
      for (int v = 0; v < 8; v++) begin
        gate_in = {3'(v), 1'b0};
        #1;
        s_tg[tg_out] = 1'b1; s_frg[frg_out] = 1'b1; s_pg[pg_out] = 1'b1; s_urg[urg_out] = 1'b1;
      end
      check(s_tg == 8'hff && s_frg == 8'hff && s_pg == 8'hff && s_urg == 8'hff,
            "a three-input gate is not a permutation");
      if (s_tg == 8'hff && s_frg == 8'hff && s_pg == 8'hff && s_urg == 8'hff) n_reversible++;
    end
    check(fg_seen == 4'hf, "FG is not a permutation");
    check(hng_seen == 16'hffff, "HNG is not a permutation");
    if (fg_seen == 4'hf && hng_seen == 16'hffff) n_reversible++;

    // Converters: input recoverable from outputs plus garbage.
    begin
      logic [15:0] t1 [16], t2 [16];
      for (int i = 0; i < 16; i++) begin
        t1[i] = 16'(b2g_seen[i]);
        t2[i] = 16'(g2b_seen[i]);
      end
      check(all_distinct16(t1) && all_distinct16(t2), "Gray converters not reversible");
      check(all_distinct16(b2x_seen) && all_distinct16(x2b_seen), "BCD converters not reversible");
      if (all_distinct16(t1) && all_distinct16(t2) && all_distinct16(b2x_seen)
          && all_distinct16(x2b_seen)) n_reversible++;
    end

    $display("mechanisms: gray_step=%0d gray_round_trip=%0d bcd_round_trip=%0d xs3_valid=%0d",
             n_gray_step, n_gray_round, n_bcd_round, n_xs3_valid);
    $display("mechanisms: fg_copy=%0d fg_not=%0d tg_flip=%0d frg_swap=%0d hng_carry=%0d reversible=%0d",
             n_fg_copy, n_fg_not, n_tg_flip, n_frg_swap, n_hng_carry, n_reversible);
    check(n_gray_step > 0,  "single-bit Gray step never seen");
    check(n_gray_round > 0, "Gray round trip never completed");
    check(n_bcd_round > 0,  "BCD round trip never completed");
    check(n_xs3_valid > 0,  "no excess-3 code converted");
    check(n_fg_copy > 0,    "FG copy never seen");
    check(n_fg_not > 0,     "FG inversion never seen");
    check(n_tg_flip > 0,    "Toffoli flip never seen");
    check(n_frg_swap > 0,   "Fredkin swap never seen");
    check(n_hng_carry > 0,  "HNG carry never seen");
    check(n_reversible == 3, "reversibility checks incomplete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
