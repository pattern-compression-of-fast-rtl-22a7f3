// tb_corner_table: exhaustive check of the FAST-10 and FAST-9 corner pattern
// tables over all 2^16 binary ring patterns.
//
// The reference walks the ring twice and measures the longest run of ones
// (capped at 16), so it shares no structure with the AND/OR arcs of the table.
// It also counts the table entries: 513 for FAST-10, the split-table size
// reported for the learned FAST-10 table, and 1,025 for FAST-9.
module tb_corner_table;
  import fast_pkg::*;

  int checks = 0, failures = 0;
  ring_pattern_t pattern;
  logic corner10, corner9;
  int n10 = 0, n9 = 0;

  corner_table #(.FAST_N(10)) dut10 (.pattern, .corner(corner10));
  corner_table #(.FAST_N(9))  dut9  (.pattern, .corner(corner9));

  function automatic int longest_run(input ring_pattern_t p);
    int best = 0, run = 0;
    for (int i = 0; i < 32; i++) begin
      if (p[i % 16]) run++; else run = 0;
      if (run > best) best = run;
    end
    return (best > 16) ? 16 : best;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int run;
      pattern = ring_pattern_t'(v);
      #1;
      run = longest_run(pattern);
      checks += 2;
      if (corner10 !== (run >= 10)) begin
        failures++;
        if (failures < 10) $display("FAIL N=10 pattern=%h got %b run %0d", pattern, corner10, run);
      end
      if (corner9 !== (run >= 9)) begin
        failures++;
        if (failures < 10) $display("FAIL N=9 pattern=%h got %b run %0d", pattern, corner9, run);
      end
      n10 += int'(corner10);
      n9  += int'(corner9);
    end
    checks += 2;
    if (n10 != 513)  begin failures++; $display("FAIL FAST-10 table has %0d entries", n10); end
    if (n9  != 1025) begin failures++; $display("FAIL FAST-9 table has %0d entries", n9); end
    $display("table entries: FAST-10 %0d, FAST-9 %0d", n10, n9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
