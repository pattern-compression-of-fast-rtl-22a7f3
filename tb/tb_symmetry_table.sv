// tb_symmetry_table: exhaustive check of the representative-only corner table
// for FAST-10 and FAST-9.
//
// Every one of the 2^16 ring patterns is reduced to its representative by the
// symmetry converter and the result is looked up in the table; the answer must
// equal the segment test applied to the original pattern (longest circular run
// of ones, measured by the testbench). Patterns that are not representatives
// must read 0. The number of distinct representatives that hit is counted and
// must be 72 for FAST-10 and 144 for FAST-9.
module tb_symmetry_table;
  import fast_pkg::*;

  int checks = 0, failures = 0;
  ring_pattern_t pattern, rep, raw;
  logic c10, c9, raw10, raw9;
  bit seen10 [65536], seen9 [65536];
  int reps10 = 0, reps9 = 0;

  symmetry_converter u_conv (.pattern, .representative(rep));
  symmetry_table #(.FAST_N(10)) dut10 (.representative(rep), .corner(c10));
  symmetry_table #(.FAST_N(9))  dut9  (.representative(rep), .corner(c9));
  symmetry_table #(.FAST_N(10)) raw_10 (.representative(raw), .corner(raw10));
  symmetry_table #(.FAST_N(9))  raw_9  (.representative(raw), .corner(raw9));

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
      raw = ring_pattern_t'(v);
      #1;
      run = longest_run(pattern);
      checks += 2;
      if (c10 !== (run >= 10)) begin
        failures++;
        if (failures < 10) $display("FAIL N=10 pattern=%h rep=%h got %b", pattern, rep, c10);
      end
      if (c9 !== (run >= 9)) begin
        failures++;
        if (failures < 10) $display("FAIL N=9 pattern=%h rep=%h got %b", pattern, rep, c9);
      end
      if (c10 && !seen10[rep]) begin seen10[rep] = 1; reps10++; end
      if (c9 && !seen9[rep])   begin seen9[rep] = 1;  reps9++;  end
      // a pattern that is not its own representative is not in the table
      if (rep != raw) begin
        checks++;
        if (raw10 || raw9) begin
          failures++;
          if (failures < 10) $display("FAIL non-representative %h hit", raw);
        end
      end
    end
    checks += 2;
    if (reps10 != 72)  begin failures++; $display("FAIL FAST-10 representatives %0d", reps10); end
    if (reps9  != 144) begin failures++; $display("FAIL FAST-9 representatives %0d", reps9); end
    $display("representative table entries: FAST-10 %0d, FAST-9 %0d", reps10, reps9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
