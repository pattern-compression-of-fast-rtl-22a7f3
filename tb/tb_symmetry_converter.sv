// tb_symmetry_converter: exhaustive check of the representative pattern over
// all 2^16 ring patterns.
//
// The reference builds the eight isomorphic patterns point by point: a rotation
// by k quarter turns gives point i the state of point (i + 4k) mod 16, and the
// mirror gives point i the state of point (16 - i) mod 16; it then takes the
// minimum with a linear scan. The testbench also checks that the result is
// one of the eight and that the FAST-10 corner patterns reduce to 72 classes.
module tb_symmetry_converter;
  import fast_pkg::*;

  int checks = 0, failures = 0;
  ring_pattern_t pattern, rep;
  bit seen [65536];
  int classes10 = 0;

  symmetry_converter dut (.pattern, .representative(rep));

  function automatic ring_pattern_t transform(input ring_pattern_t p, input int k, input bit m);
    ring_pattern_t q;
    for (int i = 0; i < 16; i++) begin
      int src = (i + 4 * k) % 16;
      if (m) src = (16 - src) % 16;
      q[i] = p[src];
    end
    return q;
  endfunction

  function automatic bit is_fast10(input ring_pattern_t p);
    for (int s = 0; s < 16; s++) begin
      bit all1 = 1;
      for (int k = 0; k < 10; k++) all1 &= p[(s + k) % 16];
      if (all1) return 1;
    end
    return 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      ring_pattern_t best;
      pattern = ring_pattern_t'(v);
      #1;
      best = 16'hFFFF;
      for (int k = 0; k < 4; k++)
        for (int m = 0; m < 2; m++)
          if (transform(pattern, k, m[0]) < best) best = transform(pattern, k, m[0]);
      checks++;
      if (rep !== best) begin
        failures++;
        if (failures < 10) $display("FAIL pattern=%h rep=%h expected %h", pattern, rep, best);
      end
      if (is_fast10(pattern) && !seen[rep]) begin
        seen[rep] = 1;
        classes10++;
      end
    end
    checks++;
    if (classes10 != 72) begin failures++; $display("FAIL FAST-10 classes %0d", classes10); end
    $display("FAST-10 corner patterns fall into %0d classes", classes10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
