// symmetry_table: the reduced corner pattern table of the "symmetry"
// compression method, written as combinational logic.
//
// With symmetry compression the table is only ever indexed by a representative
// pattern (the smallest of a pattern's four 90-degree rotations and the four
// rotations of its mirror image, see symmetry_converter), so it only has to hold
// the representatives of the corner patterns. This module lists those
// representatives and matches its input against each of them: corner = OR over
// the list of (representative == entry). The list is computed at elaboration by
// a constant function: every pattern with FAST_N contiguous ones on the ring
// (all start points, all settings of the other 16-FAST_N bits) is reduced to
// its representative, and each new representative is appended.
// With the segment-test corner set the list has 72 entries for FAST-10 and 144
// for FAST-9. MAX_REPS bounds the list; it must be at least the entry count
// (an elaboration-time check guards this).
// Only representatives are valid inputs; any other pattern gives 0.
// Combinational, no clock. The representative-only table follows the published
// method; its contents are the exact segment test rather than a learned table.
module symmetry_table
  import fast_pkg::*;
#(
  parameter int unsigned FAST_N   = 10,
  parameter int unsigned MAX_REPS = 160
) (
  input  ring_pattern_t representative,
  output logic          corner
);

  // REPS[i*16 +: 16] is entry i; the top 16 bits hold the entry count.
  typedef logic [(MAX_REPS+1)*RING_LEN-1:0] rep_list_t;

  function automatic ring_pattern_t rep_of(input ring_pattern_t p);
    ring_pattern_t best, q, m;
    for (int i = 0; i < RING_LEN; i++) m[i] = p[(RING_LEN - i) % RING_LEN];
    best = p;
    q = p;
    for (int k = 0; k < 4; k++) begin
      if (q < best) best = q;
      if (m < best) best = m;
      q = {q[3:0], q[15:4]};
      m = {m[3:0], m[15:4]};
    end
    return best;
  endfunction

  function automatic rep_list_t build_reps(input int n);
    rep_list_t list;
    int cnt;
    list = '0;
    cnt  = 0;
    for (int s = 0; s < RING_LEN; s++) begin
      for (int f = 0; f < (1 << (RING_LEN - n)); f++) begin
        ring_pattern_t p, r;
        bit found;
        p = '0;
        for (int k = 0; k < n; k++) p[(s + k) % RING_LEN] = 1'b1;
        for (int k = 0; k < RING_LEN - n; k++) p[(s + n + k) % RING_LEN] = f[k];
        r = rep_of(p);
        found = 0;
        for (int i = 0; i < cnt && i < int'(MAX_REPS); i++)
          if (list[i*RING_LEN +: RING_LEN] == r) found = 1;
        if (!found) begin
          if (cnt < int'(MAX_REPS)) list[cnt*RING_LEN +: RING_LEN] = r;
          cnt++;
        end
      end
    end
    list[MAX_REPS*RING_LEN +: RING_LEN] = RING_LEN'(cnt);
    return list;
  endfunction

  localparam rep_list_t REPS   = build_reps(int'(FAST_N));
  localparam int        N_REPS = int'(REPS[MAX_REPS*RING_LEN +: RING_LEN]);

  initial assert (N_REPS <= int'(MAX_REPS))
    else $error("symmetry_table: %0d representatives exceed MAX_REPS", N_REPS);

  always_comb begin
    corner = 1'b0;
    for (int i = 0; i < int'(MAX_REPS); i++)
      if (i < N_REPS && representative == REPS[i*RING_LEN +: RING_LEN])
        corner = 1'b1;
  end

endmodule
