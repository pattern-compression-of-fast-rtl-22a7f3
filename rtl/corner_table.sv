// corner_table: the compressed corner pattern table of FAST-N, written as
// combinational logic instead of a memory.
//
// Input is a 16-bit binary ring pattern (bit x = state of ring point x, from
// either the darker or the brighter split equation); output is 1 when the
// pattern is a corner pattern. The table holds the segment-test patterns: those
// with at least FAST_N contiguous ones on the circular ring. The logic is the OR,
// over the 16 possible start points, of the AND of FAST_N consecutive bits.
// For FAST_N = 10 this table has 513 entries, for FAST_N = 9 it has 1,025.
// Combinational, no clock. The published table was taken from a machine-learned
// decision tree; this one is the exact segment test, which has the same 513
// entries for FAST-10 and one entry fewer for FAST-9.
module corner_table
  import fast_pkg::*;
#(
  parameter int unsigned FAST_N = 10
) (
  input  ring_pattern_t pattern,
  output logic          corner
);

  initial assert (FAST_N >= 9 && FAST_N <= RING_LEN)
    else $error("corner_table: FAST_N must be 9..16 for the split table to be exact");

  logic [RING_LEN-1:0] arc_full;   // arc_full[s]: bits s..s+N-1 (mod 16) all set

  always_comb begin
    for (int s = 0; s < RING_LEN; s++) begin
      arc_full[s] = 1'b1;
      for (int k = 0; k < FAST_N; k++)
        arc_full[s] &= pattern[(s + k) % RING_LEN];
    end
    corner = |arc_full;
  end

endmodule
