// symmetry_converter: reduces a 16-bit ring pattern to the representative of
// its rotation/mirror class, for the "symmetry" table-compression method.
//
// The eight isomorphic patterns are the four 90-degree rotations of the
// pattern and of its mirror image. A 90-degree rotation moves every state four
// ring places: bit i of the rotated pattern is bit (i+4) mod 16 of the original,
// i.e. {p[3:0], p[15:4]}. The mirror flips the ring about the axis through
// points 0 and 8: bit i takes bit (16-i) mod 16. The representative is the
// smallest of the eight as an unsigned number, found by a three-level tree of
// comparators. Combinational; the enclosing pipeline registers the result.
// The transforms and the smallest-value rule follow the published method; the
// comparator tree is this design's choice.
module symmetry_converter
  import fast_pkg::*;
(
  input  ring_pattern_t pattern,
  output ring_pattern_t representative
);

  ring_pattern_t mirror;
  ring_pattern_t cand [8];
  ring_pattern_t lvl1 [4];
  ring_pattern_t lvl2 [2];

  function automatic ring_pattern_t rot90(input ring_pattern_t p);
    return {p[3:0], p[15:4]};
  endfunction

  function automatic ring_pattern_t min2(input ring_pattern_t a, input ring_pattern_t b);
    return (b < a) ? b : a;
  endfunction

  always_comb begin
    for (int i = 0; i < RING_LEN; i++)
      mirror[i] = pattern[(RING_LEN - i) % RING_LEN];
    cand[0] = pattern;
    cand[4] = mirror;
    for (int k = 1; k < 4; k++) begin
      cand[k]     = rot90(cand[k-1]);
      cand[4 + k] = rot90(cand[3 + k]);
    end
    for (int i = 0; i < 4; i++) lvl1[i] = min2(cand[2*i], cand[2*i+1]);
    for (int i = 0; i < 2; i++) lvl2[i] = min2(lvl1[2*i], lvl1[2*i+1]);
    representative = min2(lvl2[0], lvl2[1]);
  end

endmodule
