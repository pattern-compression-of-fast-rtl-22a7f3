// state_converter: turns the intensities of p and its 16-pixel ring into the
// 16-bit index of the compressed corner pattern table.
//
// For ring point x it forms the two binary states of the split equations:
//   SD[x] = 1 when I(x) <= I(p) - t   (darker)
//   SB[x] = 1 when I(p) + t <= I(x)   (brighter)
// The sums are taken one bit wider than a pixel, so no wrap-around occurs near
// 0 or 255. Because the darker and brighter tables are identical and, for N >= 9,
// never both hit for the same p, only one of them is looked up: the pattern with
// more 1 bits. On a tie SD is passed on (with equal counts neither pattern can
// hold 9 contiguous ones, so the choice cannot change the result).
// Purely combinational; the enclosing pipeline registers its outputs.
// With t = 0 a ring pixel equal to p sets both SD and SB; the published work only
// evaluates t = 50.
module state_converter
  import fast_pkg::*;
(
  input  pixel_t        center,      // I(p)
  input  pixel_t        ring [RING_LEN],  // I(x), x = 0..15
  input  pixel_t        threshold,   // t
  output ring_pattern_t sd,          // darker pattern
  output ring_pattern_t sb,          // brighter pattern
  output ring_pattern_t pattern,     // the one with more 1 bits
  output logic          sel_bright   // 1 when pattern = sb
);

  logic [$clog2(RING_LEN+1)-1:0] n_dark, n_bright;

  always_comb begin
    n_dark   = '0;
    n_bright = '0;
    for (int x = 0; x < RING_LEN; x++) begin
      sd[x] = ({1'b0, ring[x]} + {1'b0, threshold}) <= {1'b0, center};
      sb[x] = ({1'b0, center}  + {1'b0, threshold}) <= {1'b0, ring[x]};
      n_dark   += {4'd0, sd[x]};
      n_bright += {4'd0, sb[x]};
    end
    sel_bright = n_bright > n_dark;
    pattern    = sel_bright ? sb : sd;
  end

endmodule
