// shift_detector: finds the left shift that normalises a signed fraction.
//
// A fraction b0.b1b2...bn (b0 the sign) is normalised, 1/2 <= |f| < 1, when
// b0 differs from b1.  So the shift needed is the index k of the first pair
// (b_k, b_k+1) that differs.  Each pair forms its difference signal (XOR); a
// chain from the most significant end lets only the first difference through
// and inhibits all lower ones; the surviving one-hot signal is encoded into
// the shift length.  none = 1 when no pair differs (zero, or -0 in one's complement).  A
// mapping unit addressed by this length then normalises in one step.
//
// RADIX_COMPLEMENT = 1 gives the two's complement variant: a word of the form
// 1..1 0..0 with two or more leading ones normalises to 1100..0 (-1/2), not
// 100..0, so the shift is one less than the first difference; the all-ones
// word (-2**-n) is shifted to 1100..0 as well instead of being reported as
// unnormalisable.  With 0 the
// detector is the one's complement form.
//
// The difference/inhibit chain and the -1/2 correction follow the document;
// the binary encoding of the shift length and WIDTH = 36 (the CIRRUS
// machine-language word) are this design's choices.  Combinational.
module shift_detector #(
  parameter int unsigned WIDTH            = 36,
  parameter bit          RADIX_COMPLEMENT = 1'b1,
  localparam int unsigned SHIFT_W         = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0]   f,        // f[WIDTH-1] is the sign b0
  output logic [SHIFT_W-1:0] shift,
  output logic               none
);

  // diff[k]: b_k differs from b_k+1, bit b_k being f[WIDTH-1-k].
  logic [WIDTH-2:0] diff, first;
  logic [WIDTH-1:0] inhibit;          // a difference exists above pair k
  logic [SHIFT_W-1:0] raw;
  logic               ones_then_zeros;

  assign inhibit[0] = 1'b0;
  for (genvar k = 0; k < WIDTH - 1; k++) begin : g_pair
    assign diff[k]        = f[WIDTH-1-k] ^ f[WIDTH-2-k];
    assign first[k]       = diff[k] & ~inhibit[k];
    assign inhibit[k + 1] = inhibit[k] | diff[k];
  end

  // Encoding matrix: OR of the indices of the (single) active line.
  always_comb begin
    raw = '0;
    for (int k = 0; k < WIDTH - 1; k++)
      if (first[k]) raw |= SHIFT_W'(k);
  end

  // 1..1 0..0 with at least two leading ones: sign 1, exactly one
  // difference, and it is not the pair (b0, b1).  All ones (-2**-n in two's
  // complement) is the same form with no zeros: it has no difference at all.
  logic all_ones;
  assign all_ones        = &f;
  assign ones_then_zeros = f[WIDTH-1] && inhibit[WIDTH-1] && !diff[0] && !f[0] &&
                           (diff == first);

  always_comb begin
    none  = ~inhibit[WIDTH-1];
    shift = raw;
    if (RADIX_COMPLEMENT) begin
      if (ones_then_zeros) shift = raw - 1'b1;
      else if (all_ones) begin
        shift = SHIFT_W'(WIDTH - 2);
        none  = 1'b0;
      end
    end
  end

endmodule
