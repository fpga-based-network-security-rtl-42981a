// Diminished-one modulo (2^16 + 1) adder.
//
// Given a = d[A] and b = d[B] it returns d[A + B] = (a + b + 1) mod (2^16 + 1).
// A plain 16-bit adder is used whose carry out, having weight 2^16 = -1, is fed back
// inverted as the carry in (inverted end-around carry). Combinational, no clock.
// The operation follows the diminished-one identity the design is built on; the
// ripple/priority structure is left to synthesis. The result d[0] (= 2^16) cannot
// be represented; it never arises for non-zero residues such as the multiplier's.
module idea_dim1_add
  import idea_pkg::*;
(
  input  word_t a,     // d[A]
  input  word_t b,     // d[B]
  output word_t s      // d[A + B]
);
  logic [W:0] sum;
  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    s   = sum[W-1:0] + word_t'(!sum[W]);
  end
endmodule
