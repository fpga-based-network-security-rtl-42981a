// Shared types, constants and small arithmetic helpers for the IDEA datapath.
//
// All IDEA data words are 16-bit unsigned integers. For multiplication modulo
// 2^16+1 the value 0 stands for 2^16. Inside the multiplier operands are kept in
// diminished-one form, d[X] = (X - 1) mod (2^16 + 1), which for every IDEA operand
// fits in 16 bits (the operand 0 = 2^16 maps to 16'hFFFF).
//
// The helpers implement the diminished-one identities the multiplier is built on:
//   d[2^k X]  = iCLS(d[X], k)   k-bit left rotation, rotated-in bits inverted
//   d[-X]     = ~d[X]           one's complement
// The Booth digit encoding (sign + magnitude class) is this design's own choice.
package idea_pkg;

  localparam int unsigned W        = 16;       // IDEA word width
  localparam int unsigned ROUNDS   = 8;        // full rounds before the output transformation
  localparam int unsigned NSUBKEYS = 52;       // 8 x 6 + 4 encryption subkeys
  localparam int unsigned NPPD     = 6;        // Z = (n + 2) / 3 partial products for n = 16
  localparam int unsigned MUL_LAT  = 7;        // pipeline registers in the multiplier
  localparam int unsigned ROUND_LAT = 3 * MUL_LAT + 3;  // 24 stages per round
  localparam int unsigned OUT_LAT  = MUL_LAT;  // output transformation latency

  typedef logic [W-1:0] word_t;
  typedef struct packed {                      // one 64-bit data block, X1 first
    word_t x1, x2, x3, x4;
  } blk_t;
  typedef word_t        rkeys_t [6];           // Z1..Z6 of one round
  typedef rkeys_t       ktab_t  [ROUNDS + 1];  // 9th entry: Z1..Z4 of the output transformation

  // Magnitude class of a radix-8 Booth digit in {-4 .. +4}
  typedef enum logic [2:0] {
    MAG_0 = 3'd0,   // digit 0
    MAG_1 = 3'd1,   // +-1 : rotate by 3i
    MAG_2 = 3'd2,   // +-2 : rotate by 3i+1
    MAG_3 = 3'd3,   // +-3 : rotated d[3A]
    MAG_4 = 3'd4    // +-4 : rotate by 3i+2
  } mag_e;

  typedef struct packed {
    logic neg;      // digit is negative
    mag_e mag;      // magnitude class
  } booth_t;

  // iCLS(x, k) for 0 <= k < 32: d[2^k X] from d[X]. For k >= 16, 2^16 = -1 mod 2^16+1,
  // so d[2^k X] = ~d[2^(k-16) X].
  function automatic word_t icls(input word_t x, input int unsigned k);
    logic [2*W-1:0] xx;
    int unsigned    kk;
    word_t          r;
    kk = k % 16;
    xx = {x, ~x};                    // rotating through the complement gives iCLS
    r  = (kk == 0) ? x : xx[2*W-1-kk -: W];
    if ((k % 32) >= 16) r = ~r;
    return r;
  endfunction

  // Diminished-one addition d[A + B] = d[A] + d[B] + 1 modulo 2^16 + 1:
  // the carry out (weight 2^16 = -1) is fed back inverted into the carry in.
  function automatic word_t dim1_add(input word_t a, input word_t b);
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[W-1:0] + word_t'(!s[W]);
  endfunction

  // Normal <-> diminished-one conversion of IDEA operands (0 stands for 2^16).
  function automatic word_t to_dim1(input word_t x);
    return x - word_t'(1);
  endfunction
  function automatic word_t from_dim1(input word_t d);
    return d + word_t'(1);
  endfunction

endpackage
