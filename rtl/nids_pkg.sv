// Shared constants and the hash coefficient table of the Bloom-filter string matcher.
//
// Patterns are 80 bits (10 bytes) long. Each string is hashed by NHASH = 10 hash
// functions of the H3 class into 12-bit addresses of Bloom vectors of m = 4096 bits;
// five partial Bloom filters each check two of the ten addresses.
//
// H3 hashing: H_i(S) = XOR over all bits s_j of S of (d_ij AND s_j), with a table of
// 12-bit random constants d_ij arranged as 10 blocks (one per hash) x 10 rows (one
// per byte) x 8 columns (one per bit). The table values are this design's own: they
// are produced by coef() below from the index i*80 + j with an integer mixing
// function (multiply by 0x9E3779B1, xor-shift 15, multiply by 0x85EBCA77, xor-shift
// 13, keep bits 11:0). Any other random table works the same way.
package nids_pkg;

  localparam int unsigned PAT_BYTES = 10;                 // pattern length in bytes
  localparam int unsigned PAT_BITS  = 8 * PAT_BYTES;      // 80
  localparam int unsigned NHASH     = 10;                 // hash functions per string
  localparam int unsigned HW        = 12;                 // hash width
  localparam int unsigned MBITS     = 1 << HW;            // Bloom vector size m = 4096
  localparam int unsigned NPBF      = NHASH / 2;          // partial Bloom filters
  localparam int unsigned BNW       = 3;                  // width of the BRAM number

  typedef logic [HW-1:0]       haddr_t;
  typedef logic [PAT_BITS-1:0] pat_t;
  typedef haddr_t              hvec_t   [NHASH];

  // d_ij: coefficient of bit j (j = 8*row + column) in hash i
  function automatic haddr_t coef(input int unsigned i, input int unsigned j);
    logic [31:0] x;
    x = 32'(i * PAT_BITS + j + 1) * 32'h9E3779B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EBCA77;
    x = x ^ (x >> 13);
    return x[HW-1:0];
  endfunction

endpackage
