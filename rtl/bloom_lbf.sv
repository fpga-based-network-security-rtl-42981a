// Large Bloom filter (LBF): hash function generator, BRAM decoder and five partial
// Bloom filters whose matches are ANDed.
//
// Query: an 80-bit string enters with str_valid; the ten hashes are registered, PBF k
// looks up hashes 2k and 2k+1, and one clock later bloom_match is 1 when all ten
// bits are set (match_valid marks the cycle). A member string always matches; a
// non-member matches only by chance (false positive).
// Programming: with valid_request high, bit_data is written at bit_addr of the PBF
// selected by bram_number (0..4). To make a string a member, write 1 at address
// H_2k and H_2k+1 of PBF k for k = 0..4.
// bloom_ready is 1 when all five vectors are cleared and unprogrammed.
// Structure and signals follow the document's large Bloom filter; the pairing of
// hashes with PBFs is this design's choice.
module bloom_lbf
  import nids_pkg::*;
(
  input  logic            clk,
  input  logic            reset,         // synchronous, active high
  // programming
  input  logic            valid_request,
  input  logic [BNW-1:0]  bram_number,
  input  logic            bit_data,
  input  haddr_t          bit_addr,
  // query
  input  logic            str_valid,
  input  pat_t            str,
  output logic            match_valid,
  output logic            bloom_match,
  output logic            bloom_ready
);
  hvec_t            h;
  logic [NPBF-1:0]  sel, pmatch, pready;

  bloom_hash_gen u_hash (.clk, .reset, .in_valid(str_valid), .str, .out_valid(match_valid), .h);
  bloom_bram_decoder #(.N(NPBF), .NW(BNW)) u_dec (.valid_request, .bram_number, .sel);

  for (genvar k = 0; k < NPBF; k++) begin : g_pbf
    bloom_pbf #(.M(MBITS)) u_pbf (
      .clk, .reset,
      .set_bit(sel[k]), .bit_data, .bit_addr,
      .h1(h[2*k]), .h2(h[2*k+1]),
      .bloom_ready(pready[k]), .partial_bloom_match(pmatch[k])
    );
  end

  assign bloom_match = &pmatch;
  assign bloom_ready = &pready;
endmodule
