// Network security coprocessor top level: the two engines stand side by side and
// share only clock and reset.
//   IDEA engine (idea_cipher): 64-bit block encryption or decryption under a 128-bit
//     key, eight rounds unrolled by default (one block per clock, 199-clock latency).
//   Payload matcher (nids_matcher): scans a byte stream for fixed 10-byte patterns
//     with replicated Bloom filters and removes false positives exactly.
// rst_n is an active-low reset; the IDEA engine uses it asynchronously and the
// matcher, whose Bloom vectors are cleared by it, through a synchronous active-high
// reset taken from a flop that rst_n sets asynchronously and the clock releases
// (hold rst_n low for at least one clock edge). Ports of each engine are
// described in its own module. Placing both in one top is this design's choice: the
// document develops them as two separate modules of one security architecture.
module netsec_top
  import idea_pkg::*;
  import nids_pkg::*;
#(
  parameter int unsigned UNROLL = 8,        // IDEA rounds built in hardware
  parameter int unsigned G      = 4,        // matcher bytes/engines per clock
  parameter int unsigned NPAT   = 10,       // patterns held by the analyzer
  parameter int unsigned IW     = $clog2(NPAT)
) (
  input  logic           clk,
  input  logic           rst_n,
  // IDEA
  input  logic           key_load,
  input  logic [127:0]   key,
  input  logic           idea_decrypt,     // with key_load: decrypt instead of encrypt
  output logic           idea_key_busy,
  input  logic           idea_in_valid,
  output logic           idea_in_ready,
  input  logic [63:0]    idea_in_blk,
  output logic           idea_out_valid,
  output logic [63:0]    idea_out_blk,
  // matcher programming
  input  logic           valid_request,
  input  logic [BNW-1:0] bram_number,
  input  logic           bit_data,
  input  haddr_t         bit_addr,
  output logic           bloom_ready,
  input  logic           pat_we,
  input  logic [IW-1:0]  pat_idx,
  input  pat_t           pat_data,
  // matcher stream
  input  logic           pl_valid,
  input  logic           pl_sop,
  input  logic [8*G-1:0] pl_data,
  output logic           res_valid,
  output logic [G-1:0]   res_bloom_hit,
  output logic [G-1:0]   res_match,
  output logic [IW-1:0]  res_match_id [G]
);
  blk_t in_b, out_b;
  assign in_b         = blk_t'(idea_in_blk);
  assign idea_out_blk = 64'(out_b);

  idea_cipher #(.UNROLL(UNROLL)) u_idea (
    .clk, .rst_n, .key_load, .key, .decrypt(idea_decrypt), .key_busy(idea_key_busy),
    .in_valid(idea_in_valid), .in_ready(idea_in_ready), .in_blk(in_b),
    .out_valid(idea_out_valid), .out_blk(out_b)
  );

  // matcher reset: asserted at once with rst_n, released on the first clock edge
  // after rst_n rises, so rst_n itself drives only asynchronous resets
  logic nids_reset;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nids_reset <= 1'b1;
    else        nids_reset <= 1'b0;
  end

  nids_matcher #(.G(G), .NPAT(NPAT), .IW(IW)) u_nids (
    .clk, .reset(nids_reset),
    .valid_request, .bram_number, .bit_data, .bit_addr, .bloom_ready,
    .pat_we, .pat_idx, .pat_data,
    .in_valid(pl_valid), .in_sop(pl_sop), .in_data(pl_data),
    .out_valid(res_valid), .bloom_hit(res_bloom_hit), .match(res_match), .match_id(res_match_id)
  );
endmodule
