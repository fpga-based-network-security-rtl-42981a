// Payload string matcher for network intrusion detection: a sliding window over the
// byte stream, G parallel large Bloom filters (one per window offset) and an analyzer
// that removes Bloom false positives.
//
// Stream: each beat brings G payload bytes (in_data, byte 0 in bits 7:0 is the first
// in stream order); in_sop marks the first beat of a packet. The window keeps the
// last PAT_BYTES-1 bytes of the packet; together with the G new bytes it holds G
// overlapping 10-byte strings, string e ending at new byte e. Engine e hashes string
// e, so every byte position of the packet is the end of exactly one checked string
// and the window moves G bytes per clock. Strings that would reach back before the
// packet's first byte are not reported. A string is presented to the Bloom filter
// with its first byte in bits 79:72.
// Results, two clocks after the beat (out_valid): bloom_hit[e] when engine e's Bloom
// filter flags string e, match[e] when the analyzer confirms it is a pattern
// (match_id[e] which one); bloom_hit without match is a removed false positive.
// Programming: the Bloom write port (valid_request, bram_number, bit_data,
// bit_addr) goes to all engines alike; the analyzer's pattern store has its own.
// The window, the replicated Bloom engines, the 80-bit pattern and the analyzer
// follow the document. G = 4 engines is taken from its figure of four parallel
// engines; the beat format, sop handling and output format are this design's own.
module nids_matcher
  import nids_pkg::*;
#(
  parameter int unsigned G    = 4,           // bytes and Bloom engines per clock
  parameter int unsigned NPAT = 10,          // patterns in the analyzer
  parameter int unsigned IW   = $clog2(NPAT)
) (
  input  logic           clk,
  input  logic           reset,               // synchronous, active high
  // Bloom programming (all engines)
  input  logic           valid_request,
  input  logic [BNW-1:0] bram_number,
  input  logic           bit_data,
  input  haddr_t         bit_addr,
  output logic           bloom_ready,
  // analyzer programming
  input  logic           pat_we,
  input  logic [IW-1:0]  pat_idx,
  input  pat_t           pat_data,
  // payload stream
  input  logic           in_valid,
  input  logic           in_sop,
  input  logic [8*G-1:0] in_data,
  // results
  output logic           out_valid,
  output logic [G-1:0]   bloom_hit,
  output logic [G-1:0]   match,
  output logic [IW-1:0]  match_id [G]
);
  localparam int unsigned HB = PAT_BYTES - 1;      // bytes kept from earlier beats
  localparam int unsigned CW = $clog2(PAT_BYTES + 1);

  logic [7:0]    hist [HB];                         // hist[HB-1] is the newest
  logic [CW-1:0] seen;                              // packet bytes in hist, saturating
  logic [7:0]    win  [HB + G];                     // oldest first
  pat_t          str  [G];
  logic [G-1:0]  str_ok;

  always_comb begin
    for (int i = 0; i < HB; i++) win[i] = hist[i];
    for (int e = 0; e < G; e++)  win[HB + e] = in_data[8*e +: 8];
    for (int e = 0; e < G; e++) begin
      for (int k = 0; k < PAT_BYTES; k++) str[e][PAT_BITS-1-8*k -: 8] = win[e + k];
      // bytes of this packet available up to new byte e
      str_ok[e] = in_valid && ((in_sop ? 0 : int'(seen)) + e + 1 >= PAT_BYTES);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) seen <= '0;
    else if (in_valid) begin
      if ((in_sop ? 0 : int'(seen)) + G >= HB) seen <= CW'(HB);
      else                                     seen <= CW'((in_sop ? 0 : int'(seen)) + G);
    end
    if (in_valid) for (int i = 0; i < HB; i++) hist[i] <= win[i + G];
  end

  // Bloom engines
  logic [G-1:0] bm, mv, rdy;
  for (genvar e = 0; e < G; e++) begin : g_eng
    bloom_lbf u_lbf (
      .clk, .reset,
      .valid_request, .bram_number, .bit_data, .bit_addr,
      .str_valid(str_ok[e]), .str(str[e]),
      .match_valid(mv[e]), .bloom_match(bm[e]), .bloom_ready(rdy[e])
    );
  end
  assign bloom_ready = &rdy;

  // candidate strings delayed to meet the Bloom result
  pat_t         cand [G];
  logic         v1;
  always_ff @(posedge clk) begin
    cand <= str;
    if (reset) v1 <= 1'b0;
    else       v1 <= in_valid;
  end

  logic [G-1:0] flag;
  assign flag = bm & mv;

  fp_analyzer #(.G(G), .NPAT(NPAT), .IW(IW)) u_an (
    .clk, .reset, .pat_we, .pat_idx, .pat_data,
    .cand_flag(flag), .cand, .confirmed(match), .pat_id(match_id)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      bloom_hit <= '0;
    end else begin
      out_valid <= v1;
      bloom_hit <= flag;
    end
  end
endmodule
