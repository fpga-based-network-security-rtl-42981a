// Partial Bloom filter (PBF): one Bloom vector of m bits with two lookup ports and one
// write port.
//   reset       (synchronous, active high) clears the whole vector; bloom_ready then
//               reads 1 and stays 1 until the first bit is written
//   set_bit     writes bit_data into vector[bit_addr] at the clock edge (programming)
//   h1, h2      lookup addresses; partial_bloom_match = vector[h1] & vector[h2]
// The lookup is combinational from the addresses to the match, so with registered
// hashes the match follows the string by one clock. The vector is held in
// flip-flops, not a block RAM. The ports and their roles follow the document; the
// exact meaning of bloom_ready after reset and the combinational lookup are this
// design's reading of it.
module bloom_pbf
  import nids_pkg::*;
#(
  parameter int unsigned M  = MBITS,          // Bloom vector size
  parameter int unsigned AW = $clog2(M)       // address width
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          set_bit,
  input  logic          bit_data,
  input  logic [AW-1:0] bit_addr,
  input  logic [AW-1:0] h1,
  input  logic [AW-1:0] h2,
  output logic          bloom_ready,
  output logic          partial_bloom_match
);
  logic [M-1:0] vec;
  always_ff @(posedge clk) begin
    if (reset) begin
      vec         <= '0;
      bloom_ready <= 1'b1;
    end else if (set_bit) begin
      vec[bit_addr] <= bit_data;
      bloom_ready   <= 1'b0;
    end
  end
  assign partial_bloom_match = vec[h1] & vec[h2];
endmodule
