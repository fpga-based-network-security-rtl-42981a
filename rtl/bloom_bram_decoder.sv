// BRAM decoder of the large Bloom filter: turns the BRAM number of a programming
// request into a one-hot write enable, one line per partial Bloom filter. Nothing is
// selected without valid_request or for a number beyond the last filter.
// Combinational. The decoder's role follows the document; the encoding (binary
// number 0 .. N-1) is this design's choice.
module bloom_bram_decoder #(
  parameter int unsigned N  = 5,                    // number of partial Bloom filters
  parameter int unsigned NW = 3                     // width of the BRAM number
) (
  input  logic          valid_request,
  input  logic [NW-1:0] bram_number,
  output logic [N-1:0]  sel
);
  always_comb begin
    sel = '0;
    for (int i = 0; i < N; i++) sel[i] = valid_request && (32'(bram_number) == i);
  end
endmodule
