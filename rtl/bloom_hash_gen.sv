// Hash function generator of the Bloom filter: ten H3-class hashes of an 80-bit
// string, H_i(S) = XOR_j (d_ij AND s_j), each 12 bits wide (range 0 .. 4095).
// Bit j of the string (str[j]) selects table entry d_ij (see nids_pkg for the table).
// The hashes are registered: they appear one clock after the string, with
// out_valid, and a new string is accepted every clock. The hash class, the 10 x 10 x 8
// table shape, the 12-bit width and the registered output follow the document; the
// table's values are this design's own.
module bloom_hash_gen
  import nids_pkg::*;
(
  input  logic  clk,
  input  logic  reset,        // synchronous, active high
  input  logic  in_valid,
  input  pat_t  str,
  output logic  out_valid,
  output hvec_t h
);
  hvec_t  h_c;
  haddr_t term [NHASH][PAT_BITS];     // d_ij AND s_j

  for (genvar i = 0; i < NHASH; i++) begin : g_h
    for (genvar j = 0; j < PAT_BITS; j++) begin : g_b
      localparam haddr_t D = coef(i, j);
      assign term[i][j] = D & {HW{str[j]}};
    end
  end

  always_comb begin
    for (int i = 0; i < NHASH; i++) begin
      h_c[i] = '0;
      for (int j = 0; j < PAT_BITS; j++) h_c[i] ^= term[i][j];
    end
  end
  always_ff @(posedge clk) begin
    h <= h_c;
    if (reset) out_valid <= 1'b0;
    else       out_valid <= in_valid;
  end
endmodule
