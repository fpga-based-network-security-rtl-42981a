// IDEA encryption key register and key schedule.
//
// load writes the 128-bit user key into the key register; from the register the 52
// encryption subkeys are derived: the key is cut into eight 16-bit subkeys (most
// significant first), then rotated left by 25 bits and cut again, and so on until
// 52 subkeys exist. Subkey i (0..51) belongs to group i/6 (rounds 1..8, then the
// output transformation) as key i%6 (Z1..Z6); the two unused slots of the ninth
// group are driven with 0.
// Timing: keys reflects a key from the clock edge at which load is sampled high;
// the subkeys are wiring from the register, so they are stable for as long as the
// key register holds. rst_n (asynchronous, active low) clears the register.
// The schedule follows the document; the key register and its load strobe are this
// design's own choice.
module idea_keysched
  import idea_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key,
  output ktab_t        keys
);
  logic [127:0] key_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    key_q <= '0;
    else if (load) key_q <= key;
  end

  always_comb begin
    logic [127:0] k;
    k = key_q;
    for (int r = 0; r <= ROUNDS; r++)
      for (int j = 0; j < 6; j++) keys[r][j] = '0;
    for (int i = 0; i < NSUBKEYS; i++) begin
      if (i != 0 && i % 8 == 0) k = {k[102:0], k[127:103]};
      keys[i / 6][i % 6] = k[127 - 16*(i % 8) -: 16];
    end
  end
endmodule
