// Reference model of IDEA for the testbenches, written independently of the RTL:
// products modulo 2^16+1 are computed with plain 64-bit integer arithmetic, the key
// schedule by rotating a 128-bit word, and encryption round by round.
package idea_ref_pkg;

  function automatic logic [15:0] ref_mul(input logic [15:0] x, input logic [15:0] y);
    longint unsigned xx, yy;
    xx = (x == 0) ? 64'd65536 : 64'(x);
    yy = (y == 0) ? 64'd65536 : 64'(y);
    return 16'((xx * yy) % 64'd65537);
  endfunction

  // 52 encryption subkeys, index 6*r + j for round r (0..8), key j (0..5)
  function automatic void ref_keys(input logic [127:0] key, output logic [15:0] z [52]);
    logic [127:0] k;
    k = key;
    for (int i = 0; i < 52; i++) begin
      if (i != 0 && i % 8 == 0) k = {k[102:0], k[127:103]};
      z[i] = k[127 - 16*(i%8) -: 16];
    end
  endfunction

  function automatic logic [63:0] ref_round(input logic [63:0] x, input logic [15:0] z [52], input int r);
    logic [15:0] x1, x2, x3, x4, y1, y2, y3, y4, t2, t4, t5;
    {x1, x2, x3, x4} = x;
    y1 = ref_mul(x1, z[6*r]);
    y2 = x2 + z[6*r+1];
    y3 = x3 + z[6*r+2];
    y4 = ref_mul(x4, z[6*r+3]);
    t2 = ref_mul(y1 ^ y3, z[6*r+4]);
    t4 = ref_mul((y2 ^ y4) + t2, z[6*r+5]);
    t5 = t2 + t4;
    return {y1 ^ t4, y3 ^ t4, y2 ^ t5, y4 ^ t5};
  endfunction

  function automatic logic [63:0] ref_outtf(input logic [63:0] x, input logic [15:0] z [52]);
    logic [15:0] x1, x2, x3, x4;
    {x1, x2, x3, x4} = x;
    return {ref_mul(x1, z[48]), 16'(x3 + z[49]), 16'(x2 + z[50]), ref_mul(x4, z[51])};
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [127:0] key);
    logic [15:0] z [52];
    logic [63:0] x;
    ref_keys(key, z);
    x = pt;
    for (int r = 0; r < 8; r++) x = ref_round(x, z, r);
    return ref_outtf(x, z);
  endfunction

  function automatic logic [15:0] ref_inv(input logic [15:0] x);
    // brute force: the y with x * y = 1 mod 65537
    for (int y = 0; y < 65536; y++) if (ref_mul(x, 16'(y)) == 16'd1) return 16'(y);
    return 16'd0;
  endfunction

  // standard decryption subkeys from encryption subkeys
  function automatic void ref_dec_keys(input logic [15:0] z [52], output logic [15:0] d [52]);
    for (int g = 0; g < 9; g++) begin
      int j;
      j = 8 - g;
      d[6*g]     = ref_inv(z[6*j]);
      d[6*g + 3] = ref_inv(z[6*j + 3]);
      d[6*g + 1] = (g == 0 || g == 8) ? -z[6*j + 1] : -z[6*j + 2];
      d[6*g + 2] = (g == 0 || g == 8) ? -z[6*j + 2] : -z[6*j + 1];
      if (g < 8) begin
        d[6*g + 4] = z[6*(j-1) + 4];
        d[6*g + 5] = z[6*(j-1) + 5];
      end
    end
  endfunction

  function automatic logic [63:0] ref_cipher(input logic [63:0] x0, input logic [15:0] z [52]);
    logic [63:0] x;
    x = x0;
    for (int r = 0; r < 8; r++) x = ref_round(x, z, r);
    return ref_outtf(x, z);
  endfunction

endpackage
