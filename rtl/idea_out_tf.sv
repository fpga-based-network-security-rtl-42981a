// IDEA output transformation, applied after the eighth round:
//   C1 = X1 (*) Z1   C2 = X3 + Z2   C3 = X2 + Z3   C4 = X4 (*) Z4
// with the subkeys Z1..Z4 of the ninth key group. X2 and X3 are exchanged here
// because every round, the eighth included, leaves its middle words swapped.
// The two multiplications use idea_mulmod (7 stages); the adders are registered and
// delayed to the same depth, so the latency is 7 clocks and one block is accepted
// per clock. The operations follow the document; the exchange of the middle words
// here rather than in round 8 is this design's choice.
module idea_out_tf
  import idea_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  blk_t   x,
  input  rkeys_t z,          // Z1..Z4 of the output transformation (Z5, Z6 unused)
  output logic   out_valid,
  output blk_t   c
);
  word_t a2, a3, unused_z5, unused_z6;
  logic  unused_v4;
  assign unused_z5 = z[4];
  assign unused_z6 = z[5];
  idea_mulmod u_m1 (.clk, .rst_n, .in_valid, .a(x.x1), .b(z[0]), .out_valid(out_valid), .p(c.x1));
  idea_mulmod u_m4 (.clk, .rst_n, .in_valid, .a(x.x4), .b(z[3]), .out_valid(unused_v4), .p(c.x4));
  always_ff @(posedge clk) begin
    a2 <= x.x3 + z[1];
    a3 <= x.x2 + z[2];
  end
  pipe_delay #(.WIDTH(2*W), .DEPTH(OUT_LAT-1)) u_d (.clk, .d({a2, a3}), .q({c.x2, c.x3}));
endmodule
