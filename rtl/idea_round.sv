// One IDEA round with inner-round pipelining, 24 stages deep.
//
// Round function (Z1..Z6 the round's subkeys, (*) multiplication mod 2^16+1,
// + addition mod 2^16, ^ XOR):
//   y1 = X1 (*) Z1   y2 = X2 + Z2   y3 = X3 + Z3   y4 = X4 (*) Z4
//   t2 = (y1 ^ y3) (*) Z5           t4 = ((y2 ^ y4) + t2) (*) Z6     t5 = t2 + t4
//   out = {y1 ^ t4, y3 ^ t4, y2 ^ t5, y4 ^ t5}   (middle words swapped)
// Pipeline, with L = 7 multiplier stages (idea_mulmod):
//   stages 1..L        first multiplier layer; the two adders are registered and
//                      delayed to match
//   stage  L+1         the two XORs
//   stages L+2..2L+1   multiplier by Z5
//   stage  2L+2        adder (y2 ^ y4) + t2
//   stages 2L+3..3L+2  multiplier by Z6
//   stage  3L+3        adder t2 + t4 together with the four output XORs
// giving 3L+3 = 24 stages; one block enters per clock. Every block carries a pass
// number: in a folded cipher the same hardware round serves round
// pass*UNROLL + RIDX, and the subkeys are picked from the key table with the pass
// number that travels alongside the data (Z1..Z4 at the input, Z5 and Z6 where their
// multipliers start). The 24-stage depth, the 7-stage multiplier and the single
// stage for adders and XORs follow the document; which operations share a stage is
// this design's choice made to reach that depth.
module idea_round
  import idea_pkg::*;
#(
  parameter int unsigned UNROLL = 8,   // rounds built in hardware
  parameter int unsigned RIDX   = 0,   // position of this round among them
  parameter int unsigned PW     = 1    // width of the pass number
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [PW-1:0] in_pass,
  input  blk_t          x,
  input  ktab_t         keys,
  output logic          out_valid,
  output logic [PW-1:0] out_pass,
  output blk_t          y
);
  localparam int unsigned L = MUL_LAT;

  // valid and pass number along the round
  logic          vld_q  [1:ROUND_LAT];
  logic [PW-1:0] pass_q [1:ROUND_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int s = 1; s <= ROUND_LAT; s++) vld_q[s] <= 1'b0;
    else begin
      vld_q[1] <= in_valid;
      for (int s = 2; s <= ROUND_LAT; s++) vld_q[s] <= vld_q[s-1];
    end
  end
  always_ff @(posedge clk) begin
    pass_q[1] <= in_pass;
    for (int s = 2; s <= ROUND_LAT; s++) pass_q[s] <= pass_q[s-1];
  end

  function automatic int unsigned ridx(input logic [PW-1:0] pass);
    return int'(pass) * UNROLL + RIDX;
  endfunction

  rkeys_t zin, z5k, z6k;
  assign zin = keys[ridx(in_pass)];
  assign z5k = keys[ridx(pass_q[L+1])];
  assign z6k = keys[ridx(pass_q[2*L+2])];

  // layer 1
  word_t y1, y4, y2r, y3r, y2, y3;
  logic  unused_v1, unused_v4, unused_v5, unused_v6;
  idea_mulmod u_m1 (.clk, .rst_n, .in_valid, .a(x.x1), .b(zin[0]), .out_valid(unused_v1), .p(y1));
  idea_mulmod u_m4 (.clk, .rst_n, .in_valid, .a(x.x4), .b(zin[3]), .out_valid(unused_v4), .p(y4));
  always_ff @(posedge clk) begin
    y2r <= x.x2 + zin[1];
    y3r <= x.x3 + zin[2];
  end
  pipe_delay #(.WIDTH(2*W), .DEPTH(L-1)) u_dadd (.clk, .d({y2r, y3r}), .q({y2, y3}));

  // stage L+1: XORs
  word_t t0_q, t1_q;
  always_ff @(posedge clk) begin
    t0_q <= y1 ^ y3;
    t1_q <= y2 ^ y4;
  end
  // y1..y4 are needed again in the last stage (3L+3): delay from stage L to 3L+2
  word_t y1d, y2d, y3d, y4d;
  pipe_delay #(.WIDTH(4*W), .DEPTH(2*L+2)) u_dy (.clk, .d({y1, y2, y3, y4}), .q({y1d, y2d, y3d, y4d}));

  // multiplier by Z5
  word_t t2, t1d;
  idea_mulmod u_m5 (.clk, .rst_n, .in_valid(vld_q[L+1]), .a(t0_q), .b(z5k[4]), .out_valid(unused_v5), .p(t2));
  pipe_delay #(.WIDTH(W), .DEPTH(L)) u_dt1 (.clk, .d(t1_q), .q(t1d));

  // stage 2L+2: adder
  word_t t3_q;
  always_ff @(posedge clk) t3_q <= t1d + t2;
  word_t t2d;
  pipe_delay #(.WIDTH(W), .DEPTH(L+1)) u_dt2 (.clk, .d(t2), .q(t2d));

  // multiplier by Z6
  word_t t4;
  idea_mulmod u_m6 (.clk, .rst_n, .in_valid(vld_q[2*L+2]), .a(t3_q), .b(z6k[5]), .out_valid(unused_v6), .p(t4));

  // stage 3L+3: adder and output XORs
  word_t t5;
  assign t5 = t2d + t4;
  always_ff @(posedge clk) begin
    y.x1 <= y1d ^ t4;
    y.x2 <= y3d ^ t4;
    y.x3 <= y2d ^ t5;
    y.x4 <= y4d ^ t5;
  end

  assign out_valid = vld_q[ROUND_LAT];
  assign out_pass  = pass_q[ROUND_LAT];
endmodule
