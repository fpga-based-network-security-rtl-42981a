// IDEA encryption engine with mixed inner- and outer-round pipelining.
//
// UNROLL of the eight rounds are built in hardware as 24-stage pipelined rounds
// (idea_round) connected back to back, followed by the output transformation
// (idea_out_tf, 7 stages). When UNROLL < 8 the chain is used 8/UNROLL times: the
// output of the last built round is fed back through a multiplexer to the first.
//   UNROLL = 8 : full mixed pipelining, no loop, one block accepted per clock
//   UNROLL = 4 : partial mixed pipelining, two passes
//   UNROLL = 1 : iterative design, eight passes through one round
// Every pipeline slot carries a valid bit and a pass number. At the multiplexer a
// block coming back for another pass has priority; a new block is accepted
// (in_ready high) whenever the slot arriving at the multiplexer is empty or leaving
// for the output transformation. In the folded designs this gives on average one
// block per 8/UNROLL clocks once the pipeline is full.
// Latency from accepting a block to out_valid: 8 x 24 + 7 = 199 clocks in every
// configuration. Interface: valid/ready on the input, valid only on the output (no
// back-pressure). The key is loaded into the key register of idea_keysched with key_load; it must not
// change while blocks are in flight. With decrypt high at key_load the engine
// decrypts: idea_dec_keys derives the decryption subkeys (key_busy high for about
// 4,300 clocks, in_ready low meanwhile) and the same datapath runs with them.
// The three architectures, the 24-stage round and the 199-stage full pipeline follow
// the document. The slot-based interleaving of blocks in the folded designs, the
// handshake and the key register are this design's own choices.
module idea_cipher
  import idea_pkg::*;
#(
  parameter int unsigned UNROLL = 8    // rounds built in hardware: 1, 2, 4 or 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_load,
  input  logic [127:0] key,
  input  logic         decrypt,      // sampled with key_load: 1 = decryption keys
  output logic         key_busy,     // decryption keys being computed
  input  logic         in_valid,
  output logic         in_ready,
  input  blk_t         in_blk,
  output logic         out_valid,
  output blk_t         out_blk
);
  localparam int unsigned PASSES = ROUNDS / UNROLL;
  localparam int unsigned PW     = (PASSES > 1) ? $clog2(PASSES) : 1;
  localparam logic [PW-1:0] LAST_PASS = PW'(PASSES - 1);

  initial assert (UNROLL inside {1, 2, 4, 8}) else $error("UNROLL must divide 8");

  logic         dec_q, start_q, dk_busy, dk_done;
  ktab_t        ek, dk, ktab;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_q   <= 1'b0;
      start_q <= 1'b0;
    end else begin
      start_q <= key_load && decrypt;
      if (key_load) dec_q <= decrypt;
    end
  end
  idea_keysched u_ks (.clk, .rst_n, .load(key_load), .key, .keys(ek));
  idea_dec_keys u_dk (.clk, .rst_n, .start(start_q), .ek, .busy(dk_busy), .done(dk_done), .dk);
  assign ktab     = dec_q ? dk : ek;
  assign key_busy = start_q || dk_busy;

  // r_*[0]: multiplexer output; r_*[r+1]: output of round r
  logic          r_v [UNROLL+1];
  logic [PW-1:0] r_p [UNROLL+1];
  blk_t          r_x [UNROLL+1];
  logic          mux_v;
  logic [PW-1:0] mux_p;
  blk_t          mux_x;

  // loop-back multiplexer in front of the first round
  logic recirc;
  assign recirc   = r_v[UNROLL] && (r_p[UNROLL] != LAST_PASS);
  assign in_ready = !recirc && !key_busy;
  always_comb begin
    if (recirc) begin
      mux_v = 1'b1;
      mux_p = r_p[UNROLL] + PW'(1);
      mux_x = r_x[UNROLL];
    end else begin
      mux_v = in_valid && !key_busy;
      mux_p = '0;
      mux_x = in_blk;
    end
  end
  assign r_v[0] = mux_v;
  assign r_p[0] = mux_p;
  assign r_x[0] = mux_x;

  for (genvar r = 0; r < UNROLL; r++) begin : g_round
    idea_round #(.UNROLL(UNROLL), .RIDX(r), .PW(PW)) u_round (
      .clk, .rst_n,
      .in_valid (r_v[r]),   .in_pass (r_p[r]),   .x (r_x[r]),
      .keys     (ktab),
      .out_valid(r_v[r+1]), .out_pass(r_p[r+1]), .y (r_x[r+1])
    );
  end

  idea_out_tf u_otf (
    .clk, .rst_n,
    .in_valid (r_v[UNROLL] && (r_p[UNROLL] == LAST_PASS)),
    .x        (r_x[UNROLL]),
    .z        (ktab[ROUNDS]),
    .out_valid(out_valid),
    .c        (out_blk)
  );

  logic unused_done;
  assign unused_done = dk_done;

  // a block leaving for the output transformation has done all passes; checked
  // from the first clock after reset (chk_en keeps rst_n a purely asynchronous net)
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end
  assert property (@(posedge clk) disable iff (!chk_en)
                   r_v[UNROLL] && !recirc |-> r_p[UNROLL] == LAST_PASS);
endmodule
