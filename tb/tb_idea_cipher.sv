// Testbench for idea_cipher in its three architectures side by side:
//   u8: UNROLL = 8 (default, full mixed pipelining)
//   u4: UNROLL = 4 (partial mixed, two passes)
//   u1: UNROLL = 1 (iterative, eight passes)
//   ud: UNROLL = 8 loaded for decryption, fed with the reference ciphertexts
// All three get the same stream of blocks (the classic test vector first, then
// random ones), offered every clock and held while in_ready is low. Every
// ciphertext is compared with the reference; the 199-clock latency, the rate of one
// block per clock for u8, and the loop-back stalls and average rates of u4 (one
// block per 2 clocks) and u1 (one block per 8 clocks) are checked. ud must
// hold in_ready low while its decryption keys are computed and then return the
// plaintexts.
module tb_idea_cipher;
  import idea_pkg::*;
  import idea_ref_pkg::*;
  localparam int NB = 400;
  localparam logic [127:0] KEY = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
  logic clk = 0, rst_n = 0, key_load = 0;
  logic [3:0] kb;
  logic [127:0] key = '0;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  logic [63:0] pts [NB];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #200000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    pts[0] = 64'h0000_0001_0002_0003;
    for (int i = 1; i < NB; i++) pts[i] = {$urandom, $urandom};
    for (int i = 0; i < NB; i++) cts[i] = ref_encrypt(pts[i], KEY);
  end

  // one driver/checker per architecture
  logic        iv [4], ir [4], ov [4];
  blk_t        ib [4], ob [4];
  int          nin [4], nout [4], stalls [4];
  int unsigned t_first_in [4], t_first_out [4], t_last_in [4];
  logic [63:0] cts [NB];

  idea_cipher #(.UNROLL(8)) u8 (.clk, .rst_n, .key_load, .key, .decrypt(1'b0), .key_busy(kb[0]), .in_valid(iv[0]), .in_ready(ir[0]),
                                .in_blk(ib[0]), .out_valid(ov[0]), .out_blk(ob[0]));
  idea_cipher #(.UNROLL(4)) u4 (.clk, .rst_n, .key_load, .key, .decrypt(1'b0), .key_busy(kb[1]), .in_valid(iv[1]), .in_ready(ir[1]),
                                .in_blk(ib[1]), .out_valid(ov[1]), .out_blk(ob[1]));
  idea_cipher #(.UNROLL(1)) u1 (.clk, .rst_n, .key_load, .key, .decrypt(1'b0), .key_busy(kb[2]), .in_valid(iv[2]), .in_ready(ir[2]),
                                .in_blk(ib[2]), .out_valid(ov[2]), .out_blk(ob[2]));
  idea_cipher ud (.clk, .rst_n, .key_load, .key, .decrypt(1'b1), .key_busy(kb[3]), .in_valid(iv[3]), .in_ready(ir[3]),
                  .in_blk(ib[3]), .out_valid(ov[3]), .out_blk(ob[3]));

  for (genvar g = 0; g < 4; g++) begin : g_chk
    initial begin nin[g] = 0; nout[g] = 0; stalls[g] = 0; iv[g] = 0; ib[g] = '0; end
    always @(posedge clk) if (rst_n) begin
      // input side
      if (iv[g] && ir[g]) begin
        if (nin[g] == 0) t_first_in[g] = cyc;
        t_last_in[g] = cyc;
        nin[g]++;
      end else if (iv[g]) stalls[g]++;
      if (nin[g] < NB) begin
        iv[g] <= 1'b1;
        ib[g] <= (g == 3) ? cts[nin[g]] : pts[nin[g]];   // next block not yet accepted
      end else iv[g] <= 1'b0;
      // output side: blocks leave in order
      if (ov[g]) begin
        logic [63:0] e;
        e = (g == 3) ? pts[nout[g]] : cts[nout[g]];
        if (nout[g] == 0) t_first_out[g] = cyc;
        checks++;
        if (ob[g] !== e) begin
          failures++;
          if (failures < 10) $display("arch %0d block %0d: %h want %h", g, nout[g], ob[g], e);
        end
        nout[g]++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    key <= KEY; key_load <= 1;
    @(posedge clk);
    key_load <= 0;
    // wait for all three to finish
    wait (nout[0] == NB && nout[1] == NB && nout[2] == NB && nout[3] == NB);
    repeat (5) @(posedge clk);
    for (int g = 0; g < 3; g++) begin
      checks++;
      // block taken at edge t_first_in, result sampled 199 edges later
      if (t_first_out[g] - t_first_in[g] != 8 * ROUND_LAT + OUT_LAT) begin
        failures++; $display("arch %0d latency %0d", g, t_first_out[g] - t_first_in[g]);
      end
    end
    checks++;
    if (stalls[0] != 0 || t_last_in[0] - t_first_in[0] != NB - 1) begin
      failures++; $display("full pipeline stalled %0d times", stalls[0]);
    end
    // folded designs: D = 24*UNROLL slots each serve one block per 8/UNROLL passes
    checks += 2;
    if (stalls[1] == 0) begin failures++; $display("partial design never stalled"); end
    if (stalls[2] == 0) begin failures++; $display("iterative design never stalled"); end
    checks++;
    // the iterative design takes at most one new block per 8 clocks on average
    if ((t_last_in[2] - t_first_in[2]) < 8 * (NB - 24) ) begin
      failures++; $display("iterative input span %0d too short", t_last_in[2] - t_first_in[2]);
    end
    // and reach the rates of the architectures: one block per 2 clocks (UNROLL = 4)
    // and one per 8 clocks (UNROLL = 1) once the loop is full
    checks += 2;
    if ((t_last_in[1] - t_first_in[1]) > 2 * NB) begin
      failures++; $display("partial input span %0d too long", t_last_in[1] - t_first_in[1]);
    end
    if ((t_last_in[2] - t_first_in[2]) > 8 * NB) begin
      failures++; $display("iterative input span %0d too long", t_last_in[2] - t_first_in[2]);
    end
    $display("input spans for %0d blocks: full %0d partial %0d iterative %0d", NB,
             t_last_in[0] - t_first_in[0], t_last_in[1] - t_first_in[1], t_last_in[2] - t_first_in[2]);
    checks += 2;
    if (stalls[3] < 3000) begin failures++; $display("decryption did not wait for its keys"); end
    if (kb[3]) failures++;
    $display("stalls: full %0d partial %0d iterative %0d", stalls[0], stalls[1], stalls[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
