// End-to-end testbench for netsec_top with every parameter at its default (eight
// IDEA rounds unrolled, four matcher engines). Both engines run at the same time:
//  - IDEA: the key is loaded, the classic test vector (key 0001 0002 ... 0008,
//    plaintext 0000 0001 0002 0003 -> ciphertext 11FB ED2B 0198 6DE5) and 1000
//    random blocks are encrypted, mostly back to back with some idle clocks;
//    every ciphertext, the 199-clock latency and the absence of stalls are checked.
//    Then the key is reloaded for decryption; while the decryption subkeys are
//    computed in_ready must stay low, and afterwards 200 ciphertexts must decrypt
//    to their plaintexts.
//  - Matcher: ten patterns and one Bloom-only decoy are programmed; packets with
//    planted patterns and decoys are scanned and every flag is compared with a model.
// Counted mechanisms, each of which must occur: blocks accepted on consecutive
// clocks, clocks refused while decryption keys are computed, confirmed pattern matches, Bloom false positives removed by the analyzer,
// a pattern split across two packets that is not reported.
module tb_netsec_top;
  import nids_pkg::*;
  import nids_ref_pkg::*;
  import idea_ref_pkg::*;
  localparam int G = 4;
  localparam int NB = 1000;
  localparam logic [127:0] KEY = 128'h0001_0002_0003_0004_0005_0006_0007_0008;

  logic clk = 0, rst_n = 0;
  logic key_load = 0;
  logic [127:0] key = '0;
  logic idea_decrypt = 0, idea_key_busy;
  logic idea_in_valid = 0, idea_in_ready, idea_out_valid;
  logic [63:0] idea_in_blk = '0, idea_out_blk;
  logic valid_request = 0, bit_data = 0, bloom_ready;
  logic [2:0] bram_number = 0;
  haddr_t bit_addr = 0;
  logic pat_we = 0;
  logic [3:0] pat_idx = 0;
  pat_t pat_data = '0;
  logic pl_valid = 0, pl_sop = 0;
  logic [8*G-1:0] pl_data = '0;
  logic res_valid;
  logic [G-1:0] res_bloom_hit, res_match;
  logic [3:0] res_match_id [G];

  netsec_top dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- IDEA side ----------------
  logic [63:0] pts [NB];
  int nin = 0, nout = 0, b2b = 0, stalls = 0, key_stalls = 0, ndec = 0;
  logic dec_phase = 0;
  int unsigned t_in0 = 0, t_out0 = 0;
  logic idea_done = 0;
  logic prev_acc = 0;

  always @(posedge clk) if (rst_n) begin
    if (idea_in_valid && idea_in_ready) begin
      if (nin == 0) t_in0 = cyc;
      if (prev_acc) b2b++;
      nin++;
    end else if (idea_in_valid && dec_phase && idea_key_busy) key_stalls++;
    else if (idea_in_valid) stalls++;
    prev_acc <= idea_in_valid && idea_in_ready;
    if (idea_out_valid && dec_phase) begin
      checks++;
      if (idea_out_blk !== pts[ndec]) begin failures++; if (failures < 10) $display("decrypt %0d: %h want %h", ndec, idea_out_blk, pts[ndec]); end
      ndec++;
    end else if (idea_out_valid) begin
      logic [63:0] e;
      e = ref_encrypt(pts[nout], KEY);
      if (nout == 0) begin
        t_out0 = cyc;
        checks++;
        if (idea_out_blk !== 64'h11FB_ED2B_0198_6DE5) begin failures++; $display("test vector: %h", idea_out_blk); end
      end
      checks++;
      if (idea_out_blk !== e) begin failures++; if (failures < 10) $display("block %0d: %h want %h", nout, idea_out_blk, e); end
      nout++;
    end
  end

  initial begin
    pts[0] = 64'h0000_0001_0002_0003;
    for (int i = 1; i < NB; i++) pts[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1; key = KEY; key_load = 1;
    @(negedge clk); key_load = 0;
    for (int i = 0; i < NB; i++) begin
      idea_in_valid = 1; idea_in_blk = pts[i];
      @(negedge clk);
      if ($urandom_range(9) == 0) begin idea_in_valid = 0; @(negedge clk); end
    end
    idea_in_valid = 0;
    wait (nout == NB);
    // decryption
    @(negedge clk); dec_phase = 1; key_load = 1; idea_decrypt = 1;
    @(negedge clk); key_load = 0; idea_decrypt = 0;
    for (int i = 0; i < 200; i++) begin
      idea_in_valid = 1; idea_in_blk = ref_encrypt(pts[i], KEY);
      #1;
      while (!idea_in_ready) begin @(negedge clk); #1; end
      @(negedge clk);          // taken at the rising edge just passed
    end
    idea_in_valid = 0;
    wait (ndec == 200);
    idea_done = 1;
  end

  // ---------------- matcher side ----------------
  int n_match = 0, n_fp = 0, n_split = 0;
  bvec_t shadow;
  pat_t pats [10];
  pat_t decoy;
  logic nids_done = 0;
  typedef struct { logic [G-1:0] bh; logic [G-1:0] m; int id [G]; } exp_t;
  exp_t expq [$];

  task automatic bloom_add(input pat_t s);
    for (int i = 0; i < NHASH; i++) begin
      @(negedge clk);
      valid_request = 1; bram_number = 3'(i / 2); bit_data = 1; bit_addr = ref_hash(s, i);
      shadow[i / 2][ref_hash(s, i)] = 1'b1;
    end
    @(negedge clk); valid_request = 0;
  endtask

  always @(posedge clk) if (rst_n && res_valid) begin
    exp_t e;
    e = expq.pop_front();
    for (int g = 0; g < G; g++) begin
      checks++;
      if (res_bloom_hit[g] !== e.bh[g] || res_match[g] !== e.m[g] || (e.m[g] && res_match_id[g] != 4'(e.id[g]))) begin
        failures++;
        if (failures < 10) $display("engine %0d: %b %b want %b %b", g, res_bloom_hit[g], res_match[g], e.bh[g], e.m[g]);
      end
      if (res_match[g]) n_match++;
      if (res_bloom_hit[g] && !res_match[g]) n_fp++;
    end
  end

  task automatic send_packet(input logic [7:0] b [$]);
    for (int t = 0; t < b.size() / G; t++) begin
      exp_t e;
      @(negedge clk);
      pl_valid = 1; pl_sop = (t == 0);
      for (int g = 0; g < G; g++) begin
        int p;
        pat_t s;
        pl_data[8*g +: 8] = b[t*G + g];
        p = t*G + g;
        e.bh[g] = 0; e.m[g] = 0; e.id[g] = 0;
        if (p >= PAT_BYTES - 1) begin
          for (int k = 0; k < PAT_BYTES; k++) s[79 - 8*k -: 8] = b[p - 9 + k];
          e.bh[g] = ref_bloom(shadow, s);
          for (int q = 0; q < 10; q++) if (s == pats[q]) begin e.m[g] = e.bh[g]; e.id[g] = q; break; end
        end
      end
      expq.push_back(e);
    end
    @(negedge clk); pl_valid = 0; pl_sop = 0;
  endtask

  initial begin
    logic [7:0] pkt [$];
    for (int k = 0; k < 5; k++) shadow[k] = '0;
    wait (rst_n);
    checks++; @(negedge clk); if (!bloom_ready) begin failures++; $display("Bloom filters not ready after reset"); end
    for (int p = 0; p < 10; p++) begin
      pats[p] = {$urandom, $urandom, 16'($urandom)};
      bloom_add(pats[p]);
      @(negedge clk); pat_we = 1; pat_idx = 4'(p); pat_data = pats[p];
      @(negedge clk); pat_we = 0;
    end
    decoy = {$urandom, $urandom, 16'($urandom)};
    bloom_add(decoy);
    for (int n = 0; n < 40; n++) begin
      int len;
      len = G * $urandom_range(3, 16);
      pkt.delete();
      for (int i = 0; i < len; i++) pkt.push_back(8'($urandom));
      for (int k = 0; k < 2; k++) begin
        int pos;
        pat_t s;
        s = ($urandom_range(3) == 0) ? decoy : pats[$urandom_range(9)];
        pos = $urandom_range(len - PAT_BYTES);
        for (int j = 0; j < PAT_BYTES; j++) pkt[pos + j] = s[79 - 8*j -: 8];
      end
      if (n % 10 == 3) for (int j = 0; j < 4; j++) pkt[len - 4 + j] = pats[1][79 - 8*j -: 8];
      if (n % 10 == 4) begin
        for (int j = 4; j < PAT_BYTES; j++) pkt[j - 4] = pats[1][79 - 8*j -: 8];
        n_split++;
      end
      send_packet(pkt);
    end
    repeat (6) @(posedge clk);
    nids_done = 1;
  end

  initial begin
    wait (idea_done && nids_done);
    repeat (4) @(posedge clk);
    checks++;
    if (t_out0 - t_in0 != 199) begin failures++; $display("IDEA latency %0d", t_out0 - t_in0); end
    checks++; if (stalls != 0) begin failures++; $display("IDEA stalled %0d times", stalls); end
    checks++; if (expq.size() != 0) begin failures++; $display("matcher results missing"); end
    checks += 5;
    if (key_stalls == 0) begin failures++; $display("decryption key wait never seen"); end
    if (b2b == 0)     begin failures++; $display("no back-to-back blocks"); end
    if (n_match == 0) begin failures++; $display("no confirmed match"); end
    if (n_fp == 0)    begin failures++; $display("no false positive removed"); end
    if (n_split == 0) begin failures++; $display("no split pattern"); end
    $display("IDEA: %0d blocks decrypted after %0d clocks of key computation", ndec, key_stalls);
    $display("IDEA: %0d blocks, %0d back to back; matcher: %0d matches, %0d false positives removed, %0d split patterns ignored",
             nout, b2b, n_match, n_fp, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
