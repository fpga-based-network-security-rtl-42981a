// Testbench for nids_matcher (G = 4 engines). Ten patterns are programmed into the
// Bloom filters and the analyzer; one more "decoy" string only into the Bloom
// filters, so that it is a deliberate Bloom false positive. Packets of random bytes
// with patterns and decoys planted at random offsets stream in, with idle clocks in
// between. For every beat and engine the expected Bloom flag (from a model of the
// Bloom vectors) and the expected confirmed match are computed from the packet bytes
// and compared with the outputs two clocks later. Counted mechanisms: confirmed
// matches, false positives removed, a pattern split across two packets that must not
// be reported; each must occur.
module tb_nids_matcher;
  import nids_pkg::*;
  import nids_ref_pkg::*;
  localparam int G = 4;
  logic clk = 0, reset = 1;
  logic valid_request = 0, bit_data = 0, bloom_ready;
  logic [2:0] bram_number = 0;
  haddr_t bit_addr = 0;
  logic pat_we = 0;
  logic [3:0] pat_idx = 0;
  pat_t pat_data = '0;
  logic in_valid = 0, in_sop = 0;
  logic [8*G-1:0] in_data = '0;
  logic out_valid;
  logic [G-1:0] bloom_hit, match;
  logic [3:0] match_id [G];

  nids_matcher #(.G(G), .NPAT(10)) dut (.clk, .reset, .valid_request, .bram_number, .bit_data,
    .bit_addr, .bloom_ready, .pat_we, .pat_idx, .pat_data, .in_valid, .in_sop, .in_data,
    .out_valid, .bloom_hit, .match, .match_id);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_match = 0, n_fp = 0, n_split = 0, n_beats = 0;
  bvec_t shadow;
  pat_t pats [10];
  pat_t decoy;

  typedef struct { logic [G-1:0] bh; logic [G-1:0] m; int id [G]; } exp_t;
  exp_t expq [$];

  initial begin
    #5000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic bloom_add(input pat_t s);
    for (int i = 0; i < NHASH; i++) begin
      @(negedge clk);
      valid_request = 1; bram_number = 3'(i / 2); bit_data = 1; bit_addr = ref_hash(s, i);
      shadow[i / 2][ref_hash(s, i)] = 1'b1;
    end
    @(negedge clk); valid_request = 0;
  endtask

  function automatic pat_t str_at(input logic [7:0] b [$], input int end_pos);
    pat_t s;
    for (int k = 0; k < PAT_BYTES; k++) s[79 - 8*k -: 8] = b[end_pos - 9 + k];
    return s;
  endfunction

  // compare outputs with the queue of expectations
  always @(posedge clk) if (!reset && out_valid) begin
    exp_t e;
    e = expq.pop_front();
    for (int g = 0; g < G; g++) begin
      checks++;
      if (bloom_hit[g] !== e.bh[g] || match[g] !== e.m[g] || (e.m[g] && match_id[g] != 4'(e.id[g]))) begin
        failures++;
        if (failures < 10) $display("engine %0d: bloom %b match %b id %0d, want %b %b %0d", g,
                                    bloom_hit[g], match[g], match_id[g], e.bh[g], e.m[g], e.id[g]);
      end
      if (match[g]) n_match++;
      if (bloom_hit[g] && !match[g]) n_fp++;
    end
  end

  task automatic send_packet(input logic [7:0] b [$]);
    int nb;
    nb = b.size() / G;
    for (int t = 0; t < nb; t++) begin
      exp_t e;
      @(negedge clk);
      in_valid = 1; in_sop = (t == 0);
      for (int g = 0; g < G; g++) begin
        int p;
        pat_t s;
        in_data[8*g +: 8] = b[t*G + g];
        p = t*G + g;
        e.bh[g] = 0; e.m[g] = 0; e.id[g] = 0;
        if (p >= PAT_BYTES - 1) begin
          s = str_at(b, p);
          e.bh[g] = ref_bloom(shadow, s);
          for (int q = 0; q < 10; q++) if (s == pats[q]) begin e.m[g] = e.bh[g]; e.id[g] = q; break; end
        end
      end
      expq.push_back(e);
      n_beats++;
      if ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0; in_sop = 0;
  endtask

  initial begin
    logic [7:0] pkt [$];
    for (int k = 0; k < 5; k++) shadow[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int p = 0; p < 10; p++) begin
      pats[p] = {$urandom, $urandom, 16'($urandom)};
      bloom_add(pats[p]);
      @(negedge clk); pat_we = 1; pat_idx = 4'(p); pat_data = pats[p];
      @(negedge clk); pat_we = 0;
    end
    decoy = {$urandom, $urandom, 16'($urandom)};
    bloom_add(decoy);
    checks++; if (bloom_ready) failures++;

    for (int n = 0; n < 60; n++) begin
      int len;
      len = G * $urandom_range(3, 12);
      pkt.delete();
      for (int i = 0; i < len; i++) pkt.push_back(8'($urandom));
      // plant up to two strings
      for (int k = 0; k < 2; k++) begin
        int pos;
        pat_t s;
        s = ($urandom_range(3) == 0) ? decoy : pats[$urandom_range(9)];
        pos = $urandom_range(len - PAT_BYTES);
        for (int j = 0; j < PAT_BYTES; j++) pkt[pos + j] = s[79 - 8*j -: 8];
      end
      // every tenth packet ends with the first k bytes of a pattern and the next
      // one starts with the rest (k = 1, 2, ... 6)
      if (n % 10 == 5) begin
        int k;
        k = 1 + n / 10;
        for (int j = 0; j < k; j++) pkt[len - k + j] = pats[0][79 - 8*j -: 8];
      end
      if (n % 10 == 6) begin
        int k;
        k = 1 + n / 10;
        for (int j = k; j < PAT_BYTES; j++) pkt[j - k] = pats[0][79 - 8*j -: 8];
        n_split++;
      end
      send_packet(pkt);
    end
    repeat (6) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    checks += 3;
    if (n_match == 0) begin failures++; $display("no confirmed match"); end
    if (n_fp == 0)    begin failures++; $display("no false positive removed"); end
    if (n_split == 0) begin failures++; $display("no split pattern"); end
    $display("beats %0d, matches %0d, false positives removed %0d, split patterns ignored %0d",
             n_beats, n_match, n_fp, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
