// Testbench for bloom_hash_gen: ten hashes of random strings against the reference
// loop, one clock latency, and the H3 linearity H(a ^ b) = H(a) ^ H(b).
module tb_bloom_hash_gen;
  import nids_pkg::*;
  import nids_ref_pkg::*;
  logic clk = 0, reset = 1, in_valid = 0, out_valid;
  pat_t str = '0;
  hvec_t h;
  int checks = 0, failures = 0;
  pat_t q [$];
  logic [11:0] last [10];
  pat_t last_s;
  bloom_hash_gen dut (.clk, .reset, .in_valid, .str, .out_valid, .h);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (!reset && out_valid) begin
    pat_t s;
    s = q.pop_front();
    for (int i = 0; i < NHASH; i++) begin
      checks++;
      if (h[i] != ref_hash(s, i)) begin failures++; if (failures < 10) $display("H%0d(%h) = %0d want %0d", i, s, h[i], ref_hash(s, i)); end
    end
    // linearity against the previous string's hashes
    if (q.size() >= 0 && last_s != '0) for (int i = 0; i < NHASH; i++) begin
      checks++;
      if ((h[i] ^ last[i]) != ref_hash(s ^ last_s, i)) failures++;
    end
    for (int i = 0; i < NHASH; i++) last[i] = h[i];
    last_s = s;
  end
  initial begin
    last_s = '0;
    repeat (2) @(posedge clk);
    reset <= 0;
    for (int n = 0; n < 300; n++) begin
      pat_t s;
      s = {$urandom, $urandom, 16'($urandom)};
      if (n == 0) s = 80'h8000_0000_0000_0000_0003;
      if (n == 1) s = '0;
      str <= s; in_valid <= 1; q.push_back(s);
      @(posedge clk);
      // one-clock latency: the string driven before this edge is in h right after it
      #1;
      checks++;
      if (!out_valid) failures++;
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
