// Testbench for bloom_lbf. Follows the waveform scenario of the design: after reset
// the ten hash addresses of the string 80'h8000_0000_0000_0000_0003 are written,
// after which that string matches one clock after it is presented. Then eleven more
// random strings are programmed and members, non-members and random strings are
// queried; every answer is compared with a model of the five Bloom vectors (members
// must always match: no false negatives). Strings programmed into only four of the
// five partial filters must not match.
module tb_bloom_lbf;
  import nids_pkg::*;
  import nids_ref_pkg::*;
  logic clk = 0, reset = 1, valid_request = 0, bit_data = 0, str_valid = 0;
  logic [2:0] bram_number = 0;
  haddr_t bit_addr = 0;
  pat_t str = '0;
  logic match_valid, bloom_match, bloom_ready;
  bvec_t shadow;
  int checks = 0, failures = 0, fp = 0;
  pat_t members [$];

  bloom_lbf dut (.clk, .reset, .valid_request, .bram_number, .bit_data, .bit_addr,
                 .str_valid, .str, .match_valid, .bloom_match, .bloom_ready);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic prog_string(input pat_t s);
    for (int i = 0; i < NHASH; i++) begin
      @(negedge clk);
      valid_request = 1; bram_number = 3'(i / 2); bit_data = 1; bit_addr = ref_hash(s, i);
      shadow[i / 2][ref_hash(s, i)] = 1'b1;
    end
    @(negedge clk); valid_request = 0;
    members.push_back(s);
  endtask

  task automatic query(input pat_t s, input logic must);
    @(negedge clk); str = s; str_valid = 1;
    @(negedge clk); str_valid = 0;
    checks += 2;
    if (!match_valid) failures++;
    if (bloom_match !== ref_bloom(shadow, s)) begin failures++; $display("query %h: %b", s, bloom_match); end
    if (must && !bloom_match) begin failures++; $display("false negative %h", s); end
    if (bloom_match && !must) fp++;
  endtask

  initial begin
    for (int k = 0; k < 5; k++) shadow[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (!bloom_ready) failures++;
    reset = 0;
    query(80'h8000_0000_0000_0000_0003, 0);           // not yet programmed: no match
    prog_string(80'h8000_0000_0000_0000_0003);
    checks++; if (bloom_ready) failures++;
    query(80'h8000_0000_0000_0000_0003, 1);
    for (int n = 0; n < 11; n++) prog_string({$urandom, $urandom, 16'($urandom)});
    foreach (members[i]) query(members[i], 1);
    for (int n = 0; n < 500; n++) query({$urandom, $urandom, 16'($urandom)}, 0);
    // strings whose hash bits are set in only four of the five filters must miss
    for (int n = 0; n < 5; n++) begin
      pat_t s;
      s = {$urandom, $urandom, 16'($urandom)};
      for (int i = 0; i < NHASH; i++) if (i / 2 != n) begin
        @(negedge clk);
        valid_request = 1; bram_number = 3'(i / 2); bit_data = 1; bit_addr = ref_hash(s, i);
        shadow[i / 2][ref_hash(s, i)] = 1'b1;
      end
      @(negedge clk); valid_request = 0;
      query(s, 0);
      checks++;
      if (bloom_match) begin failures++; $display("matched with filter %0d unprogrammed", n); end
    end
    // strings one bit away from a member
    foreach (members[i]) query(members[i] ^ (80'd1 << (i * 7)), 0);
    $display("random strings flagged (false positives): %0d", fp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
