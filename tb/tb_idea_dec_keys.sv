// Testbench for idea_dec_keys: for the classic key and two random keys the 52
// decryption subkeys are compared with a reference built from brute-force inverses,
// every multiplicative inverse is checked directly (x * x^-1 = 1), and the busy time
// is checked against 18 inversions x 30 products x 8 clocks per product.
module tb_idea_dec_keys;
  import idea_pkg::*;
  import idea_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key;
  ktab_t ek, dk;
  logic [15:0] z [52], d [52];
  int checks = 0, failures = 0;
  int unsigned cyc = 0, t0 = 0;
  idea_keysched u_ks (.clk, .rst_n, .load(1'b1), .key, .keys(ek));
  idea_dec_keys dut (.clk, .rst_n, .start, .ek, .busy, .done, .dk);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    key = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int unsigned dur;
      key = (t == 0) ? 128'h0001_0002_0003_0004_0005_0006_0007_0008 : {$urandom, $urandom, $urandom, $urandom};
      if (t == 2) key[127:112] = 16'h0000;          // Z1 of round 1 = 0 (stands for 2^16)
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      checks++; if (!busy) failures++;
      wait (done);
      dur = cyc - t0;
      @(negedge clk);
      ref_keys(key, z);
      ref_dec_keys(z, d);
      for (int i = 0; i < 52; i++) begin
        checks++;
        if (dk[i/6][i%6] !== d[i]) begin failures++; if (failures < 10) $display("dk %0d: %h want %h", i, dk[i/6][i%6], d[i]); end
      end
      for (int g = 0; g < 9; g++) begin
        checks += 2;
        if (ref_mul(dk[g][0], ek[8-g][0]) != 1) failures++;
        if (ref_mul(dk[g][3], ek[8-g][3]) != 1) failures++;
      end
      checks++;
      if (dur < 18 * 30 * 8 || dur > 18 * 30 * 8 + 10) begin failures++; $display("busy %0d clocks", dur); end
      checks++; if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
