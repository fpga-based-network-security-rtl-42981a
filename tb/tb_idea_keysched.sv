// Testbench for idea_keysched. After reset every subkey must be 0. Then the classic
// key 0001 0002 ... 0008 and random keys are loaded; after each load edge all 52
// subkeys are compared with the reference schedule, and for the classic key the
// first eight subkeys (1, 2, ..., 8) and the ninth (key rotated left by 25 bits:
// 0x0400) are checked directly. A key presented without load must not change the
// subkeys, and the new subkeys must appear at the load edge, not before.
module tb_idea_keysched;
  import idea_pkg::*;
  import idea_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [127:0] key = '0, held;
  ktab_t keys;
  logic [15:0] z [52];
  int checks = 0, failures = 0;
  idea_keysched dut (.clk, .rst_n, .load, .key, .keys);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic compare(input logic [127:0] k);
    ref_keys(k, z);
    for (int i = 0; i < 52; i++) begin
      checks++;
      if (keys[i/6][i%6] != z[i]) begin
        failures++;
        if (failures < 10) $display("key %0d: %h want %h", i, keys[i/6][i%6], z[i]);
      end
    end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1;
    for (int g = 0; g <= ROUNDS; g++)
      for (int j = 0; j < 6; j++) begin checks++; if (keys[g][j] != 0) failures++; end
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      key = (t == 0) ? 128'h0001_0002_0003_0004_0005_0006_0007_0008
                     : {$urandom, $urandom, $urandom, $urandom};
      load = 1;
      if (t > 0) begin #1; compare(held); end     // not yet taken before the edge
      @(posedge clk); #1;
      load = 0;
      held = key;
      compare(key);
      if (t == 0) begin
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (keys[i/6][i%6] != 16'(i + 1)) failures++;
        end
        checks++;
        if (keys[1][2] != 16'h0400) begin failures++; $display("Z3(2) = %h", keys[1][2]); end
      end
      // a different key without load is ignored
      key = ~key;
      @(posedge clk); #1;
      compare(held);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
