// Testbench for bloom_pbf: after reset every lookup misses and bloom_ready is 1;
// random bits are set and cleared through the write port while a shadow copy of the
// vector is kept; random and targeted lookups (both bits set, only one of them set)
// are compared with the shadow copy.
module tb_bloom_pbf;
  logic clk = 0, reset = 1, set_bit = 0, bit_data = 0, bloom_ready, pm;
  logic [11:0] bit_addr = '0, h1 = '0, h2 = '0;
  logic [4095:0] shadow = '0;
  int checks = 0, failures = 0;
  logic [11:0] written [$];
  bloom_pbf dut (.clk, .reset, .set_bit, .bit_data, .bit_addr, .h1, .h2,
                 .bloom_ready, .partial_bloom_match(pm));
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic look(input logic [11:0] a, input logic [11:0] b);
    h1 = a; h2 = b; #1;
    checks++;
    if (pm !== (shadow[a] & shadow[b])) begin
      failures++; if (failures < 10) $display("lookup %0d %0d: %b", a, b, pm);
    end
  endtask
  initial begin
    @(posedge clk); @(posedge clk);
    #1;
    checks++; if (!bloom_ready) begin failures++; $display("not ready after reset"); end
    reset = 0;
    for (int i = 0; i < 50; i++) look(12'($urandom), 12'($urandom));
    look(0, 0); look(4095, 4095);
    // program
    for (int i = 0; i < 300; i++) begin
      logic [11:0] a;
      logic d;
      a = 12'($urandom);
      d = (i % 5 != 4);
      @(negedge clk); set_bit = 1; bit_addr = a; bit_data = d;
      @(posedge clk); #1; set_bit = 0;
      shadow[a] = d;
      if (d) written.push_back(a);
      if (i == 0) begin checks++; if (bloom_ready) begin failures++; $display("ready stays after write"); end end
    end
    // one address set, the other clear, in both orders
    for (int i = 0; i < 200; i++) begin
      logic [11:0] u;
      do u = 12'($urandom); while (shadow[u]);
      look(written[$urandom_range(written.size() - 1)], u);
      look(u, written[$urandom_range(written.size() - 1)]);
    end
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 0 && written.size() > 1)
        look(written[$urandom_range(written.size() - 1)], written[$urandom_range(written.size() - 1)]);
      else
        look(12'($urandom), written[$urandom_range(written.size() - 1)]);
    end
    // reset clears everything
    @(negedge clk); reset = 1; @(posedge clk); #1; reset = 0; shadow = '0;
    checks++; if (!bloom_ready) failures++;
    foreach (written[i]) look(written[i], written[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
