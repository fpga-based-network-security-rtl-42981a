// Testbench for idea_out_tf: streams random blocks and subkeys and compares with the
// reference output transformation (middle words exchanged); checks the 7-clock
// latency.
module tb_idea_out_tf;
  import idea_pkg::*;
  import idea_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  blk_t x = '0, c;
  rkeys_t zk;
  int checks = 0, failures = 0, nout = 0;
  int unsigned cyc = 0, t_in = 0, t_out = 0;
  logic [63:0] qx [$], qk [$];

  idea_out_tf dut (.clk, .rst_n, .in_valid, .x, .z(zk), .out_valid, .c);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial for (int j = 0; j < 6; j++) zk[j] = '0;

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] ix, ik, e;
    logic [15:0] z [52];
    ix = qx.pop_front(); ik = qk.pop_front();
    for (int i = 0; i < 52; i++) z[i] = '0;
    {z[48], z[49], z[50], z[51]} = ik;
    if (nout == 0) t_out = cyc;
    nout++;
    e = ref_outtf(ix, z);
    checks++;
    if (c !== e) begin failures++; if (failures < 10) $display("otf: %h want %h", c, e); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      logic [63:0] v, k;
      v = {$urandom, $urandom}; k = {$urandom, $urandom};
      if (i == 1) begin v = '0; k = '0; end
      x <= v; {zk[0], zk[1], zk[2], zk[3]} <= k; in_valid <= 1;
      qx.push_back(v); qk.push_back(k);
      if (i == 0) t_in = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
    checks += 2;
    if (nout != 300) failures++;
    if (t_out - t_in != OUT_LAT + 1) begin failures++; $display("latency %0d", t_out - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
