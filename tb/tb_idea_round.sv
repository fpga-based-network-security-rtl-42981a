// Testbench for idea_round: a round at position 1 of a 4-round unrolled chain
// (UNROLL = 4, PW = 1) gets one block per clock with random pass numbers, so it must
// act as round 1 or round 5; each result is compared with the reference round and
// the 24-clock latency is checked.
module tb_idea_round;
  import idea_pkg::*;
  import idea_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic in_pass = 0, out_pass;
  blk_t x = '0, y;
  ktab_t keys;
  logic [15:0] z [52];
  logic [127:0] key = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;
  int checks = 0, failures = 0, nout = 0;
  int unsigned cyc = 0, t_in = 0, t_out = 0;
  logic [63:0] qx [$];
  logic        qp [$];

  idea_keysched u_ks (.clk, .rst_n(1'b1), .load(1'b1), .key, .keys);
  idea_round #(.UNROLL(4), .RIDX(1), .PW(1)) dut (.clk, .rst_n, .in_valid, .in_pass, .x, .keys,
                                                  .out_valid, .out_pass, .y);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial ref_keys(key, z);

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] ix, e;
    logic ip;
    ix = qx.pop_front(); ip = qp.pop_front();
    if (nout == 0) t_out = cyc;
    nout++;
    e = ref_round(ix, z, ip ? 5 : 1);
    checks += 2;
    if (y !== e) begin failures++; if (failures < 10) $display("round: %h want %h", y, e); end
    if (out_pass !== ip) failures++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      logic [63:0] v;
      logic p;
      v = {$urandom, $urandom};
      if (i == 0) v = '0;
      p = 1'($urandom);
      x <= v; in_pass <= p; in_valid <= (i % 7 != 3);
      if (i % 7 != 3) begin qx.push_back(v); qp.push_back(p); end
      if (i == 0) t_in = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (nout != 500 - 71) begin failures++; $display("outputs %0d", nout); end
    checks++;
    // block driven after edge E0, taken at E1, in the 24th register after E24,
    // sampled by the checker at E25
    if (t_out - t_in != ROUND_LAT + 1) begin failures++; $display("latency %0d", t_out - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
