// Testbench for fp_analyzer: ten patterns are stored; flagged candidates that equal
// a pattern must be confirmed with its index, flagged non-patterns and unflagged
// patterns must not; result one clock after the candidates.
module tb_fp_analyzer;
  import nids_pkg::*;
  localparam int G = 4;
  logic clk = 0, reset = 1, pat_we = 0;
  logic [3:0] pat_idx = 0;
  pat_t pat_data = '0;
  logic [G-1:0] cand_flag = '0, confirmed;
  pat_t cand [G];
  logic [3:0] pat_id [G];
  pat_t pats [10];
  int checks = 0, failures = 0;
  fp_analyzer #(.G(G), .NPAT(10)) dut (.clk, .reset, .pat_we, .pat_idx, .pat_data,
                                       .cand_flag, .cand, .confirmed, .pat_id);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int g = 0; g < G; g++) cand[g] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 0;
    // an empty store confirms nothing, not even the all-zero string
    cand_flag = '1;
    @(negedge clk);
    checks++; if (confirmed != 0) failures++;
    for (int p = 0; p < 10; p++) begin
      pats[p] = {$urandom, $urandom, 16'($urandom)};
      @(negedge clk); pat_we = 1; pat_idx = 4'(p); pat_data = pats[p];
    end
    @(negedge clk); pat_we = 0;
    for (int n = 0; n < 1000; n++) begin
      logic [G-1:0] ec;
      int eid [G];
      for (int g = 0; g < G; g++) begin
        int p;
        p = $urandom_range(9);
        cand_flag[g] = 1'($urandom);
        cand[g] = ($urandom_range(2) == 0) ? {$urandom, $urandom, 16'($urandom)} : pats[p];
        ec[g] = 0; eid[g] = 0;
        for (int q = 0; q < 10; q++) if (cand[g] == pats[q]) begin ec[g] = cand_flag[g]; eid[g] = q; break; end
      end
      @(negedge clk);
      for (int g = 0; g < G; g++) begin
        checks++;
        if (confirmed[g] !== ec[g] || (ec[g] && pat_id[g] != 4'(eid[g]))) begin
          failures++; if (failures < 10) $display("cand %0d: %b/%0d want %b/%0d", g, confirmed[g], pat_id[g], ec[g], eid[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
