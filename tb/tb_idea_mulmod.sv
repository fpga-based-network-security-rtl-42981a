// Testbench for idea_mulmod: streams corner-case and random operand pairs, one per
// clock, and compares every product with a 64-bit integer reference. Also checks
// the 7-clock latency, the one-product-per-clock rate and the example of the
// waveform figure (50843 x 46028 = 6408 mod 65537).
module tb_idea_mulmod;
  import idea_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [15:0] a = '0, b = '0, p;
  int checks = 0, failures = 0;
  logic [15:0] qa [$], qb [$];
  int unsigned cyc = 0, first_in = 0, first_out = 0, nout = 0;
  localparam int N = 3000;

  idea_mulmod dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .p);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [15:0] ea, eb, e;
    ea = qa.pop_front(); eb = qb.pop_front();
    e = ref_mul(ea, eb);
    if (nout == 0) first_out = cyc;
    nout++;
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("mismatch %0d x %0d: got %0d want %0d", ea, eb, p, e);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      logic [15:0] va, vb;
      case (i)
        0: begin va = 50843; vb = 46028; end
        1: begin va = 0;     vb = 0;     end
        2: begin va = 0;     vb = 1;     end
        3: begin va = 1;     vb = 0;     end
        4: begin va = 65535; vb = 65535; end
        5: begin va = 2;     vb = 32769; end
        6: begin va = 65535; vb = 0;     end
        default: begin va = 16'($urandom); vb = 16'($urandom); end
      endcase
      a <= va; b <= vb; in_valid <= 1'b1;
      qa.push_back(va); qb.push_back(vb);
      if (i == 0) first_in = cyc;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (12) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("got %0d products, want %0d", nout, N); end
    checks++;
    // operands driven after edge E0 are taken at E1; the product is in the seventh
    // register after E7 and the checker samples it at E8
    if (first_out - first_in != 8) begin
      failures++; $display("latency %0d edges, want 8 (7 registers)", first_out - first_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
