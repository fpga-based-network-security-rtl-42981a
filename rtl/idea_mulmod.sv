// Seven-stage pipelined modulo (2^16 + 1) multiplier for IDEA.
//
// Takes two IDEA words (0 stands for 2^16) and returns their product modulo
// 2^16 + 1 in the same form. Internally both operands are converted to
// diminished-one form (x - 1), the partial product generator (idea_ppdg) produces six
// radix-8 Booth partial products and the correction word ~C, and a linear tree of
// six inverted end-around-carry CSAs reduces them, one operand entering per level:
//   level 1: PPD0, PPD1, PPD2   level 2: PPD3   level 3: PPD4   level 4: PPD5
//   level 5: d[1] (= 0)         level 6: ~C
// A final diminished-one adder joins sum and carry and the result is converted back
// (+1). Operands that enter later are carried along in delay registers.
//
// Timing: registers after the PPDG and after each CSA level, seven in all, so a
// product appears 7 clocks after its operands (in_valid sampled at edge 1, out_valid
// high after edge 7), and a new pair is accepted every clock. The seven registers
// and the operand order of the CSA tree follow the document; the normal/diminished
// conversion at the ports and the valid bit are this design's own.
module idea_mulmod
  import idea_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,       // asynchronous, active low; clears the valid pipeline
  input  logic  in_valid,
  input  word_t a,           // multiplier operand (normal IDEA form)
  input  word_t b,           // multiplicand operand (normal IDEA form)
  output logic  out_valid,
  output word_t p            // a * b mod (2^16 + 1), normal IDEA form
);
  localparam int unsigned NOPS = NPPD + 2;   // PPD0..5, d[1], ~C

  word_t ppd_c [NPPD];
  word_t cbar_c;

  // ops[s][k]: operand k as held in pipeline register s (only the ones still needed)
  word_t ops  [MUL_LAT][NOPS];
  word_t sum_q   [1:MUL_LAT-1];
  word_t carry_q [1:MUL_LAT-1];
  word_t sum_c   [1:MUL_LAT-1];
  word_t carry_c [1:MUL_LAT-1];
  logic [MUL_LAT-1:0] vld_q;
  word_t res_d1;

  idea_ppdg u_ppdg (.a(to_dim1(a)), .b(to_dim1(b)), .ppd(ppd_c), .cbar(cbar_c));

  // CSA level 1 adds PPD0..2; level s (2..6) adds operand s+1 of the list.
  idea_ieac_csa u_csa1 (.x(ops[0][0]), .y(ops[0][1]), .z(ops[0][2]),
                        .sum(sum_c[1]), .carry(carry_c[1]));
  for (genvar s = 2; s < MUL_LAT; s++) begin : g_csa
    idea_ieac_csa u_csa (.x(sum_q[s-1]), .y(carry_q[s-1]), .z(ops[s-1][s+1]),
                         .sum(sum_c[s]), .carry(carry_c[s]));
  end

  always_ff @(posedge clk) begin
    // stage 0: PPDG outputs
    for (int k = 0; k < NPPD; k++) ops[0][k] <= ppd_c[k];
    ops[0][NPPD]     <= '0;          // d[1] = 0
    ops[0][NPPD + 1] <= cbar_c;
    // stages 1..6: CSA levels, later operands delayed alongside
    for (int s = 1; s < MUL_LAT; s++) begin
      sum_q[s]   <= sum_c[s];
      carry_q[s] <= carry_c[s];
      for (int k = 0; k < NOPS; k++) ops[s][k] <= ops[s-1][k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[MUL_LAT-2:0], in_valid};
  end

  idea_dim1_add u_final (.a(sum_q[MUL_LAT-1]), .b(carry_q[MUL_LAT-1]), .s(res_d1));

  assign p         = from_dim1(res_d1);
  assign out_valid = vld_q[MUL_LAT-1];
endmodule
