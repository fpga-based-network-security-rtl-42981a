// False-positive analyzer: confirms or rejects the strings the Bloom filters flag.
//
// It keeps an exact copy of the pattern set (NPAT entries of 80 bits, written with
// pat_we / pat_idx / pat_data, cleared by reset) and compares each of G flagged
// candidates with all entries in parallel. One clock after a candidate is offered
// with cand_flag, confirmed says whether it is really a pattern and pat_id which one
// (lowest index on a tie). A flagged string that is not confirmed was a Bloom false
// positive and is dropped. The analyzer's role follows the document; it gives no
// insides, and the exact parallel comparison is the simplest circuit that does it.
module fp_analyzer
  import nids_pkg::*;
#(
  parameter int unsigned G    = 4,     // candidates per clock
  parameter int unsigned NPAT = 10,    // pattern entries
  parameter int unsigned IW   = $clog2(NPAT)
) (
  input  logic           clk,
  input  logic           reset,        // synchronous, active high
  input  logic           pat_we,
  input  logic [IW-1:0]  pat_idx,
  input  pat_t           pat_data,
  input  logic [G-1:0]   cand_flag,
  input  pat_t           cand [G],
  output logic [G-1:0]   confirmed,
  output logic [IW-1:0]  pat_id [G]
);
  pat_t            pat   [NPAT];
  logic [NPAT-1:0] pat_v;

  always_ff @(posedge clk) begin
    if (reset) pat_v <= '0;
    else if (pat_we && 32'(pat_idx) < NPAT) begin
      pat[pat_idx]   <= pat_data;
      pat_v[pat_idx] <= 1'b1;
    end
  end

  logic [G-1:0]  conf_c;
  logic [IW-1:0] id_c [G];
  always_comb begin
    for (int g = 0; g < G; g++) begin
      conf_c[g] = 1'b0;
      id_c[g]   = '0;
      for (int p = NPAT - 1; p >= 0; p--)
        if (pat_v[p] && pat[p] == cand[g]) begin
          conf_c[g] = cand_flag[g];
          id_c[g]   = IW'(p);
        end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) confirmed <= '0;
    else       confirmed <= conf_c;
    pat_id <= id_c;
  end
endmodule
