// Partial product generator (PPDG) of the modulo (2^16 + 1) multiplier, with its
// correction term generator.
//
// Inputs are the diminished-one operands a = d[A] (shifted operand) and b = d[B]
// (recoded operand). Since B = b + 1, the product is A*b + A. The Booth encoder
// scans b in overlapping quadruplets (b[3i+2], b[3i+1], b[3i], b[3i-1]) for
// i = 0..5, giving digits k_i = b[3i-1] + b[3i] + 2 b[3i+1] - 4 b[3i+2] in -4..+4.
// The extra "+A" is absorbed by reading the bit below b[0] as 1, so the first digit
// is 1 + b0 + 2 b1 - 4 b2. Bits above b[15] read as 0.
//
// The Booth selector turns digit k_i into PPD_i = d[A k_i 2^(3i)]:
//   +-1, +-2, +-4 : iCLS(d[A], 3i), iCLS(d[A], 3i+1), iCLS(d[A], 3i+2)
//   +-3           : iCLS(d[3A], 3i), d[3A] = d[2A] + d[A] + 1 from one
//                   diminished-one adder (idea_dim1_add)
//   negative      : one's complement of the above
//   0             : PPD_i = 2^(3i) - 1 with correction term c_i = 2^(3i)
// The correction term generator outputs the complement of C = sum of the c_i.
// With these, d[AB] = sum PPD_i + ~C + 7 (mod 2^16 + 1), the 7 being supplied by the
// six inverted-EAC CSA levels and the final diminished-one adder.
// The digit formulas, zero handling and correction values follow the document; the
// "bit -1 reads as 1" way of adding the +1 term is this design's reading of its
// first-digit term (1 + b0 + 2 b1 - 4 b2). Combinational.
module idea_ppdg
  import idea_pkg::*;
(
  input  word_t a,             // d[A]
  input  word_t b,             // d[B]
  output word_t ppd [NPPD],    // partial products PPD_0..PPD_5
  output word_t cbar           // ~C, complement of the summed correction terms
);
  word_t   d2a, d3a;
  booth_t  code [NPPD];
  logic [3*NPPD:0] bx;         // b extended: bx[0] = bit -1, bx[j+1] = b[j]

  idea_dim1_add u_add3 (.a(d2a), .b(a), .s(d3a));

  // Booth encoder for one quadruplet {b[3i+2], b[3i+1], b[3i], b[3i-1]}
  function automatic booth_t booth_enc(input logic [3:0] q);
    booth_t dig;
    unique case (q)
      4'b0000, 4'b1111: dig = '{neg: 1'b0, mag: MAG_0};
      4'b0001, 4'b0010: dig = '{neg: 1'b0, mag: MAG_1};
      4'b0011, 4'b0100: dig = '{neg: 1'b0, mag: MAG_2};
      4'b0101, 4'b0110: dig = '{neg: 1'b0, mag: MAG_3};
      4'b0111:          dig = '{neg: 1'b0, mag: MAG_4};
      4'b1000:          dig = '{neg: 1'b1, mag: MAG_4};
      4'b1001, 4'b1010: dig = '{neg: 1'b1, mag: MAG_3};
      4'b1011, 4'b1100: dig = '{neg: 1'b1, mag: MAG_2};
      default:          dig = '{neg: 1'b1, mag: MAG_1};   // 1101, 1110
    endcase
    return dig;
  endfunction

  always_comb begin
    word_t c_sum;
    word_t sel;
    d2a   = icls(a, 1);
    bx    = {{(3*NPPD-W){1'b0}}, b, 1'b1};
    c_sum = '0;
    for (int i = 0; i < NPPD; i++) begin
      code[i] = booth_enc(bx[3*i +: 4]);
      // Booth selector
      unique case (code[i].mag)
        MAG_1:   sel = icls(a,   3*i);
        MAG_2:   sel = icls(a,   3*i + 1);
        MAG_3:   sel = icls(d3a, 3*i);
        MAG_4:   sel = icls(a,   3*i + 2);
        default: sel = '0;
      endcase
      if (code[i].mag == MAG_0) begin
        // correction term generator: zero digit
        ppd[i] = word_t'((32'd1 << (3*i)) - 32'd1);
        c_sum  = c_sum + word_t'(32'd1 << (3*i));
      end else begin
        ppd[i] = code[i].neg ? ~sel : sel;
      end
    end
    cbar = ~c_sum;
  end
endmodule
