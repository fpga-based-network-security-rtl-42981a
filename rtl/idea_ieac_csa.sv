// Inverted end-around-carry carry-save adder (3:2 compressor) modulo 2^16 + 1.
//
// Three 16-bit operands are reduced to a sum vector and a carry vector. Bit j of
// the carry vector (weight 2^(j+1)) goes one place up; the carry out of bit 15 has
// weight 2^16 = -1 and is fed back inverted into bit 0. With this wiring
//   x + y + z = sum + carry - 1   (mod 2^16 + 1),
// i.e. every level adds the constant +1 to the vectors it passes on, which is what
// diminished-one sums need. Built of one full adder per bit, combinational.
module idea_ieac_csa
  import idea_pkg::*;
(
  input  word_t x,
  input  word_t y,
  input  word_t z,
  output word_t sum,
  output word_t carry
);
  word_t maj;
  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[W-2:0], ~maj[W-1]};
  end
endmodule
