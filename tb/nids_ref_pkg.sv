// Reference functions for the matcher testbenches: the H3 hash written as a loop
// over the set bits of the string, and a model of the five Bloom vectors.
package nids_ref_pkg;
  import nids_pkg::*;

  function automatic logic [11:0] ref_hash(input logic [79:0] s, input int i);
    logic [11:0] h;
    h = '0;
    for (int j = 0; j < 80; j++) if (s[j]) h = h ^ coef(i, j);
    return h;
  endfunction

  // Bloom vectors of the five partial filters, as the testbench believes them to be
  typedef logic [4095:0] bvec_t [5];

  function automatic logic ref_bloom(input bvec_t v, input logic [79:0] s);
    logic m;
    m = 1'b1;
    for (int k = 0; k < 5; k++) m &= v[k][ref_hash(s, 2*k)] & v[k][ref_hash(s, 2*k+1)];
    return m;
  endfunction
endpackage
