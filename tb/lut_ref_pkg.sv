// lut_ref_pkg: reference model used by the testbenches. It evaluates a
// LUT_n + n:LUT_2 directly from its key by table look-up, independently of
// the mux trees and scan chains of the design:
//   s_j = key[2^n + 4j + {in_j1, in_j0}],  out = key[{s_(n-1), ..., s_0}].
// Keys are held in a 1024-bit vector (enough for n up to 8).
package lut_ref_pkg;

  typedef bit [1023:0] key_t;

  function automatic bit ref_novel(key_t key, int unsigned n, bit [15:0] in_pairs);
    int unsigned idx;
    idx = 0;
    for (int unsigned j = 0; j < n; j++) begin
      int unsigned a;
      a = {in_pairs[2*j+1], in_pairs[2*j]};
      if (key[(1 << n) + 4*j + a]) idx |= (1 << j);
    end
    return key[idx];
  endfunction

  function automatic key_t random_key(int unsigned bits);
    key_t k;
    k = '0;
    for (int unsigned i = 0; i < bits; i++) k[i] = 1'($urandom);
    return k;
  endfunction

endpackage
