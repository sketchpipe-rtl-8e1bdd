// tb_ref_pkg: reference functions for the testbenches.
//
// ref_mix is a separate, testbench-side implementation of the index hash
// used by the hash units (seed xor, then xor-shift/multiply rounds), so that
// testbenches can predict which counter or cache entry a key reaches
// without looking inside the design.
package tb_ref_pkg;
  function automatic int unsigned ref_mix(int unsigned key, int unsigned seed);
    longint unsigned x;
    x = longint'(key ^ seed);
    x = x ^ (x >> 16);
    x = (x * 64'h7feb352d) & 64'hffff_ffff;
    x = x ^ (x >> 15);
    x = (x * 64'h846ca68b) & 64'hffff_ffff;
    x = x ^ (x >> 16);
    return int'(x[31:0]);
  endfunction

  function automatic int unsigned ref_idx(int unsigned key, int unsigned seed, int unsigned bits);
    return ref_mix(key, seed) & ((1 << bits) - 1);
  endfunction

  function automatic int unsigned ref_array_seed(int unsigned j);
    return 32'h9e3779b9 * (j + 1);
  endfunction

  localparam int unsigned REF_CACHE_SEED = 32'h5bd1e995;
endpackage
