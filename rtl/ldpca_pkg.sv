// ldpca_pkg: constants and the parity-check structure shared by the LDPCA
// decoder blocks.
//
// The code is a regular degree-3 LDPCA code of length N = 66*G (G = 6 gives
// the 396-bit code). Every source bit (variable node, VN) v has three edges;
// edge e goes to basic check node (CN)
//     cn_of(v, e) = (A[e]*v + B[e]) mod N,   A = {1, 7, 13}, B = {0, 1, 5}.
// Each map is a permutation of 0..N-1, so every basic CN also has exactly
// three edges, one per e, and vn_of() is its inverse. The offsets make the
// three CNs of a VN distinct for every N that is a multiple of 66.
// Basic CN c lies in accumulation group c/66 at position c%66; syndrome bits
// are accumulated inside each group of 66.
//
// The merge order of the comparing tree (which accumulated syndrome bits a
// group sends at each rate) is fixed by a balanced pairing: going from rate
// 66/66 down to 2/66, neighbouring segments are merged pairwise, level by
// level (66 -> 33 -> 17 -> 9 -> 5 -> 3 -> 2 segments), giving six levels
// of stacking check nodes. The matrix and this order are this design's own.
package ldpca_pkg;

  localparam int GROUP = 66;          // basic CNs per accumulation group
  localparam int LEVELS = 6;          // stacking-CN levels for 66 basic CNs
  localparam int RATE_W = 7;          // holds 2..66

  // Number of segments left after level r of pairwise merging.
  function automatic int seg_count(int r);
    int s;
    s = GROUP;
    for (int i = 0; i < r; i++) s = (s + 1) / 2;
    return s;
  endfunction

  // Merge order (0-based) of stacking node j at level r (r >= 1). The node
  // exists only if 2*j+1 < seg_count(r-1); otherwise it passes its child up.
  function automatic int merge_order(int r, int j);
    int o;
    o = 0;
    for (int i = 1; i < r; i++) o += seg_count(i - 1) / 2;
    return o + j;
  endfunction

  function automatic int edge_a(int e);
    return (e == 0) ? 1 : (e == 1) ? 7 : 13;
  endfunction

  function automatic int edge_b(int e);
    return (e == 0) ? 0 : (e == 1) ? 1 : 5;
  endfunction

  function automatic int cn_of(int v, int e, int n);
    return (edge_a(e) * v + edge_b(e)) % n;
  endfunction

  function automatic int inv_mod(int a, int n);
    for (int x = 1; x < n; x++)
      if ((a * x) % n == 1) return x;
    return 1;
  endfunction

  function automatic int vn_of(int c, int e, int n);
    return (((c - edge_b(e) + n) % n) * inv_mod(edge_a(e), n)) % n;
  endfunction

endpackage
