// ils_pkg: types, default sizes and elaboration-time helper functions shared by the
// interleaved local sorting (ILS) metric sorter.
//
// An ILS sorter picks L survivors out of the 2L child-path metrics of a successive
// cancellation list (SCL) decoder. It splits the 2L metrics into G groups of 2k = 2L/G,
// interleaves them so each group holds a spread of metrics, and keeps the k smallest
// of every group. This package holds:
//   * the metric word (path metric plus the index of the child candidate it belongs to),
//   * the interleaver map (rotate group i by i % 2k, then spread element j of rotated
//     group i to group 2k*floor(i/2k) + j % G),
//   * the comparator schedule of Batcher's odd-even merge sorting network, organised by
//     stage, and the pruning rule that removes every comparator whose outputs cannot
//     reach the k smallest outputs.
// All functions are constant functions used at elaboration; none of them is hardware.
//
// Sizes that follow the document: list size 16 with 4 groups (2k = 8) as the main
// configuration, 8-bit unsigned path metrics. The LLR magnitude width (7 bits) and the
// candidate-index tag are choices of this design.
package ils_pkg;

  // Default configuration.
  localparam int unsigned L_DEF  = 16;  // list size
  localparam int unsigned G_DEF  = 4;   // number of groups, 2k = 2L/G = 8
  localparam int unsigned PM_W   = 8;   // path metric width (unsigned)
  localparam int unsigned LLR_W  = 7;   // width of |LLR| fed to the metric extension

  // ---------------------------------------------------------------------------------
  // Interleaver map.
  // Source: group i, rotated position j holds m[i*2k + (i+j) % 2k].
  // Destination group: 2k*floor(i/2k) + j % G.
  // Destination position inside that group: (i % P) + P*floor(j/G), P = min(G, 2k),
  // which reproduces the element order drawn for L = 8, G = 2, 4, 8.
  // ---------------------------------------------------------------------------------
  function automatic int il_src(int l, int g, int i, int j);
    int n2k;
    n2k = (2 * l) / g;
    return i * n2k + ((i + j) % n2k);
  endfunction

  function automatic int il_dst(int l, int g, int i, int j);
    int n2k, p, grp, pos;
    n2k = (2 * l) / g;
    p   = (g < n2k) ? g : n2k;
    grp = n2k * (i / n2k) + (j % g);
    pos = (i % p) + p * (j / g);
    return grp * n2k + pos;
  endfunction

  // ---------------------------------------------------------------------------------
  // Odd-even merge sorting network on n = 2^q wires (Batcher), in Knuth's enumeration:
  //   for p = 1, 2, 4, .. < n:  for d = p, p/2, .., 1:   (one stage per (p, d))
  //     for j = d % p; j + d < n; j += 2d:  for i = 0 .. d-1 (i + j + d < n):
  //       if floor((i+j)/2p) == floor((i+j+d)/2p): compare (i+j, i+j+d)
  // ---------------------------------------------------------------------------------
  function automatic int clog2i(int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic int oem_num_stages(int n);
    int q;
    q = clog2i(n);
    return q * (q + 1) / 2;
  endfunction

  // Partner of wire x in stage s, or -1 if wire x is not compared in that stage.
  function automatic int oem_partner(int n, int s, int x);
    int st, a, b;
    st = 0;
    for (int p = 1; p < n; p = p * 2) begin
      for (int d = p; d >= 1; d = d / 2) begin
        if (st == s) begin
          for (int j = d % p; j + d < n; j = j + 2 * d) begin
            for (int i = 0; i < d; i++) begin
              a = i + j;
              b = i + j + d;
              if (b < n && (a / (2 * p)) == (b / (2 * p))) begin
                if (a == x) return b;
                if (b == x) return a;
              end
            end
          end
          return -1;
        end
        st++;
      end
    end
    return -1;
  endfunction

  // 1 if the comparator on wire x in stage s can influence one of the kout smallest
  // outputs (wires 0 .. kout-1 after the last stage); 0 if it is pruned or absent.
  function automatic bit oem_needed(int n, int kout, int s, int x);
    bit live [64];
    bit nxt  [64];
    int ns, pt;
    ns = oem_num_stages(n);
    for (int y = 0; y < 64; y++) live[y] = (y < kout);
    for (int t = ns - 1; t > s; t--) begin
      nxt = live;
      for (int y = 0; y < n; y++) begin
        pt = oem_partner(n, t, y);
        if (pt >= 0 && (live[y] || live[pt])) nxt[y] = 1'b1;
      end
      live = nxt;
    end
    pt = oem_partner(n, s, x);
    if (pt < 0) return 1'b0;
    return live[x] || live[pt];
  endfunction

  // Comparators kept in one 2k-to-k sorter.
  function automatic int oem_num_cas(int n, int kout);
    int c;
    c = 0;
    for (int s = 0; s < oem_num_stages(n); s++)
      for (int x = 0; x < n; x++)
        if (oem_partner(n, s, x) > x && oem_needed(n, kout, s, x)) c++;
    return c;
  endfunction

endpackage
