// ils_ref_pkg: reference model of interleaved local sorting for the testbenches.
//
// Written independently of the RTL: instead of building the interleaver forward, it
// works out for every candidate c which group it lands in (candidate c sits in group
// i = c / 2k at position e = c % 2k; rotation by i puts it at j = (e - i) mod 2k; the
// spreading step sends it to group 2k*floor(i/2k) + j % G), then sorts each group with
// a plain insertion sort and keeps its k smallest metrics.
package ils_ref_pkg;
  typedef int arr_t [128];

  function automatic int ref_group(int l, int g, int c);
    int n2k, i, e, j;
    n2k = 2 * l / g;
    i = c / n2k;
    e = c % n2k;
    j = (e - i % n2k + n2k) % n2k;
    return n2k * (i / n2k) + (j % g);
  endfunction

  // Expected metric of every output slot (group g at slots g*k .. g*k+k-1, ascending).
  function automatic void ref_sort(int l, int g, input arr_t key, output arr_t okey);
    int k, cnt, t;
    arr_t buf_;
    k = l / g;
    okey = '{default: 0};
    for (int grp = 0; grp < g; grp++) begin
      cnt = 0;
      for (int c = 0; c < 2 * l; c++) begin
        if (ref_group(l, g, c) == grp) begin
          buf_[cnt] = key[c];
          for (int y = cnt; y > 0 && buf_[y-1] > buf_[y]; y--) begin
            t = buf_[y]; buf_[y] = buf_[y-1]; buf_[y-1] = t;
          end
          cnt++;
        end
      end
      for (int y = 0; y < k; y++) okey[grp*k + y] = buf_[y];
    end
  endfunction

  // Sum of the L smallest of 2L keys (exact selection), to compare with ILS.
  function automatic int exact_sum(int l, input arr_t key);
    arr_t b;
    int t, s;
    b = key;
    for (int x = 1; x < 2 * l; x++)
      for (int y = x; y > 0 && b[y-1] > b[y]; y--) begin
        t = b[y]; b[y] = b[y-1]; b[y-1] = t;
      end
    s = 0;
    for (int x = 0; x < l; x++) s += b[x];
    return s;
  endfunction
endpackage
