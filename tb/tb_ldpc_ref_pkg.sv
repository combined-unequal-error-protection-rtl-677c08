// tb_ldpc_ref_pkg: behavioural reference models used by the testbenches.
//
// Everything here is written as plain sequential software over an explicit
// edge list of H, independently of the RTL data structures: a syndrome and
// failed-check-node counter, a systematic encoder (dual-diagonal
// back-substitution, solved check row by check row), and a bit-exact model of the
// scaled Min-Sum decoder with failed-check-node output selection, using the
// same fixed-point rules as the RTL (symmetric saturation, alpha in tenths,
// truncation toward zero).
package tb_ldpc_ref_pkg;
  import ldpc_pkg::*;

  typedef struct {
    int chk;
    int vn;
  } edge_t;

  function automatic void build_edges(int z, ref edge_t edges[$]);
    edges.delete();
    for (int br = 0; br < MB; br++)
      for (int r = 0; r < z; r++)
        for (int bc = 0; bc < NB; bc++)
          if (H_BASE[br][bc] >= 0) begin
            edge_t e;
            e.chk = br * z + r;
            e.vn  = bc * z + ((r + H_BASE[br][bc]) % z);
            edges.push_back(e);
          end
  endfunction

  // number of unsatisfied parity checks of a hard-decision word
  function automatic int count_fcn(int z, bit cw[]);
    edge_t edges[$];
    bit    s[];
    int    n;
    build_edges(z, edges);
    s = new[MB * z];
    foreach (s[j]) s[j] = 0;
    foreach (edges[e]) s[edges[e].chk] ^= cw[edges[e].vn];
    n = 0;
    foreach (s[j]) n += int'(s[j]);
    return n;
  endfunction

  // systematic encoder: parity bits solved one check row at a time
  function automatic void encode(int z, bit msg[], ref bit cw[]);
    int    n, k;
    bit    acc[];
    edge_t edges[$];
    n  = NB * z;
    k  = KB * z;
    cw = new[n];
    foreach (cw[i]) cw[i] = (i < k) ? msg[i] : 0;
    build_edges(z, edges);
    // p0: adding up all checks of one row index r cancels every parity
    // bit except p0[r] (the weight-3 column collapses to the identity for
    // the 802.11n matrices), so p0[r] is the XOR of their message bits
    acc = new[z];
    foreach (acc[i]) acc[i] = 0;
    foreach (edges[e])
      if (edges[e].vn < k) acc[edges[e].chk % z] ^= cw[edges[e].vn];
    for (int v = 0; v < z; v++) cw[k + v] = acc[v];
    // remaining parity: check (br, r) has exactly one unknown, p_(br+1)[r]
    for (int br = 0; br < MB - 1; br++)
      for (int r = 0; r < z; r++) begin
        bit s;
        s = 0;
        foreach (edges[e])
          if (edges[e].chk == br * z + r && edges[e].vn != k + (br + 1) * z + r)
            s ^= cw[edges[e].vn];
        cw[k + (br + 1) * z + r] = s;
      end
  endfunction

  function automatic int sat(int v, int w);
    int lim;
    lim = (1 << (w - 1)) - 1;
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  function automatic int scl(int v, int a);
    int m;
    m = (v < 0) ? -v : v;
    m = (m * a) / 10;
    return (v < 0) ? -m : m;
  endfunction

  // bit-exact scaled Min-Sum with FCN selection
  function automatic void decode(int z, int w, int imax, int alpha, int llr[],
                                 ref bit cw_out[], ref int iters,
                                 ref int fcn_min, ref bit success);
    edge_t edges[$];
    int    n, m, ne;
    int    r[], mm[], ee[], tot[];
    bit    hard[];
    n = NB * z;
    m = MB * z;
    build_edges(z, edges);
    ne = edges.size();
    r = new[n]; tot = new[n]; hard = new[n];
    mm = new[ne]; ee = new[ne];
    cw_out = new[n];
    if (alpha > 10) alpha = 10;
    foreach (r[i]) begin
      r[i] = sat(llr[i], w);
      cw_out[i] = (llr[i] < 0);
    end
    foreach (mm[e]) mm[e] = r[edges[e].vn];
    fcn_min = m;
    success = 0;
    iters   = 0;
    for (int it = 1; it <= imax; it++) begin
      int f;
      // check nodes: edges of one check are contiguous in the list
      for (int e0 = 0; e0 < ne; ) begin
        int e1, min1, min2, idx;
        bit sg;
        e1 = e0;
        while (e1 < ne && edges[e1].chk == edges[e0].chk) e1++;
        min1 = (1 << (w - 1)) - 1; min2 = min1; idx = -1; sg = 0;
        for (int e = e0; e < e1; e++) begin
          int a;
          a = (mm[e] < 0) ? -mm[e] : mm[e];
          sg ^= (mm[e] < 0);
          if (a < min1) begin min2 = min1; min1 = a; idx = e; end
          else if (a < min2) min2 = a;
        end
        for (int e = e0; e < e1; e++) begin
          int v;
          v = (e == idx) ? min2 : min1;
          if (sg ^ (mm[e] < 0)) v = -v;
          ee[e] = scl(v, alpha);
        end
        e0 = e1;
      end
      // bit nodes
      foreach (tot[i]) tot[i] = r[i];
      foreach (ee[e]) tot[edges[e].vn] += ee[e];
      foreach (hard[i]) hard[i] = (tot[i] < 0);
      foreach (mm[e]) mm[e] = sat(tot[edges[e].vn] - scl(ee[e], alpha), w);
      f = count_fcn(z, hard);
      iters = it;
      if (f < fcn_min) begin
        fcn_min = f;
        foreach (hard[i]) cw_out[i] = hard[i];
      end
      if (f == 0) begin
        success = 1;
        break;
      end
    end
  endfunction

endpackage
