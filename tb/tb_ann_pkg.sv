// Test data and reference models shared by the testbenches.
//
// Everything is generated from a 32-bit integer mixing function, so no data
// files are needed: feature byte j of node n, the neighbour list of a node,
// query vectors, and the layout of a cluster's flash page (a 4-byte record
// count, then records of a 4-byte node index and DIM feature bytes). The
// reference functions compute distances, best-first graph search and cluster
// scans in plain behavioural code, independently of the RTL.
package tb_ann_pkg;

  localparam int DIM = 128;
  localparam int unsigned NONE = 32'hFFFF_FFFF;

  function automatic int unsigned mix(int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic byte unsigned feat_byte(int unsigned n, int j);
    int unsigned h;
    h = mix(n * 32'd256 + 32'(j) + 32'd12345);
    return h[7:0];
  endfunction

  function automatic byte unsigned query_byte(int unsigned seed, int j);
    int unsigned h;
    h = mix(seed * 32'd977 + 32'(j) + 32'd55);
    return h[7:0];
  endfunction

  // neighbour slot s of node v in a graph of n_nodes nodes with r slots per list
  function automatic int unsigned nbr_of(int unsigned v, int s, int unsigned n_nodes, int r);
    int deg;
    deg = r - 2 * int'(v % 3);
    if (s >= deg) return NONE;
    return mix(v * 32'd64 + 32'(s) + 32'd999) % n_nodes;
  endfunction

  // records in cluster c (at most 124 fit a 16 KB page)
  function automatic int cluster_size(int unsigned c, int max_rec);
    int n;
    n = 3 + int'(mix(c + 32'd4242) % 32'd40);
    return (n > max_rec) ? max_rec : n;
  endfunction

  function automatic int unsigned member_id(int unsigned c, int r);
    return c * 32'd1000 + 32'(r) + 32'd7;
  endfunction

  // byte at offset off of the page holding cluster c
  function automatic byte unsigned page_byte(int unsigned c, int off, int max_rec);
    int n, rec, pos;
    int unsigned w;
    n = cluster_size(c, max_rec);
    if (off < 4) begin
      w = 32'(n);
      return w[8*off +: 8];
    end
    rec = (off - 4) / (DIM + 4);
    pos = (off - 4) % (DIM + 4);
    if (rec >= n) return 8'h00;
    if (pos < 4) begin
      w = member_id(c, rec);
      return w[8*pos +: 8];
    end
    return feat_byte(member_id(c, rec), pos - 4);
  endfunction

  function automatic int unsigned ref_dist(int unsigned qseed, int unsigned n);
    int unsigned acc;
    int d;
    acc = 0;
    for (int j = 0; j < DIM; j++) begin
      d = int'(query_byte(qseed, j)) - int'(feat_byte(n, j));
      acc += 32'(d * d);
    end
    return acc;
  endfunction

  typedef struct {
    int unsigned id;
    int unsigned d;
    bit          expd;
  } cand_t;

  // insert keeping ascending order; a newcomer goes before equal distances
  function automatic void cand_insert(ref cand_t list[$], input int unsigned id,
                                      input int unsigned d, input int k);
    cand_t c;
    int pos;
    c.id = id; c.d = d; c.expd = 0;
    pos = list.size();
    for (int i = 0; i < list.size(); i++)
      if (d <= list[i].d) begin pos = i; break; end
    list.insert(pos, c);
    while (list.size() > k) void'(list.pop_back());
  endfunction

  // best-first graph search as done by the main-memory level
  // returns the number of expansion steps taken
  function automatic int ref_graph_search(input int unsigned qseed, input int unsigned entry,
                                          input int unsigned n_nodes, input int r,
                                          input int k, input int steps, ref cand_t list[$]);
    bit visited [int unsigned];
    int taken;
    taken = 0;
    list.delete();
    visited[entry] = 1;
    cand_insert(list, entry, ref_dist(qseed, entry), k);
    for (int st = 0; st < steps; st++) begin
      int h;
      int unsigned v;
      h = -1;
      for (int i = 0; i < list.size(); i++) if (!list[i].expd) begin h = i; break; end
      if (h < 0) break;
      taken++;
      list[h].expd = 1;
      v = list[h].id;
      for (int s = 0; s < r; s++) begin
        int unsigned n;
        n = nbr_of(v, s, n_nodes, r);
        if (n == NONE) continue;
        if (visited.exists(n)) continue;
        visited[n] = 1;
        cand_insert(list, n, ref_dist(qseed, n), k);
      end
    end
    return taken;
  endfunction

  // scan of the members of a set of clusters, as done by the storage level
  function automatic void ref_cluster_scan(input int unsigned qseed, input int unsigned cids[$],
                                           input int max_rec, input int k, ref cand_t list[$]);
    list.delete();
    foreach (cids[i]) begin
      for (int rr = 0; rr < cluster_size(cids[i], max_rec); rr++)
        cand_insert(list, member_id(cids[i], rr), ref_dist(qseed, member_id(cids[i], rr)), k);
    end
  endfunction

endpackage
