// Reference model of the contouring procedure of one 2x2 subgrid, used by
// the testbenches. It builds the contouring tree as an explicit node list
// with parent links and children lists, enumerates it by a depth-first
// walk, derives the next node list from subtree sizes and the pen command
// of each node from the direction of its edge, then walks the list for a
// contour level. Results use the same fixed-point format as the hardware:
// frac = ((vp - level) << 8) / (vp - vnode), truncated.
package tb_contour_model;

  typedef struct {
    int n;                  // number of coordinates
    int pen [4];
    int x   [4];
    int y   [4];
    int z   [4];
    int root;
    int cfg;
    int list_node [6];      // enumeration list: corner of each node
    int list_par  [6];      // corner of the parent (-1 for the root)
    int list_pen  [6];
    int list_next [6];      // next node list, 6 = done
  } result_t;

  function automatic int cxm(int c); return (c == 1 || c == 2) ? 1 : 0; endfunction
  function automatic int cym(int c); return (c == 2 || c == 3) ? 1 : 0; endfunction

  function automatic result_t contour(int v[4], int level, int x0, int y0, int z0);
    result_t r;
    int corner [6], parent [6], nchild [6], child [6][3];
    int nn, m, a, o, b, na, no, nb;
    int order [6], cnt, stack [8], sp, size [6], idx_of [6];
    int p, c, pos, frac;
    // maximum: first of equal maxima in the order 0,1,2,3
    m = 0;
    for (int i = 1; i < 4; i++) if (v[i] > v[m]) m = i;
    a = (m + 1) % 4; o = (m + 2) % 4; b = (m + 3) % 4;
    nn = 0;
    for (int i = 0; i < 6; i++) nchild[i] = 0;
    corner[0] = m; parent[0] = -1; nn = 1;
    corner[1] = a; parent[1] = 0; child[0][nchild[0]++] = 1; na = 1;
    corner[2] = o; parent[2] = 0; child[0][nchild[0]++] = 2; no = 2;
    corner[3] = b; parent[3] = 0; child[0][nchild[0]++] = 3; nb = 3;
    nn = 4;
    r.cfg = 0;
    // edge a-o below the higher end
    if (v[o] > v[a]) begin corner[nn] = a; parent[nn] = no; child[no][nchild[no]++] = nn; r.cfg |= 1; end
    else begin corner[nn] = o; parent[nn] = na; child[na][nchild[na]++] = nn; end
    nn++;
    // edge o-b below the higher end
    if (v[b] > v[o]) begin corner[nn] = o; parent[nn] = nb; child[nb][nchild[nb]++] = nn; r.cfg |= 2; end
    else begin corner[nn] = b; parent[nn] = no; child[no][nchild[no]++] = nn; end
    nn++;
    r.root = m;
    // preorder walk, children in the order they were attached
    cnt = 0; sp = 0; stack[sp++] = 0;
    while (sp > 0) begin
      int t;
      t = stack[--sp];
      order[cnt++] = t;
      for (int k = nchild[t] - 1; k >= 0; k--) stack[sp++] = child[t][k];
    end
    for (int i = 0; i < 6; i++) idx_of[order[i]] = i;
    // subtree sizes, leaves first
    for (int i = 5; i >= 0; i--) begin
      int t;
      t = order[i];
      size[t] = 1;
      for (int k = 0; k < nchild[t]; k++) size[t] += size[child[t][k]];
    end
    for (int i = 0; i < 6; i++) begin
      int t;
      t = order[i];
      r.list_node[i] = corner[t];
      r.list_par[i]  = (parent[t] < 0) ? -1 : corner[parent[t]];
      r.list_next[i] = (i + size[t] >= 6) ? 6 : i + size[t];
      if (parent[t] < 0) r.list_pen[i] = 0;
      else begin
        p = corner[parent[t]]; c = corner[t];
        // setpoint: perimeter edge running downhill counterclockwise
        r.list_pen[i] = (c == (p + 1) % 4) ? 1 : 0;
      end
    end
    // display generation
    r.n = 0;
    pos = 0;
    while (pos < 6) begin
      c = r.list_node[pos];
      if (v[c] <= level) begin
        if (pos == 0) break;
        p = r.list_par[pos];
        frac = ((v[p] - level) * 256) / (v[p] - v[c]);
        r.pen[r.n] = r.list_pen[pos];
        r.x[r.n] = (x0 + cxm(p)) * 256 + (cxm(c) - cxm(p)) * frac;
        r.y[r.n] = (y0 + cym(p)) * 256 + (cym(c) - cym(p)) * frac;
        r.z[r.n] = z0 * 256;
        r.n++;
        pos = r.list_next[pos];
      end else pos++;
    end
    return r;
  endfunction

endpackage
