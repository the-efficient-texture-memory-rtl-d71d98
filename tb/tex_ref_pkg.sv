// tex_ref_pkg: reference models shared by the testbenches.
//
// Written independently of the RTL: the recursive-Z index is built by a bit loop, and the
// placement variants replace the position inside the smallest tile by a lookup in the tile
// orders drawn out by hand (U, flipped U and 4x4 snake). Also the texture memory content
// function, bilinear filtering, the number of cache lines a footprint touches and the list of
// cache accesses a request makes under each texture cache organisation.
package tex_ref_pkg;

  // tile orders, [v][u] -> position in the tile
  function automatic int rzu_pos(int u, int v);
    int t[2][2] = '{'{0, 3}, '{1, 2}};
    return t[v][u];
  endfunction
  function automatic int rzfu1_pos(int u, int v);
    int t[4][4] = '{'{0, 3, 4, 7}, '{1, 2, 5, 6}, '{9, 10, 13, 14}, '{8, 11, 12, 15}};
    return t[v][u];
  endfunction
  function automatic int rzfu2_pos(int u, int v);
    int t[4][4] = '{'{1, 2, 5, 6}, '{0, 3, 4, 7}, '{8, 11, 12, 15}, '{9, 10, 13, 14}};
    return t[v][u];
  endfunction
  function automatic int rzs4_pos(int u, int v);
    return v * 4 + (((v % 2) == 1) ? 3 - u : u);
  endfunction

  // texel index of (u,v) in a 2^m x 2^n texture; pl: 0 RZ, 1 RZU, 2 RZFU1, 3 RZFU2, 4 RZS4
  function automatic longint unsigned ref_index(int m, int n, longint unsigned u,
                                                longint unsigned v, int pl);
    longint unsigned idx = 0;
    int k = (m < n) ? m : n;
    int pos = 0;
    u = u % (64'd1 << m);
    v = v % (64'd1 << n);
    for (int i = 0; i < k; i++) begin
      idx |= ((u >> i) & 1) << (2 * i);
      idx |= ((v >> i) & 1) << (2 * i + 1);
    end
    if (m >= n) idx |= (u >> k) << (2 * k);
    else        idx |= (v >> k) << (2 * k);
    if (pl == 1 && k >= 1) idx = (idx & ~64'h3) | 64'(rzu_pos(int'(u % 2), int'(v % 2)));
    if (pl >= 2 && pl <= 4 && k >= 2) begin
      if (pl == 2) pos = rzfu1_pos(int'(u % 4), int'(v % 4));
      if (pl == 3) pos = rzfu2_pos(int'(u % 4), int'(v % 4));
      if (pl == 4) pos = rzs4_pos(int'(u % 4), int'(v % 4));
      idx = (idx & ~64'hF) | 64'(pos);
    end
    return idx;
  endfunction

  function automatic logic [31:0] ref_addr(int m, int n, longint unsigned u, longint unsigned v,
                                           int pl, logic [31:0] base);
    return 32'(ref_index(m, n, u, v, pl) * 4) + base;
  endfunction

  // content of the texture memory model
  function automatic logic [31:0] texel_value(logic [31:0] a);
    logic [31:0] x;
    x = (a >> 2) * 32'h9E3779B1;
    return x ^ (x >> 15) ^ 32'h5A5A0F0F;
  endfunction

  function automatic logic [31:0] bilinear(logic [31:0] t0, logic [31:0] t1, logic [31:0] t2,
                                           logic [31:0] t3, int fu, int fv);
    logic [31:0] r;
    for (int c = 0; c < 4; c++) begin
      longint top, bot;
      top = longint'(t0[8*c +: 8]) * (256 - fu) + longint'(t1[8*c +: 8]) * fu;
      bot = longint'(t2[8*c +: 8]) * (256 - fu) + longint'(t3[8*c +: 8]) * fu;
      r[8*c +: 8] = 8'((top * (256 - fv) + bot * fv) / 65536);
    end
    return r;
  endfunction

  // case from the line addresses of the four footprint texels (64-byte lines):
  // 0 one line, 1 rows split, 2 columns split, 3 four lines
  function automatic int ref_case(int m, int n, longint unsigned u, longint unsigned v, int pl,
                                  logic [31:0] base);
    logic [31:0] l0, l1, l2;
    l0 = ref_addr(m, n, u, v, pl, base) >> 6;
    l1 = ref_addr(m, n, u + 1, v, pl, base) >> 6;
    l2 = ref_addr(m, n, u, v + 1, pl, base) >> 6;
    return ((l1 != l0) ? 2 : 0) + ((l2 != l0) ? 1 : 0);
  endfunction

  // start addresses of the cache accesses of one request, in issue order; returns their count.
  // sup 0: one per texel. sup 2: one per distinct line, at its first texel in slot order.
  // sup 1: lines in order of first appearance; in each line, bursts over runs of consecutive
  // texel addresses (at most four texels), each starting at the lowest address not yet covered.
  function automatic int ref_accesses(int m, int n, longint unsigned u, longint unsigned v,
                                      int pl, logic [31:0] base, int sup,
                                      output logic [31:0] acc[4]);
    logic [31:0] t[4];
    bit          done[4];
    int          cnt = 0;
    for (int i = 0; i < 4; i++) begin
      t[i]    = ref_addr(m, n, u + longint'(i % 2), v + longint'(i / 2), pl, base);
      done[i] = 0;
      acc[i]  = '0;
    end
    for (int i = 0; i < 4; i++) begin
      if (done[i]) continue;
      if (sup == 0) begin
        acc[cnt++] = t[i];
        done[i] = 1;
      end else if (sup == 2) begin
        acc[cnt++] = t[i];
        for (int j = 0; j < 4; j++) if ((t[j] >> 6) == (t[i] >> 6)) done[j] = 1;
      end else begin
        // all bursts of the line of texel i
        forever begin
          logic [31:0] lo;
          bit          any = 0;
          for (int j = 0; j < 4; j++)
            if (!done[j] && (t[j] >> 6) == (t[i] >> 6) && (!any || t[j] < lo)) begin
              lo  = t[j];
              any = 1;
            end
          if (!any) break;
          acc[cnt++] = lo;
          for (int k = 0; k < 4; k++) begin
            bit hit = 0;
            for (int j = 0; j < 4; j++)
              if ((t[j] >> 6) == (t[i] >> 6) && t[j] == lo + 4 * k) begin done[j] = 1; hit = 1; end
            if (!hit) break;
          end
        end
      end
    end
    return cnt;
  endfunction

endpackage
