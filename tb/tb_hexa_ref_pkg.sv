// tb_hexa_ref_pkg: reference models for the HEXA testbenches.
//
//  * trie_hash_ref / str_hash_ref: the two identifier hashes, written out
//    again from their definitions (identifier layout, chunk multipliers,
//    32-bit avalanche mix, multiply-shift range reduction, or the simple
//    modulo / weighted-sum forms).
//  * trie_model: a binary trie built from prefixes, its node-to-cell mapping
//    found by cuckoo-style random-walk insertion over the discriminator
//    choices 1..2^c-1 (0 marks a missing child) or, for updates, by a
//    shortest augmenting path search, the cell contents to program,
//    and a longest-prefix-match reference.
//  * ac_model: an Aho-Corasick automaton with full transition tables (no
//    failure pointers at run time), its bHEXA mapping (length code and
//    discriminator per node, random-walk insertion, nodes that cannot be
//    placed go to spill rows), and a reference run over an input stream.
package tb_hexa_ref_pkg;

  localparam logic [31:0] MULS [8] = '{
    32'h9E3779B1, 32'h85EBCA77, 32'hC2B2AE3D, 32'h27D4EB2F,
    32'h165667B1, 32'hD3A2646D, 32'hFD7046C5, 32'hB55A4F09
  };

  function automatic int mix_reduce(input logic [1023:0] key, input int kw, input int cells);
    logic [31:0] a, x;
    logic [63:0] p;
    int chunks;
    chunks = (kw + 31) / 32;
    a = 0;
    for (int i = 0; i < chunks; i++) a += (key[i*32 +: 32] ^ 32'(i)) * MULS[i % 8];
    x = a;
    x ^= x >> 16; x *= 32'h85EBCA6B; x ^= x >> 13; x *= 32'hC2B2AE35; x ^= x >> 16;
    p = {32'd0, x} * 64'(cells);
    return int'(p[63:32]);
  endfunction

  function automatic int clog2i(input int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // simple=1: numeric value of {disc, hist, depth} mod cells
  function automatic int trie_hash_ref(input bit simple, input int addr_w, input int disc_w,
                                       input int cells, input int disc, input int depth,
                                       input logic [31:0] hist);
    logic [1023:0] key;
    int dw;
    dw  = clog2i(addr_w + 1);
    key = '0;
    for (int i = 0; i < dw; i++) key[i] = depth[i];
    for (int i = 0; i < addr_w; i++) key[dw + i] = hist[i];
    for (int i = 0; i < disc_w; i++) key[dw + addr_w + i] = disc[i];
    if (simple) begin
      logic [127:0] v;
      v = key[127:0];
      return int'(v % 128'(cells));
    end
    return mix_reduce(key, disc_w + addr_w + dw, cells);
  endfunction

  // syms: identifier oldest first (length = identifier length)
  function automatic int str_hash_ref(input bit simple, input int sym_w, input int max_len,
                                      input int disc_w, input int cells, input int syms[$],
                                      input int disc);
    logic [1023:0] key;
    int k, lw, dwd;
    longint s;
    k   = syms.size();
    lw  = clog2i(max_len + 1);
    dwd = (disc_w > 0) ? disc_w : 1;
    if (disc_w == 0) disc = 0;
    if (simple) begin
      s = 0;
      for (int i = 1; i <= k; i++) s += longint'(syms[i-1]) * i;
      s += longint'(disc) * (k + 1);
      return int'(s % cells);
    end
    key = '0;
    for (int j = 0; j < k; j++)              // newest symbol at position 0
      for (int b = 0; b < sym_w; b++) key[j*sym_w + b] = syms[k-1-j][b];
    for (int b = 0; b < lw; b++)  key[max_len*sym_w + b] = k[b];
    for (int b = 0; b < dwd; b++) key[max_len*sym_w + lw + b] = disc[b];
    return mix_reduce(key, dwd + lw + max_len*sym_w, cells);
  endfunction

  // ======================================================================
  class trie_model;
    int addr_w, disc_w, cells;
    bit simple;
    int ch0[$], ch1[$], dep[$], flag[$], nh[$], disc[$], loc[$];
    logic [31:0] hist[$];
    int occ[];
    // prefix list for the independent LPM reference
    logic [31:0] pval[$];
    int plen[$], pnh[$];
    int kicks;

    function new(int addr_w, int disc_w, int cells, bit simple);
      this.addr_w = addr_w; this.disc_w = disc_w; this.cells = cells; this.simple = simple;
      occ = new[cells];
      foreach (occ[i]) occ[i] = -1;
      new_node(0, 0);
    endfunction

    function int new_node(int d, logic [31:0] h);
      ch0.push_back(-1); ch1.push_back(-1); dep.push_back(d); hist.push_back(h);
      flag.push_back(0); nh.push_back(0); disc.push_back(0); loc.push_back(-1);
      return ch0.size() - 1;
    endfunction

    function int nodes();
      return ch0.size();
    endfunction

    // key bit at depth d (MSB first)
    function bit kbit(logic [31:0] key, int d);
      return key[addr_w - 1 - d];
    endfunction

    function void add_prefix(logic [31:0] val, int len, int hop);
      int n;
      n = 0;
      for (int d = 0; d < len; d++) begin
        bit b;
        int c;
        b = kbit(val, d);
        c = b ? ch1[n] : ch0[n];
        if (c < 0) begin
          c = new_node(d + 1, (hist[n] << 1) | 32'(b));
          if (b) ch1[n] = c; else ch0[n] = c;
        end
        n = c;
      end
      flag[n] = 1; nh[n] = hop;
      pval.push_back(val); plen.push_back(len); pnh.push_back(hop);
    endfunction

    function int cell_of(int n, int d);
      return trie_hash_ref(simple, addr_w, disc_w, cells, d, dep[n], hist[n]);
    endfunction

    // place node n, evicting along a random walk; returns 0 on failure
    function bit place(int n, int max_kicks);
      int cur, nd;
      cur = n;
      nd = (1 << disc_w) - 1;
      for (int k = 0; k < max_kicks; k++) begin
        int d, c, victim;
        for (d = 1; d <= nd; d++) begin
          c = cell_of(cur, d);
          if (occ[c] < 0) begin
            occ[c] = cur; disc[cur] = d; loc[cur] = c;
            return 1;
          end
        end
        do d = $urandom_range(1, nd); while (nd > 1 && cell_of(cur, d) == loc[cur]);
        c = cell_of(cur, d);
        victim = occ[c];
        occ[c] = cur; disc[cur] = d; loc[cur] = c;
        loc[victim] = -1;
        cur = victim;
        kicks++;
      end
      return 0;
    endfunction

    function bit map_all();
      for (int n = 0; n < nodes(); n++)
        if (loc[n] < 0 && !place(n, 5000)) return 0;
      return 1;
    endfunction

    // place node n along a shortest augmenting path: breadth-first search
    // over "node x moves to another of its candidate cells", stopping at the
    // first free cell; the nodes on the path then all move one step. Returns
    // 0 if no free cell is reached within max_visit moved nodes.
    function bit place_bfs(int n, int max_visit);
      int qn[$], qprev[$], qtc[$], qtd[$];
      bit vis[int];
      int nd;
      nd = (1 << disc_w) - 1;
      qn.delete(); qprev.delete(); qtc.delete(); qtd.delete(); vis.delete();
      qn.push_back(n); qprev.push_back(-1); qtc.push_back(-1); qtd.push_back(0);
      vis[n] = 1;
      for (int e = 0; e < qn.size() && e < max_visit; e++) begin
        int x;
        x = qn[e];
        for (int d = 1; d <= nd; d++) begin
          int c;
          c = cell_of(x, d);
          if (c == loc[x]) continue;
          if (occ[c] < 0) begin
            int cur, nc, ndisc;
            cur = e; nc = c; ndisc = d;
            while (1) begin
              occ[nc] = qn[cur]; loc[qn[cur]] = nc; disc[qn[cur]] = ndisc;
              if (qprev[cur] < 0) break;
              nc = qtc[cur]; ndisc = qtd[cur]; cur = qprev[cur];
            end
            return 1;
          end
          if (!vis.exists(occ[c])) begin
            vis[occ[c]] = 1;
            qn.push_back(occ[c]); qprev.push_back(e); qtc.push_back(c); qtd.push_back(d);
          end
        end
      end
      return 0;
    endfunction

    function bit map_new_bfs();
      for (int n = 0; n < nodes(); n++)
        if (loc[n] < 0 && !place_bfs(n, 200000)) return 0;
      return 1;
    endfunction

    // fast-path cell contents {flag, left disc, right disc}
    function int cell_word(int n);
      int l, r;
      l = (ch0[n] >= 0) ? disc[ch0[n]] : 0;
      r = (ch1[n] >= 0) ? disc[ch1[n]] : 0;
      return (flag[n] << (2 * disc_w)) | (l << disc_w) | r;
    endfunction

    // longest prefix match by scanning the prefix list (latest duplicate wins)
    function void lpm(logic [31:0] key, output bit found, output int len, output int hop);
      found = 0; len = -1; hop = 0;
      foreach (pval[i]) begin
        bit m;
        m = 1;
        for (int d = 0; d < plen[i]; d++) if (kbit(key, d) != kbit(pval[i], d)) m = 0;
        if (m && plen[i] >= len) begin found = 1; len = plen[i]; hop = pnh[i]; end
      end
      if (!found) len = 0;
    endfunction

    // depth of the last trie node on the key's path
    function int walk_depth(logic [31:0] key);
      int n, d;
      n = 0; d = 0;
      while (d < addr_w) begin
        int c;
        c = kbit(key, d) ? ch1[n] : ch0[n];
        if (c < 0) break;
        n = c; d++;
      end
      return d;
    endfunction
  endclass

  // ======================================================================
  class ac_model;
    int sym_w, disc_w, len_w, max_len, cells, spill, cam_syms;
    bit simple;
    int lentab[$];
    int alpha;
    int gto[$][$];     // goto function of the pattern trie, -1 = none
    int dlt[$][$];     // full transition table
    int fail[$], dep[$], out[$];
    int str[$][$];     // node string, oldest symbol first
    int code[$];       // {disc, lcode} of each node, or the spill code
    int row[$];        // row of each node
    int occ[];
    int spilled[$];    // spilled nodes in slot order
    int root_row;

    function new(int sym_w, int disc_w, int len_w, int max_len, int cells, int spill,
                 int cam_syms, bit simple);
      this.sym_w = sym_w; this.disc_w = disc_w; this.len_w = len_w; this.max_len = max_len;
      this.cells = cells; this.spill = spill; this.cam_syms = cam_syms; this.simple = simple;
      alpha = 1 << sym_w;
      for (int i = 0; i < (1 << len_w); i++) lentab.push_back(i <= max_len ? i : max_len);
      add_node(-1, 0);
    endfunction

    function int spill_code();
      return (1 << (disc_w + len_w)) - 1;
    endfunction

    function int add_node(int parent, int s);
      int q[$];
      gto.push_back(q); dlt.push_back(q);
      for (int i = 0; i < alpha; i++) begin
        gto[gto.size()-1].push_back(-1);
        dlt[dlt.size()-1].push_back(0);
      end
      fail.push_back(0); out.push_back(0); code.push_back(0); row.push_back(-1);
      if (parent < 0) begin
        dep.push_back(0); str.push_back(q);
      end else begin
        q = str[parent]; q.push_back(s);
        dep.push_back(dep[parent] + 1); str.push_back(q);
      end
      return gto.size() - 1;
    endfunction

    function int nodes();
      return gto.size();
    endfunction

    function void add_pattern(int p[$]);
      int n;
      n = 0;
      foreach (p[i]) begin
        if (gto[n][p[i]] < 0) begin
          int c;
          c = add_node(n, p[i]);
          gto[n][p[i]] = c;
        end
        n = gto[n][p[i]];
      end
      out[n] = 1;
    endfunction

    // failure links, outputs along failure chains, full transition table
    function void build();
      int q[$];
      for (int s = 0; s < alpha; s++) begin
        if (gto[0][s] >= 0) begin
          fail[gto[0][s]] = 0; dlt[0][s] = gto[0][s]; q.push_back(gto[0][s]);
        end else dlt[0][s] = 0;
      end
      while (q.size() > 0) begin
        int u;
        u = q.pop_front();
        if (out[fail[u]]) out[u] = 1;
        for (int s = 0; s < alpha; s++) begin
          int v;
          v = gto[u][s];
          if (v >= 0) begin
            fail[v] = dlt[fail[u]][s];
            dlt[u][s] = v;
            q.push_back(v);
          end else dlt[u][s] = dlt[fail[u]][s];
        end
      end
    endfunction

    function int cell_of(int n, int c);
      int lcode, d, len;
      int ident[$];
      lcode = c & ((1 << len_w) - 1);
      d     = c >> len_w;
      len   = lentab[lcode];
      for (int i = dep[n] - len; i < dep[n]; i++) ident.push_back(str[n][i]);
      return str_hash_ref(simple, sym_w, max_len, disc_w, cells, ident, d);
    endfunction

    // legal codes of node n: identifier no longer than the node's depth
    function void choices(int n, output int cs[$]);
      cs.delete();
      for (int c = 0; c < (1 << (disc_w + len_w)); c++) begin
        if (c == spill_code()) continue;
        if (lentab[c & ((1 << len_w) - 1)] > dep[n]) continue;
        if (n == 0 && lentab[c & ((1 << len_w) - 1)] != 0) continue;
        cs.push_back(c);
      end
    endfunction

    // random-walk placement; returns the node left without a cell, or -1
    function int place(int n, int max_kicks);
      int cur;
      cur = n;
      for (int k = 0; k < max_kicks; k++) begin
        int cs[$];
        int c, victim, pick;
        choices(cur, cs);
        if (cs.size() == 0) return cur;
        foreach (cs[i]) begin
          c = cell_of(cur, cs[i]);
          if (occ[c] < 0) begin
            occ[c] = cur; code[cur] = cs[i]; row[cur] = c;
            return -1;
          end
        end
        pick = cs[$urandom_range(0, cs.size() - 1)];
        c = cell_of(cur, pick);
        victim = occ[c];
        if (victim == 0) return cur;       // the root is never moved
        occ[c] = cur; code[cur] = pick; row[cur] = c;
        row[victim] = -1;
        cur = victim;
      end
      return cur;
    endfunction

    // returns 0 if more nodes spill than there are spill rows
    function bit map_all();
      occ = new[cells];
      foreach (occ[i]) occ[i] = -1;
      spilled.delete();
      foreach (row[i]) row[i] = -1;
      for (int n = 0; n < nodes(); n++) begin
        int left;
        left = place(n, 300);
        if (left >= 0) begin
          if (left == 0 || dep[left] > cam_syms || spilled.size() >= spill) begin
            $display("bHEXA mapping: node %0d (depth %0d) has no cell, %0d already spilled",
                     left, dep[left], spilled.size());
            return 0;
          end
          row[left] = cells + spilled.size();
          code[left] = spill_code();
          spilled.push_back(left);
        end
      end
      root_row = row[0];
      return 1;
    endfunction
  endclass

endpackage
