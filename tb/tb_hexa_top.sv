// tb_hexa_top: end-to-end test of hexa_top at its default sizes (110,000 trie
// cells; 71,377 + 64 automaton rows of 256 transitions; 64-entry spill CAM).
//
// All three engines are programmed from the reference models in
// tb_hexa_ref_pkg and then exercised at the same time:
//   IP lookup  : about 1,500 random prefixes (lengths 8..24) plus host routes;
//                random lookups compared with a longest-prefix match over the
//                prefix list, including latency; then an incremental update
//                (default route and new prefixes, only changed cells
//                rewritten) and more lookups.
//   Strings    : random patterns over thirty symbols plus a run of twenty equal
//                symbols (whose deeper nodes can only live in the spill CAM);
//                a symbol stream (random symbols, whole patterns and runs)
//                with bubbles and restarts compared with a
//                software Aho-Corasick run; then the length table is switched
//                to superlinear steps, the automaton remapped and rerun.
//   Bit-split  : sixteen patterns over twenty byte values (one a run of 36
//                equal bytes), four 2-bit machines mapped with the length
//                table 0,1,2,3,5,7,12,16; the pattern vector of every byte is
//                compared with a brute-force scan of the input, three cycles
//                later.
// Each mechanism (match, no match, full 32-level walk, early stop on a
// missing child, update, spilled node, restart, bubble, length-table switch,
// bit-split match and spilled bit-split node)
// is counted and must occur at least once.
module tb_hexa_top;
  import tb_hexa_ref_pkg::*;
  localparam int IP_CELLS = 110000, IP_AW = 17, IP_DW = 6, IP_EW = 5, NH_W = 8;
  localparam int STR_CELLS = 71377, STR_SPILL = 64, CAM_SYMS = 64;
  localparam int RW = 17, LW = 5, SW = 6, CDW = 7, TW = 3, LEN_W = 2;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // IP lookup ports
  logic [1:0] ip_cfg_root_disc;
  logic ip_fp_wr_en, ip_nh_wr_en, ip_req_valid, ip_req_ready, ip_resp_valid, ip_resp_found;
  logic [IP_AW-1:0] ip_fp_wr_addr, ip_nh_wr_addr, ip_resp_loc;
  logic [IP_EW-1:0] ip_fp_wr_data;
  logic [NH_W-1:0] ip_nh_wr_data, ip_resp_next_hop;
  logic [31:0] ip_req_key;
  logic [IP_DW-1:0] ip_resp_len;
  // string matcher ports
  logic [RW-1:0] str_cfg_root_row, str_tr_wr_row, str_mf_wr_row, str_out_row;
  logic str_tr_wr_en, str_mf_wr_en, str_mf_wr_flag, str_cam_wr_en, str_cam_wr_valid, str_lt_wr_en;
  logic [7:0] str_tr_wr_sym, str_in_sym;
  logic [TW-1:0] str_tr_wr_code;
  logic [SW-1:0] str_cam_wr_slot;
  logic [CDW-1:0] str_cam_wr_depth;
  logic [CAM_SYMS*8-1:0] str_cam_wr_str;
  logic [LEN_W-1:0] str_lt_wr_code;
  logic [LW-1:0] str_lt_wr_len;
  logic str_in_valid, str_in_start, str_out_valid, str_out_match, str_out_spill, str_out_miss;

  // bit-split matcher ports
  localparam int BS_M = 4, BS_B = 2, BS_NP = 16, BS_RW = 9;
  logic [BS_M-1:0][BS_RW-1:0] bs_cfg_root_row;
  logic bs_tr_wr_en, bs_pmv_wr_en, bs_cam_wr_en, bs_cam_wr_valid, bs_lt_wr_en;
  logic [1:0] bs_tr_wr_mach, bs_pmv_wr_mach, bs_cam_wr_mach, bs_tr_wr_sym;
  logic [BS_RW-1:0] bs_tr_wr_row, bs_pmv_wr_row;
  logic [4:0] bs_tr_wr_code, bs_lt_wr_len;
  logic [BS_NP-1:0] bs_pmv_wr_vec, bs_out_vec;
  logic [3:0] bs_cam_wr_slot;
  logic [6:0] bs_cam_wr_depth;
  logic [127:0] bs_cam_wr_str;
  logic [2:0] bs_lt_wr_code;
  logic bs_in_valid, bs_in_start, bs_out_valid, bs_out_match, bs_out_spill, bs_out_miss;
  logic [7:0] bs_in_sym;

  hexa_top dut (.*);

  trie_model tm;
  ac_model am;
  int n_found = 0, n_nomatch = 0, n_deep = 0, n_early = 0, n_update = 0;
  int n_spill = 0, n_smatch = 0, n_restart = 0, n_bubble = 0, n_ltswitch = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic count(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  // ---------------------------------------------------------------- IP side
  task automatic ip_wr(input int n);
    @(negedge clk);
    ip_fp_wr_en = 1; ip_fp_wr_addr = IP_AW'(tm.loc[n]); ip_fp_wr_data = IP_EW'(tm.cell_word(n));
    ip_nh_wr_en = tm.flag[n]; ip_nh_wr_addr = IP_AW'(tm.loc[n]); ip_nh_wr_data = NH_W'(tm.nh[n]);
    @(negedge clk);
    ip_fp_wr_en = 0; ip_nh_wr_en = 0;
  endtask

  task automatic ip_lookup(input logic [31:0] key);
    bit found; int len, hop, d, c0;
    tm.lpm(key, found, len, hop);
    d = tm.walk_depth(key);
    @(negedge clk);
    while (!ip_req_ready) @(negedge clk);
    ip_req_valid = 1; ip_req_key = key;
    @(posedge clk); #1;
    ip_req_valid = 0;
    c0 = 0;
    while (!ip_resp_valid && c0 < 100) begin @(posedge clk); #1; c0++; end
    check("ip latency", c0, d + 1);
    check("ip found", ip_resp_found, found);
    if (found) begin
      check("ip length", ip_resp_len, len);
      check("ip next hop", ip_resp_next_hop, hop);
      n_found++;
    end else n_nomatch++;
    if (d == 32) n_deep++; else n_early++;
  endtask

  function automatic logic [31:0] ip_key();
    logic [31:0] k;
    int i;
    k = $urandom;
    if ($urandom_range(0, 3) != 0) begin
      i = $urandom_range(0, tm.pval.size() - 1);
      for (int b = 0; b < tm.plen[i]; b++) k[31-b] = tm.pval[i][31-b];
    end
    return k;
  endfunction

  task automatic ip_test();
    int old_loc[$], old_word[$], old_nh[$];
    int nw;
    ip_cfg_root_disc = 2'(tm.disc[0]);
    for (int n = 0; n < tm.nodes(); n++) ip_wr(n);
    for (int t = 0; t < 600; t++) ip_lookup(ip_key());
    for (int i = 0; i < 4; i++) ip_lookup(tm.pval[i]);
    // incremental update
    foreach (tm.loc[n]) begin
      old_loc.push_back(tm.loc[n]); old_word.push_back(tm.cell_word(n)); old_nh.push_back(tm.nh[n]);
    end
    tm.add_prefix(32'h0, 0, 250);
    for (int i = 0; i < 30; i++) begin
      int len;
      len = $urandom_range(8, 28);
      tm.add_prefix($urandom & ~(32'hFFFFFFFF >> len), len, $urandom_range(1, 255));
    end
    check("ip remap", tm.map_all(), 1);
    ip_cfg_root_disc = 2'(tm.disc[0]);
    nw = 0;
    for (int n = 0; n < tm.nodes(); n++)
      if (n >= old_loc.size() || tm.loc[n] != old_loc[n] || tm.cell_word(n) != old_word[n] ||
          tm.nh[n] != old_nh[n]) begin
        ip_wr(n); nw++;
      end
    $display("IP update: %0d nodes now, %0d cells rewritten", tm.nodes(), nw);
    n_update++;
    for (int t = 0; t < 600; t++) ip_lookup(ip_key());
  endtask

  // ---------------------------------------------------------------- string side
  int exp_match[$], exp_row[$], exp_spill[$], exp_cyc[$];

  always @(posedge clk) begin
    #1;
    if (rst_n && str_out_valid) begin
      if (exp_match.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected string result");
      end else begin
        check("str match", str_out_match, exp_match.pop_front());
        check("str row", str_out_row, exp_row.pop_front());
        check("str spill", str_out_spill, exp_spill.pop_front());
        check("str latency", cyc - exp_cyc.pop_front(), 2);
        check("str no CAM miss", str_out_miss, 0);
        if (str_out_spill) n_spill++;
        if (str_out_match) n_smatch++;
      end
    end
  end

  task automatic str_program();
    foreach (am.lentab[i]) begin
      @(negedge clk);
      str_lt_wr_en = 1; str_lt_wr_code = LEN_W'(i); str_lt_wr_len = LW'(am.lentab[i]);
    end
    @(negedge clk); str_lt_wr_en = 0;
    str_cfg_root_row = RW'(am.root_row);
    for (int s = 0; s < STR_SPILL; s++) begin
      @(negedge clk);
      str_cam_wr_en = 1; str_cam_wr_slot = SW'(s); str_cam_wr_valid = (s < am.spilled.size());
      str_cam_wr_depth = '0; str_cam_wr_str = '0;
      if (s < am.spilled.size()) begin
        int v;
        v = am.spilled[s];
        str_cam_wr_depth = CDW'(am.dep[v]);
        for (int j = 0; j < am.dep[v]; j++)
          str_cam_wr_str[j*8 +: 8] = 8'(am.str[v][am.dep[v] - 1 - j]);
      end
    end
    @(negedge clk); str_cam_wr_en = 0;
    for (int u = 0; u < am.nodes(); u++)
      for (int s = 0; s < 256; s++) begin
        @(negedge clk);
        str_tr_wr_en = 1; str_tr_wr_row = RW'(am.row[u]); str_tr_wr_sym = 8'(s);
        str_tr_wr_code = TW'(am.code[am.dlt[u][s]]);
        str_mf_wr_en = (s == 0); str_mf_wr_row = RW'(am.row[u]); str_mf_wr_flag = am.out[u][0];
      end
    @(negedge clk); str_tr_wr_en = 0; str_mf_wr_en = 0;
  endtask

  int pats[$][$];

  task automatic str_stream(input int nsym);
    int st;
    int pend[$];
    bit first;
    st = 0;
    first = 1;
    pend.delete();
    for (int t = 0; t < nsym; t++) begin
      @(negedge clk);
      str_in_valid = 0; str_in_start = 0;
      if ($urandom_range(0, 9) == 0) begin n_bubble++; continue; end
      str_in_valid = 1;
      str_in_start = first || ($urandom_range(0, 199) == 0);
      if (str_in_start) begin st = 0; if (!first) n_restart++; end
      first = 0;
      if (pend.size() == 0) begin
        int r;
        r = $urandom_range(0, 9);
        if (r < 3) pend = pats[$urandom_range(0, pats.size() - 1)];      // a whole pattern
        else if (r == 3) repeat ($urandom_range(1, 25)) pend.push_back(4);  // a run of 4s
        else if (r == 4) pend.push_back(8'h7A);                             // outside the patterns
        else pend.push_back($urandom_range(1, 30));
      end
      str_in_sym = 8'(pend.pop_front());
      st = am.dlt[st][str_in_sym];
      exp_match.push_back(am.out[st]);
      exp_row.push_back(am.row[st]);
      exp_spill.push_back(am.code[st] == am.spill_code());
      exp_cyc.push_back(cyc);
    end
    @(negedge clk); str_in_valid = 0; str_in_start = 0;
    repeat (4) @(negedge clk);
    check("str all results seen", exp_match.size(), 0);
  endtask

  task automatic str_test();
    str_program();
    str_stream(6000);
    am.lentab[0] = 0; am.lentab[1] = 1; am.lentab[2] = 3; am.lentab[3] = 7;
    check("str remap", am.map_all(), 1);
    $display("strings, superlinear lengths: %0d spilled", am.spilled.size());
    str_program();
    n_ltswitch++;
    str_stream(6000);
  endtask

  // ---------------------------------------------------------------- bit-split side
  ac_model bm[BS_M];
  int bpats[$][$];
  int balpha[$];
  int n_bmatch = 0, n_bspill = 0;
  logic [BS_NP-1:0] bexp_vec[$];
  int bexp_cyc[$];
  bit bexp_sp[$];

  function automatic int bproj(int b, int m);
    return (b >> (m * BS_B)) & ((1 << BS_B) - 1);
  endfunction

  // bit i: projected pattern i is a suffix of the node's string
  function automatic logic [BS_NP-1:0] bpmv(int m, int u);
    logic [BS_NP-1:0] v;
    v = '0;
    for (int i = 0; i < BS_NP; i++) begin
      int pl, dl;
      bit ok;
      pl = bpats[i].size();
      dl = bm[m].dep[u];
      ok = (pl <= dl);
      for (int j = 0; ok && j < pl; j++)
        if (bm[m].str[u][dl - pl + j] != bproj(bpats[i][j], m)) ok = 0;
      v[i] = ok;
    end
    return v;
  endfunction

  task automatic bs_program();
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      bs_lt_wr_en = 1; bs_lt_wr_code = 3'(c); bs_lt_wr_len = 5'(bm[0].lentab[c]);
    end
    @(negedge clk); bs_lt_wr_en = 0;
    for (int m = 0; m < BS_M; m++) begin
      bs_cfg_root_row[m] = BS_RW'(bm[m].root_row);
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        bs_cam_wr_en = 1; bs_cam_wr_mach = 2'(m); bs_cam_wr_slot = 4'(s);
        bs_cam_wr_valid = (s < bm[m].spilled.size()); bs_cam_wr_depth = '0; bs_cam_wr_str = '0;
        if (s < bm[m].spilled.size()) begin
          int v;
          v = bm[m].spilled[s];
          bs_cam_wr_depth = 7'(bm[m].dep[v]);
          for (int j = 0; j < bm[m].dep[v]; j++)
            bs_cam_wr_str[j*BS_B +: BS_B] = BS_B'(bm[m].str[v][bm[m].dep[v] - 1 - j]);
        end
      end
      @(negedge clk); bs_cam_wr_en = 0;
      for (int u = 0; u < bm[m].nodes(); u++) begin
        for (int s = 0; s < (1 << BS_B); s++) begin
          @(negedge clk);
          bs_tr_wr_en = 1; bs_tr_wr_mach = 2'(m); bs_tr_wr_row = BS_RW'(bm[m].row[u]);
          bs_tr_wr_sym = BS_B'(s); bs_tr_wr_code = 5'(bm[m].code[bm[m].dlt[u][s]]);
          bs_pmv_wr_en = (s == 0); bs_pmv_wr_mach = 2'(m); bs_pmv_wr_row = BS_RW'(bm[m].row[u]);
          bs_pmv_wr_vec = bpmv(m, u);
        end
      end
      @(negedge clk); bs_tr_wr_en = 0; bs_pmv_wr_en = 0;
    end
  endtask

  always @(posedge clk) begin
    #1;
    if (rst_n && bs_out_valid) begin
      if (bexp_vec.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected bit-split output");
      end else begin
        logic [BS_NP-1:0] e;
        e = bexp_vec.pop_front();
        check("bit-split vector", bs_out_vec, e);
        check("bit-split match", bs_out_match, |e);
        check("bit-split latency", cyc - bexp_cyc.pop_front(), 3);
        check("bit-split spill", bs_out_spill, bexp_sp.pop_front());
        check("bit-split CAM miss", bs_out_miss, 0);
        if (bs_out_match) n_bmatch++;
      end
    end
  end

  task automatic bs_test();
    int pend[$], bytes[$];
    int st[BS_M];
    bit first;
    first = 1;
    bs_program();
    pend.delete(); bytes.delete();
    for (int t = 0; t < 6000; t++) begin
      logic [BS_NP-1:0] e;
      bit sp;
      @(negedge clk);
      bs_in_valid = 0; bs_in_start = 0;
      if ($urandom_range(0, 9) == 0) continue;
      bs_in_valid = 1;
      bs_in_start = first || ($urandom_range(0, 149) == 0);
      if (bs_in_start) begin bytes.delete(); foreach (st[m]) st[m] = 0; end
      first = 0;
      if (pend.size() == 0) begin
        if ($urandom_range(0, 3) == 0) pend = bpats[$urandom_range(0, BS_NP - 1)];
        else if ($urandom_range(0, 5) == 0) repeat ($urandom_range(1, 45)) pend.push_back(balpha[0]);
        else pend.push_back(balpha[$urandom_range(0, balpha.size() - 1)]);
      end
      bs_in_sym = 8'(pend.pop_front());
      bytes.push_back(bs_in_sym);
      sp = 0;
      for (int m = 0; m < BS_M; m++) begin
        st[m] = bm[m].dlt[st[m]][bproj(bs_in_sym, m)];
        if (bm[m].code[st[m]] == bm[m].spill_code()) begin n_bspill++; sp = 1; end
      end
      e = '0;
      for (int i = 0; i < BS_NP; i++) begin
        int pl;
        bit ok;
        pl = bpats[i].size();
        ok = (pl <= bytes.size());
        for (int j = 0; ok && j < pl; j++)
          if (bytes[bytes.size() - pl + j] != bpats[i][j]) ok = 0;
        e[i] = ok;
      end
      bexp_vec.push_back(e); bexp_cyc.push_back(cyc); bexp_sp.push_back(sp);
    end
    @(negedge clk); bs_in_valid = 0; bs_in_start = 0;
    repeat (5) @(negedge clk);
    check("all bit-split results seen", bexp_vec.size(), 0);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    ip_cfg_root_disc = 0; ip_fp_wr_en = 0; ip_nh_wr_en = 0; ip_req_valid = 0; ip_req_key = 0;
    ip_fp_wr_addr = 0; ip_nh_wr_addr = 0; ip_fp_wr_data = 0; ip_nh_wr_data = 0;
    str_cfg_root_row = 0; str_tr_wr_en = 0; str_tr_wr_row = 0; str_tr_wr_sym = 0;
    str_tr_wr_code = 0; str_mf_wr_en = 0; str_mf_wr_row = 0; str_mf_wr_flag = 0;
    str_cam_wr_en = 0; str_cam_wr_slot = 0; str_cam_wr_valid = 0; str_cam_wr_depth = 0;
    str_cam_wr_str = 0; str_lt_wr_en = 0; str_lt_wr_code = 0; str_lt_wr_len = 0;
    str_in_valid = 0; str_in_start = 0; str_in_sym = 0;
    bs_cfg_root_row = '0; bs_tr_wr_en = 0; bs_tr_wr_mach = 0; bs_tr_wr_row = 0; bs_tr_wr_sym = 0;
    bs_tr_wr_code = 0; bs_pmv_wr_en = 0; bs_pmv_wr_mach = 0; bs_pmv_wr_row = 0; bs_pmv_wr_vec = 0;
    bs_cam_wr_en = 0; bs_cam_wr_mach = 0; bs_cam_wr_slot = 0; bs_cam_wr_valid = 0;
    bs_cam_wr_depth = 0; bs_cam_wr_str = 0; bs_lt_wr_en = 0; bs_lt_wr_code = 0; bs_lt_wr_len = 0;
    bs_in_valid = 0; bs_in_start = 0; bs_in_sym = 0;

    balpha.delete();
    // four base bytes, each also with one bit flipped in each 2-bit slice, so
    // that every machine is needed to tell some bytes apart
    for (int k = 0; k < 4; k++) begin
      int base;
      base = $urandom_range(0, 255);
      balpha.push_back(base);
      for (int m = 0; m < 4; m++) balpha.push_back(base ^ (1 << (2 * m)));
    end
    for (int i = 0; i < BS_NP; i++) begin
      int p[$];
      int plen;
      p.delete();
      plen = $urandom_range(3, 12);
      for (int j = 0; j < plen; j++) p.push_back(balpha[$urandom_range(0, balpha.size() - 1)]);
      if (i == BS_NP - 1) begin
        p.delete();
        repeat (36) p.push_back(balpha[0]);
      end
      bpats.push_back(p);
    end
    for (int m = 0; m < BS_M; m++) begin
      bm[m] = new(BS_B, 2, 3, 16, 283, 16, 64, 0);
      foreach (bpats[i]) begin
        int q[$];
        q.delete();
        foreach (bpats[i][j]) q.push_back(bproj(bpats[i][j], m));
        bm[m].add_pattern(q);
      end
      bm[m].build();
      bm[m].lentab = '{0, 1, 2, 3, 5, 7, 12, 16};
      check("bit-split mapping", bm[m].map_all(), 1);
    end

    tm = new(32, 2, IP_CELLS, 0);
    for (int i = 0; i < 1500; i++) begin
      int len;
      len = $urandom_range(8, 24);
      tm.add_prefix($urandom & ~(32'hFFFFFFFF >> len), len, $urandom_range(1, 255));
    end
    for (int i = 0; i < 4; i++) tm.add_prefix($urandom, 32, $urandom_range(1, 255));
    check("ip mapping", tm.map_all(), 1);
    $display("IP: %0d trie nodes in %0d cells", tm.nodes(), IP_CELLS);

    am = new(8, 1, LEN_W, 16, STR_CELLS, STR_SPILL, CAM_SYMS, 0);
    for (int i = 0; i < 60; i++) begin
      int p[$];
      int plen;
      p.delete();
      plen = $urandom_range(4, 12);
      for (int j = 0; j < plen; j++) p.push_back($urandom_range(1, 30));
      am.add_pattern(p);
      pats.push_back(p);
    end
    begin
      int p[$];
      p.delete();
      for (int j = 0; j < 20; j++) p.push_back(4);
      am.add_pattern(p);
    end
    am.build();
    check("str mapping", am.map_all(), 1);
    $display("strings: %0d automaton nodes, %0d spilled", am.nodes(), am.spilled.size());

    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      ip_test();
      str_test();
      bs_test();
    join

    count("IP lookups with a route", n_found);
    count("IP lookups without a route", n_nomatch);
    count("IP 32-level walks", n_deep);
    count("IP walks ended by a NULL child", n_early);
    count("IP incremental updates", n_update);
    count("string matches", n_smatch);
    count("spilled nodes visited", n_spill);
    count("stream restarts", n_restart);
    count("input bubbles", n_bubble);
    count("length table switches", n_ltswitch);
    count("bit-split pattern matches", n_bmatch);
    count("bit-split spilled nodes", n_bspill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
