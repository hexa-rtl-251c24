// tb_bitsplit_matcher: checks the bit-split matcher at its default sizes
// (four machines of two bits, 16 patterns, 283 + 16 rows per machine, 2
// discriminator and 3 length bits per transition).
//
// How it works. Fifteen random patterns of 3..12 bytes are drawn from twenty
// byte values: four random bases, each also with one bit flipped in each of
// the four 2-bit slices, so that some byte pairs differ in one machine's
// slice only and the patterns' projections share many prefixes;
// and the sixteenth is a run of 36 equal bytes, whose deep nodes no short
// identifier can tell apart, so that each machine must spill some of them.
// For each machine the reference model builds the Aho-Corasick automaton of
// the projected patterns, maps it with the superlinear length table
// 0,1,2,3,5,7,12,16 (nodes it cannot place go to the spill CAM) and gives each
// node its partial-match vector: bit i is set when projected pattern i is a
// suffix of the node's string. The expected result is not taken from the
// machines: for every input byte the testbench scans the bytes received since
// the last restart and sets bit i when pattern i ends there. The stream mixes
// random bytes, whole patterns, runs of the repeated byte, bubbles and
// restarts. Every output must come exactly three cycles after its symbol, and
// out_spill must flag the symbols on which a reference machine reached a
// spilled node. Matches, spilled-node visits (from
// the reference machines run alongside), restarts and bubbles are counted
// and must each occur.
module tb_bitsplit_matcher;
  import tb_hexa_ref_pkg::*;
  localparam int MACHINES = 4, BITS = 2, NPAT = 16, DISC_W = 2, LEN_W = 3, MAX_LEN = 16;
  localparam int CELLS = 283, SPILL = 16, CAM_SYMS = 64;
  localparam int TW = DISC_W + LEN_W, RW = 9, LW = 5, SW = 4, CDW = 7, MW = 2;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [MACHINES-1:0][RW-1:0] cfg_root_row;
  logic tr_wr_en, pmv_wr_en, cam_wr_en, cam_wr_valid, lt_wr_en;
  logic [MW-1:0] tr_wr_mach, pmv_wr_mach, cam_wr_mach;
  logic [RW-1:0] tr_wr_row, pmv_wr_row;
  logic [BITS-1:0] tr_wr_sym;
  logic [TW-1:0] tr_wr_code;
  logic [NPAT-1:0] pmv_wr_vec, out_vec;
  logic [SW-1:0] cam_wr_slot;
  logic [CDW-1:0] cam_wr_depth;
  logic [CAM_SYMS*BITS-1:0] cam_wr_str;
  logic [LEN_W-1:0] lt_wr_code;
  logic [LW-1:0] lt_wr_len;
  logic in_valid, in_start, out_valid, out_match, out_spill, out_miss;
  logic [7:0] in_sym;

  bitsplit_matcher dut (.*);

  ac_model am[MACHINES];
  int pats[$][$];
  int bytes[$];
  int n_match = 0, n_spill = 0, n_restart = 0, n_bubble = 0;

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
    else $display("  %-24s %0d", what, n);
  endtask

  function automatic int proj(int b, int m);
    return (b >> (m * BITS)) & ((1 << BITS) - 1);
  endfunction

  // partial-match vector of node u of machine m
  function automatic logic [NPAT-1:0] pmv(int m, int u);
    logic [NPAT-1:0] v;
    v = '0;
    for (int i = 0; i < NPAT; i++) begin
      int pl, dl;
      bit ok;
      pl = pats[i].size();
      dl = am[m].dep[u];
      ok = (pl <= dl);
      for (int j = 0; ok && j < pl; j++)
        if (am[m].str[u][dl - pl + j] != proj(pats[i][j], m)) ok = 0;
      v[i] = ok;
    end
    return v;
  endfunction

  task automatic program_all();
    for (int c = 0; c < (1 << LEN_W); c++) begin
      @(negedge clk);
      lt_wr_en = 1; lt_wr_code = LEN_W'(c); lt_wr_len = LW'(am[0].lentab[c]);
    end
    @(negedge clk); lt_wr_en = 0;
    for (int m = 0; m < MACHINES; m++) begin
      cfg_root_row[m] = RW'(am[m].root_row);
      for (int s = 0; s < SPILL; s++) begin
        @(negedge clk);
        cam_wr_en = 1; cam_wr_mach = MW'(m); cam_wr_slot = SW'(s);
        cam_wr_valid = (s < am[m].spilled.size()); cam_wr_depth = '0; cam_wr_str = '0;
        if (s < am[m].spilled.size()) begin
          int v;
          v = am[m].spilled[s];
          cam_wr_depth = CDW'(am[m].dep[v]);
          for (int j = 0; j < am[m].dep[v]; j++)
            cam_wr_str[j*BITS +: BITS] = BITS'(am[m].str[v][am[m].dep[v] - 1 - j]);
        end
      end
      @(negedge clk); cam_wr_en = 0;
      for (int u = 0; u < am[m].nodes(); u++) begin
        for (int s = 0; s < (1 << BITS); s++) begin
          @(negedge clk);
          tr_wr_en = 1; tr_wr_mach = MW'(m); tr_wr_row = RW'(am[m].row[u]); tr_wr_sym = BITS'(s);
          tr_wr_code = TW'(am[m].code[am[m].dlt[u][s]]);
          pmv_wr_en = (s == 0); pmv_wr_mach = MW'(m); pmv_wr_row = RW'(am[m].row[u]);
          pmv_wr_vec = pmv(m, u);
        end
      end
      @(negedge clk); tr_wr_en = 0; pmv_wr_en = 0;
    end
  endtask

  // expected results in flight
  logic [NPAT-1:0] exp_vec[$];
  int exp_cyc[$];
  bit exp_sp[$];

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      if (exp_vec.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected output");
      end else begin
        logic [NPAT-1:0] e;
        e = exp_vec.pop_front();
        check("pattern vector", out_vec, e);
        check("match", out_match, |e);
        check("latency", cyc - exp_cyc.pop_front(), 3);
        check("no CAM miss", out_miss, 0);
        check("spill", out_spill, exp_sp.pop_front());
        if (out_match) n_match++;
      end
    end
  end

  task automatic run_stream(input int nsym);
    int pend[$];
    int st[MACHINES];
    bit first;
    first = 1;
    pend.delete();
    bytes.delete();
    for (int t = 0; t < nsym; t++) begin
      logic [NPAT-1:0] e;
      bit sp;
      @(negedge clk);
      in_valid = 0; in_start = 0;
      if ($urandom_range(0, 9) == 0) begin n_bubble++; continue; end
      in_valid = 1;
      in_start = first || ($urandom_range(0, 149) == 0);
      if (in_start) begin
        bytes.delete();
        foreach (st[m]) st[m] = 0;
        if (!first) n_restart++;
      end
      first = 0;
      if (pend.size() == 0) begin
        if ($urandom_range(0, 3) == 0) pend = pats[$urandom_range(0, NPAT - 1)];
        else if ($urandom_range(0, 5) == 0) repeat ($urandom_range(1, 45)) pend.push_back(alphabet[0]);
        else pend.push_back(alphabet[$urandom_range(0, alphabet.size() - 1)]);
      end
      in_sym = 8'(pend.pop_front());
      bytes.push_back(in_sym);
      sp = 0;
      for (int m = 0; m < MACHINES; m++) begin
        st[m] = am[m].dlt[st[m]][proj(in_sym, m)];
        if (am[m].code[st[m]] == am[m].spill_code()) begin n_spill++; sp = 1; end
      end
      exp_sp.push_back(sp);
      e = '0;
      for (int i = 0; i < NPAT; i++) begin
        int pl;
        bit ok;
        pl = pats[i].size();
        ok = (pl <= bytes.size());
        for (int j = 0; ok && j < pl; j++)
          if (bytes[bytes.size() - pl + j] != pats[i][j]) ok = 0;
        e[i] = ok;
      end
      exp_vec.push_back(e);
      exp_cyc.push_back(cyc);
    end
    @(negedge clk); in_valid = 0; in_start = 0;
    repeat (5) @(negedge clk);
    check("all results seen", exp_vec.size(), 0);
  endtask

  int alphabet[$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    cfg_root_row = '0; tr_wr_en = 0; tr_wr_mach = 0; tr_wr_row = 0; tr_wr_sym = 0; tr_wr_code = 0;
    pmv_wr_en = 0; pmv_wr_mach = 0; pmv_wr_row = 0; pmv_wr_vec = 0;
    cam_wr_en = 0; cam_wr_mach = 0; cam_wr_slot = 0; cam_wr_valid = 0; cam_wr_depth = 0;
    cam_wr_str = 0; lt_wr_en = 0; lt_wr_code = 0; lt_wr_len = 0;
    in_valid = 0; in_start = 0; in_sym = 0;

    alphabet.delete();
    // four base bytes, each also with one bit flipped in each 2-bit slice, so
    // that every machine is needed to tell some bytes apart
    for (int k = 0; k < 4; k++) begin
      int base;
      base = $urandom_range(0, 255);
      alphabet.push_back(base);
      for (int m = 0; m < 4; m++) alphabet.push_back(base ^ (1 << (2 * m)));
    end
    for (int i = 0; i < NPAT; i++) begin
      int p[$];
      int plen;
      p.delete();
      plen = $urandom_range(3, 12);
      for (int j = 0; j < plen; j++) p.push_back(alphabet[$urandom_range(0, alphabet.size() - 1)]);
      if (i == NPAT - 1) begin
        p.delete();
        repeat (36) p.push_back(alphabet[0]);
      end
      pats.push_back(p);
    end
    for (int m = 0; m < MACHINES; m++) begin
      am[m] = new(BITS, DISC_W, LEN_W, MAX_LEN, CELLS, SPILL, CAM_SYMS, 0);
      foreach (pats[i]) begin
        int q[$];
        q.delete();
        foreach (pats[i][j]) q.push_back(proj(pats[i][j], m));
        am[m].add_pattern(q);
      end
      am[m].build();
      am[m].lentab = '{0, 1, 2, 3, 5, 7, 12, 16};
      check("machine mapping", am[m].map_all(), 1);
      $display("machine %0d: %0d nodes, %0d spilled", m, am[m].nodes(), am[m].spilled.size());
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    program_all();
    run_stream(8000);

    count("pattern matches", n_match);
    count("spilled nodes visited", n_spill);
    count("stream restarts", n_restart);
    count("input bubbles", n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
