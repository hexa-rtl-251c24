// tb_hexa_ip_workload: the IP lookup engine at its default size (110,000
// cells, 2-bit discriminators) loaded with a binary trie of 100,000 nodes,
// the m = 1.1 n load at which a perfect node-to-cell matching should still
// exist with three choices per node.
//
// How it works. Random prefixes (lengths 12..24) are added to the reference
// trie until it has 100,000 nodes; the reference model places every node by a
// random walk over its three candidate cells, and the testbench counts it a
// failure if that does not succeed. All nodes are written into the engine and
// random keys (most of them inside a stored prefix) are looked up and compared
// with a longest-prefix match over the prefix list, latency included (the
// response is valid in the cycle after edge D+1 after the accepting edge).
// Then 200 single-prefix updates are applied one at a time. Each extends an
// existing prefix by one bit, so that it adds at most one trie node. The new
// node is placed along a shortest augmenting path (breadth-first search over
// node moves ending at a free cell). Only the cells whose contents changed are
// rewritten. Two histograms are printed: nodes moved per update, and cell
// writes per update (moved nodes plus parents whose discriminator changed).
// Lookups are checked between and after the updates.
//
// What follows the method: the load factor, the 2-bit discriminators, the
// single-node update along a shortest augmenting path. This testbench's own
// choices: random prefixes instead of a real routing table, and only
// insertions (the reference trie never deletes nodes).
module tb_hexa_ip_workload;
  import tb_hexa_ref_pkg::*;
  localparam int CELLS = 110000, AW = 17, DW = 6, EW = 5, NH_W = 8;
  localparam int TARGET_NODES = 100000;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [1:0] cfg_root_disc;
  logic fp_wr_en, nh_wr_en, req_valid, req_ready, resp_valid, resp_found;
  logic [AW-1:0] fp_wr_addr, nh_wr_addr, resp_loc;
  logic [EW-1:0] fp_wr_data;
  logic [NH_W-1:0] nh_wr_data, resp_next_hop;
  logic [31:0] req_key;
  logic [DW-1:0] resp_len;

  hexa_ip_lookup dut (.*);

  trie_model tm;
  int n_found = 0, n_nomatch = 0;
  int hist_ops[64], hist_mv[64];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr_node(input int n);
    @(negedge clk);
    fp_wr_en = 1; fp_wr_addr = AW'(tm.loc[n]); fp_wr_data = EW'(tm.cell_word(n));
    nh_wr_en = tm.flag[n]; nh_wr_addr = AW'(tm.loc[n]); nh_wr_data = NH_W'(tm.nh[n]);
    @(negedge clk);
    fp_wr_en = 0; nh_wr_en = 0;
  endtask

  task automatic lookup(input logic [31:0] key);
    bit found; int len, hop, d, c0;
    tm.lpm(key, found, len, hop);
    d = tm.walk_depth(key);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_key = key;
    @(posedge clk); #1;
    req_valid = 0;
    c0 = 0;
    while (!resp_valid && c0 < 100) begin @(posedge clk); #1; c0++; end
    check("latency", c0, d + 1);
    check("found", resp_found, found);
    if (found) begin
      check("length", resp_len, len);
      check("next hop", resp_next_hop, hop);
      n_found++;
    end else n_nomatch++;
  endtask

  function automatic logic [31:0] rand_key();
    logic [31:0] k;
    int i;
    k = $urandom;
    if ($urandom_range(0, 3) != 0) begin
      i = $urandom_range(0, tm.pval.size() - 1);
      for (int b = 0; b < tm.plen[i]; b++) k[31-b] = tm.pval[i][31-b];
    end
    return k;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int old_loc[$], old_word[$], old_nh[$];
    int nw, maxw, sumw, nmv, maxmv;
    rst_n = 0;
    cfg_root_disc = 0; fp_wr_en = 0; nh_wr_en = 0; req_valid = 0; req_key = 0;
    fp_wr_addr = 0; nh_wr_addr = 0; fp_wr_data = 0; nh_wr_data = 0;
    foreach (hist_ops[i]) begin hist_ops[i] = 0; hist_mv[i] = 0; end

    tm = new(32, 2, CELLS, 0);
    while (tm.nodes() < TARGET_NODES) begin
      int len;
      len = $urandom_range(12, 24);
      tm.add_prefix($urandom & ~(32'hFFFFFFFF >> len), len, $urandom_range(1, 255));
    end
    check("mapping at m = 1.1 n", tm.map_all(), 1);
    $display("%0d prefixes, %0d trie nodes in %0d cells (load %0d.%0d%%), %0d evictions",
             tm.pval.size(), tm.nodes(), CELLS, tm.nodes() * 100 / CELLS,
             (tm.nodes() * 1000 / CELLS) % 10, tm.kicks);

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < tm.nodes(); n++) wr_node(n);
    cfg_root_disc = 2'(tm.disc[0]);
    for (int t = 0; t < 1500; t++) lookup(rand_key());

    // single-prefix updates
    maxw = 0; sumw = 0; maxmv = 0;
    for (int u = 0; u < 200; u++) begin
      int i, len;
      logic [31:0] v;
      old_loc.delete(); old_word.delete(); old_nh.delete();
      foreach (tm.loc[n]) begin
        old_loc.push_back(tm.loc[n]); old_word.push_back(tm.cell_word(n)); old_nh.push_back(tm.nh[n]);
      end
      i = $urandom_range(0, tm.pval.size() - 1);
      len = tm.plen[i] + 1;
      v = tm.pval[i];
      v[32 - len] = 1'($urandom);
      tm.add_prefix(v, len, $urandom_range(1, 255));
      check("update mapping", tm.map_new_bfs(), 1);
      nw = 0; nmv = 0;
      for (int n = 0; n < old_loc.size(); n++) if (tm.loc[n] != old_loc[n]) nmv++;
      hist_mv[nmv < 63 ? nmv : 63]++;
      if (nmv > maxmv) maxmv = nmv;
      for (int n = 0; n < tm.nodes(); n++)
        if (n >= old_loc.size() || tm.loc[n] != old_loc[n] || tm.cell_word(n) != old_word[n] ||
            tm.nh[n] != old_nh[n]) begin
          wr_node(n); nw++;
        end
      if (tm.disc[0] != cfg_root_disc) cfg_root_disc = 2'(tm.disc[0]);
      hist_ops[nw < 63 ? nw : 63]++;
      sumw += nw;
      if (nw > maxw) maxw = nw;
      if (u % 20 == 19) for (int t = 0; t < 20; t++) lookup(rand_key());
    end
    $display("200 updates: %0d trie nodes, memory writes per update mean %0d.%0d max %0d",
             tm.nodes(), sumw / 200, (sumw * 10 / 200) % 10, maxw);
    $display("existing nodes moved per update (max %0d):", maxmv);
    for (int k = 0; k < 64; k++)
      if (hist_mv[k] != 0) $display("  %2d moved: %0d updates", k, hist_mv[k]);
    $display("cell writes per update:");
    for (int k = 0; k < 64; k++)
      if (hist_ops[k] != 0) $display("  %2d writes: %0d updates", k, hist_ops[k]);
    for (int t = 0; t < 1000; t++) lookup(rand_key());

    checks++;
    if (n_found == 0 || n_nomatch == 0) begin
      failures++;
      $display("FAIL lookups did not cover both outcomes");
    end
    $display("lookups with a route %0d, without %0d", n_found, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
