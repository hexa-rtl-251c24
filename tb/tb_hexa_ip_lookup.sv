// tb_hexa_ip_lookup: end-to-end check of the HEXA trie lookup engine.
//
// A random routing table (short prefixes, so that lookups share paths, plus a
// few host routes) is turned into a binary trie by the reference model, which
// also finds a cell for every node (discriminators 1..3) and gives the cell
// contents. The testbench programs the engine with them and compares every
// lookup with a longest-prefix match computed by scanning the prefix list:
// found, prefix length, next hop and the latency (response in the cycle after
// edge D+1 after the accepting edge, D = depth of the last trie node on the key's path). Phase 2 adds
// a default route and more prefixes as an incremental update, rewriting only
// the cells whose contents or position changed, and repeats the lookups.
module tb_hexa_ip_lookup;
  import tb_hexa_ref_pkg::*;
  localparam int AW_KEY = 32, DISC_W = 2, CELLS = 2048, NH_W = 8;
  localparam int AW = 11, DW = 6, EW = 5;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [DISC_W-1:0] cfg_root_disc;
  logic fp_wr_en, nh_wr_en;
  logic [AW-1:0] fp_wr_addr, nh_wr_addr;
  logic [EW-1:0] fp_wr_data;
  logic [NH_W-1:0] nh_wr_data;
  logic req_valid, req_ready, resp_valid, resp_found;
  logic [AW_KEY-1:0] req_key;
  logic [DW-1:0] resp_len;
  logic [AW-1:0] resp_loc;
  logic [NH_W-1:0] resp_next_hop;

  hexa_ip_lookup #(.ADDR_W(AW_KEY), .DISC_W(DISC_W), .CELLS(CELLS), .NH_W(NH_W)) dut (.*);

  trie_model tm;
  int n_nomatch = 0, n_deep = 0, n_writes = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr_cell(input int n);
    @(negedge clk);
    fp_wr_en = 1; fp_wr_addr = AW'(tm.loc[n]); fp_wr_data = EW'(tm.cell_word(n));
    nh_wr_en = tm.flag[n]; nh_wr_addr = AW'(tm.loc[n]); nh_wr_data = NH_W'(tm.nh[n]);
    n_writes++;
    @(negedge clk);
    fp_wr_en = 0; nh_wr_en = 0;
  endtask

  task automatic lookup(input logic [31:0] key);
    bit found; int len, hop, d, cyc;
    tm.lpm(key, found, len, hop);
    d = tm.walk_depth(key);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_key = key;
    @(posedge clk); #1;
    req_valid = 0;
    cyc = 0;
    while (!resp_valid && cyc < 100) begin @(posedge clk); #1; cyc++; end
    check("latency", cyc, d + 1);
    check("found", resp_found, found);
    if (found) begin
      check("length", resp_len, len);
      check("next hop", resp_next_hop, hop);
    end else n_nomatch++;
    if (d == 32) n_deep++;
  endtask

  function automatic logic [31:0] rand_key();
    logic [31:0] k;
    k = $urandom;
    if ($urandom_range(0, 2) != 0 && tm.pval.size() > 0) begin
      int i;
      i = $urandom_range(0, tm.pval.size() - 1);
      for (int b = 0; b < tm.plen[i]; b++) k[31-b] = tm.pval[i][31-b];
    end
    return k;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int old_loc[$], old_word[$], old_nh[$];
    rst_n = 0; req_valid = 0; req_key = 0; fp_wr_en = 0; nh_wr_en = 0;
    fp_wr_addr = 0; nh_wr_addr = 0; fp_wr_data = 0; nh_wr_data = 0; cfg_root_disc = 0;
    tm = new(AW_KEY, DISC_W, CELLS, 0);
    for (int i = 0; i < 90; i++) begin
      int len;
      len = $urandom_range(4, 12);
      tm.add_prefix($urandom & ~(32'hFFFFFFFF >> len), len, $urandom_range(1, 255));
    end
    tm.add_prefix(32'hC0A80001, 32, 77);
    if (!tm.map_all()) begin failures++; $display("mapping failed"); end
    $display("phase 1: %0d trie nodes in %0d cells, %0d evictions", tm.nodes(), CELLS, tm.kicks);
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_root_disc = DISC_W'(tm.disc[0]);
    for (int n = 0; n < tm.nodes(); n++) wr_cell(n);
    lookup(32'hC0A80001);
    for (int t = 0; t < 400; t++) lookup(rand_key());

    // phase 2: incremental update
    foreach (tm.loc[n]) begin old_loc.push_back(tm.loc[n]); old_word.push_back(tm.cell_word(n)); old_nh.push_back(tm.nh[n]); end
    tm.add_prefix(32'h0, 0, 200);
    for (int i = 0; i < 20; i++) begin
      int len;
      len = $urandom_range(8, 16);
      tm.add_prefix($urandom & ~(32'hFFFFFFFF >> len), len, $urandom_range(1, 255));
    end
    if (!tm.map_all()) begin failures++; $display("mapping failed"); end
    n_writes = 0;
    cfg_root_disc = DISC_W'(tm.disc[0]);
    for (int n = 0; n < tm.nodes(); n++)
      if (n >= old_loc.size() || tm.loc[n] != old_loc[n] || tm.cell_word(n) != old_word[n] ||
          tm.nh[n] != old_nh[n])
        wr_cell(n);
    $display("phase 2: %0d nodes, update wrote %0d cells", tm.nodes(), n_writes);
    for (int t = 0; t < 400; t++) lookup(rand_key());
    lookup(32'hC0A80001);

    check("a lookup found no route", int'(n_nomatch > 0), 1);
    check("a lookup walked all 32 levels", int'(n_deep > 0), 1);
    $display("no-match lookups %0d, full-depth walks %0d", n_nomatch, n_deep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
