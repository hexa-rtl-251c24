// tb_bhexa_run: one self-contained test run of bhexa_matcher, used by
// tb_bhexa_matcher (and by nothing else) with two configurations.
//
//   MODE 0: the three-string example automaton (abc, cab, abba over a=1, b=2,
//           c=3) with the weighted-sum hash over 10 cells, no discriminator
//           and identifiers of up to three symbols. Under that hash the nodes
//           "-", "a", "ab", "ca" and "cab" have only the cells 0, 1, 2 and 5
//           between them, so at least one node must go to the spill CAM.
//   MODE 1: random patterns over four symbols plus a run of twelve equal
//           symbols (which cannot all be told apart by short identifiers), the
//           mixing hash, one discriminator bit, identity length table; then
//           the length table is reprogrammed to the superlinear steps
//           0,1,3,6, the automaton remapped and reprogrammed, and the
//           stream repeated.
//
// The reference automaton comes from tb_hexa_ref_pkg::ac_model. For every
// input symbol the result two cycles later must carry the reference match
// flag, the node's row and its spill status; input bubbles and stream
// restarts are mixed in.
module tb_bhexa_run #(
  parameter int MODE = 0,
  parameter int DISC_W = 0, parameter int LEN_W = 3, parameter int MAX_LEN = 3,
  parameter int CELLS = 10, parameter int SPILL = 4, parameter int CAM_SYMS = 8,
  parameter hexa_pkg::hash_kind_e HASH_KIND = hexa_pkg::HASH_SIMPLE
) (
  output int  checks,
  output int  failures,
  output int  n_spill,
  output int  n_match,
  output int  n_restart,
  output bit  done
);
  import tb_hexa_ref_pkg::*;
  localparam int SYM_W = 8;
  localparam int TW = DISC_W + LEN_W;
  localparam int ROWS = CELLS + SPILL;
  localparam int RW = $clog2(ROWS);
  localparam int LW = $clog2(MAX_LEN + 1);
  localparam int SW = (SPILL > 1) ? $clog2(SPILL) : 1;
  localparam int CDW = $clog2(CAM_SYMS + 1);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [RW-1:0] cfg_root_row, tr_wr_row, mf_wr_row, out_row;
  logic tr_wr_en, mf_wr_en, mf_wr_flag, cam_wr_en, cam_wr_valid, lt_wr_en;
  logic [SYM_W-1:0] tr_wr_sym, in_sym;
  logic [TW-1:0] tr_wr_code;
  logic [SW-1:0] cam_wr_slot;
  logic [CDW-1:0] cam_wr_depth;
  logic [CAM_SYMS*SYM_W-1:0] cam_wr_str;
  logic [LEN_W-1:0] lt_wr_code;
  logic [LW-1:0] lt_wr_len;
  logic in_valid, in_start, out_valid, out_match, out_spill, out_miss;

  bhexa_matcher #(.SYM_W(SYM_W), .DISC_W(DISC_W), .LEN_W(LEN_W), .MAX_LEN(MAX_LEN),
                  .CELLS(CELLS), .SPILL(SPILL), .CAM_SYMS(CAM_SYMS), .HASH_KIND(HASH_KIND))
    dut (.*);

  ac_model am;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL mode %0d %s: got %0d expected %0d", MODE, what, got, exp);
    end
  endtask

  task automatic program_all();
    foreach (am.lentab[i]) begin
      @(negedge clk);
      lt_wr_en = 1; lt_wr_code = LEN_W'(i); lt_wr_len = LW'(am.lentab[i]);
    end
    @(negedge clk); lt_wr_en = 0;
    cfg_root_row = RW'(am.root_row);
    for (int s = 0; s < SPILL; s++) begin
      @(negedge clk);
      cam_wr_en = 1; cam_wr_slot = SW'(s); cam_wr_valid = (s < am.spilled.size());
      cam_wr_depth = '0; cam_wr_str = '0;
      if (s < am.spilled.size()) begin
        int v;
        v = am.spilled[s];
        cam_wr_depth = CDW'(am.dep[v]);
        for (int j = 0; j < am.dep[v]; j++)
          cam_wr_str[j*SYM_W +: SYM_W] = SYM_W'(am.str[v][am.dep[v] - 1 - j]);
      end
    end
    @(negedge clk); cam_wr_en = 0;
    for (int u = 0; u < am.nodes(); u++) begin
      for (int s = 0; s < 256; s++) begin
        @(negedge clk);
        tr_wr_en = 1; tr_wr_row = RW'(am.row[u]); tr_wr_sym = SYM_W'(s);
        tr_wr_code = TW'(am.code[am.dlt[u][s]]);
        mf_wr_en = (s == 0); mf_wr_row = RW'(am.row[u]); mf_wr_flag = am.out[u][0];
      end
    end
    @(negedge clk); tr_wr_en = 0; mf_wr_en = 0;
  endtask

  // expected results in flight
  int exp_match[$], exp_row[$], exp_spill[$], exp_cyc[$];

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      if (exp_match.size() == 0) begin
        checks++; failures++; $display("FAIL mode %0d: unexpected output", MODE);
      end else begin
        check("match", out_match, exp_match.pop_front());
        check("row", out_row, exp_row.pop_front());
        check("spill", out_spill, exp_spill.pop_front());
        check("latency", cyc - exp_cyc.pop_front(), 2);
        check("no CAM miss", out_miss, 0);
        if (out_spill) n_spill++;
        if (out_match) n_match++;
      end
    end
  end

  task automatic run_stream(input int nsym, input int alpha_hi);
    int st;
    bit first;
    st = 0;
    first = 1;
    for (int t = 0; t < nsym; t++) begin
      @(negedge clk);
      in_valid = 0; in_start = 0;
      if ($urandom_range(0, 7) == 0) continue;        // bubble
      in_valid = 1;
      in_start = first || ($urandom_range(0, 99) == 0);
      if (in_start) begin st = 0; if (!first) n_restart++; end
      first = 0;
      in_sym = ($urandom_range(0, 30) == 0) ? 8'h41 : SYM_W'($urandom_range(1, alpha_hi));
      st = am.dlt[st][in_sym];
      exp_match.push_back(am.out[st]);
      exp_row.push_back(am.row[st]);
      exp_spill.push_back(am.code[st] == am.spill_code());
      exp_cyc.push_back(cyc);
    end
    @(negedge clk); in_valid = 0; in_start = 0;
    repeat (4) @(negedge clk);
    check("all results seen", exp_match.size(), 0);
  endtask

  function automatic void add_str(string s);
    int p[$];
    foreach (s[i]) p.push_back(s[i] - "a" + 1);
    am.add_pattern(p);
  endfunction

  initial begin
    checks = 0; failures = 0; n_spill = 0; n_match = 0; n_restart = 0; done = 0;
    rst_n = 0; cfg_root_row = 0; tr_wr_en = 0; tr_wr_row = 0; tr_wr_sym = 0; tr_wr_code = 0;
    mf_wr_en = 0; mf_wr_row = 0; mf_wr_flag = 0; cam_wr_en = 0; cam_wr_slot = 0;
    cam_wr_valid = 0; cam_wr_depth = 0; cam_wr_str = 0; lt_wr_en = 0; lt_wr_code = 0;
    lt_wr_len = 0; in_valid = 0; in_start = 0; in_sym = 0;
    am = new(SYM_W, DISC_W, LEN_W, MAX_LEN, CELLS, SPILL, CAM_SYMS,
             HASH_KIND == hexa_pkg::HASH_SIMPLE);
    if (MODE == 0) begin
      add_str("abc"); add_str("cab"); add_str("abba");
    end else begin
      int p[$];
      for (int i = 0; i < 14; i++) begin
        int plen;
        p.delete();
        plen = $urandom_range(3, 8);
        for (int j = 0; j < plen; j++) p.push_back($urandom_range(1, 4));
        am.add_pattern(p);
      end
      p.delete();
      for (int j = 0; j < 12; j++) p.push_back(4);
      am.add_pattern(p);
    end
    am.build();
    check("mapping found", am.map_all(), 1);
    $display("mode %0d: %0d nodes, %0d cells, %0d spilled", MODE, am.nodes(), CELLS, am.spilled.size());
    if (MODE == 0) check("example needs a spill", int'(am.spilled.size() > 0), 1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    program_all();
    run_stream(MODE == 0 ? 600 : 3000, MODE == 0 ? 3 : 4);
    if (MODE == 1) begin
      // superlinear identifier lengths
      am.lentab[0] = 0; am.lentab[1] = 1; am.lentab[2] = 3; am.lentab[3] = 6;
      check("remapping found", am.map_all(), 1);
      $display("mode 1 superlinear lengths: %0d spilled", am.spilled.size());
      program_all();
      run_stream(3000, 4);
    end
    done = 1;
  end
endmodule
