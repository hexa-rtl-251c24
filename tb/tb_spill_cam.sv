// tb_spill_cam: programs a small spill CAM with strings over a 2-symbol
// alphabet (so that many entries are suffixes of one another) and searches it
// with random histories, most of them full length and some with only the
// newest key_len symbols valid. The expected result, the matching entry of greatest
// depth or no hit, is computed here by brute force. Entries are also
// invalidated and reset must clear them all.
module tb_spill_cam;
  localparam int E = 8, K = 8, SW = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          wr_en, wr_valid, hit;
  logic [2:0]    wr_slot, slot;
  logic [3:0]    wr_depth;
  logic [K*SW-1:0] wr_str, key;
  logic [3:0]    key_len;

  spill_cam #(.ENTRIES(E), .KEY_SYMS(K), .SYM_W(SW)) dut (.*);

  logic          m_valid [E];
  int            m_depth [E];
  logic [K*SW-1:0] m_str [E];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic prog_entry(input int e, input logic v, input int d);
    @(negedge clk);
    wr_en = 1; wr_slot = 3'(e); wr_valid = v; wr_depth = 4'(d);
    wr_str = '0;
    for (int j = 0; j < d; j++) wr_str[j*SW +: SW] = SW'($urandom_range(1, 2));
    m_valid[e] = v; m_depth[e] = d; m_str[e] = wr_str;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic search();
    int best, bslot;
    best = -1; bslot = 0;
    for (int j = 0; j < K; j++) key[j*SW +: SW] = SW'($urandom_range(1, 2));
    key_len = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(0, K)) : 4'(K);
    #1;
    for (int e = 0; e < E; e++) begin
      logic ok;
      ok = m_valid[e] && (m_depth[e] <= int'(key_len));
      for (int j = 0; j < m_depth[e]; j++)
        if (key[j*SW +: SW] != m_str[e][j*SW +: SW]) ok = 0;
      if (ok && m_depth[e] > best) begin best = m_depth[e]; bslot = e; end
    end
    check("hit", int'(hit), int'(best >= 0));
    if (best >= 0) check("slot depth", m_depth[slot], best);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; wr_slot = 0; wr_valid = 0; wr_depth = 0; wr_str = 0; key = 0; key_len = 4'(K);
    for (int e = 0; e < E; e++) begin m_valid[e] = 0; m_depth[e] = 0; m_str[e] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int j = 0; j < K; j++) key[j*SW +: SW] = 4'd1;
    #1 check("empty after reset", int'(hit), 0);
    for (int round = 0; round < 40; round++) begin
      for (int e = 0; e < E; e++) prog_entry(e, 1'($urandom_range(0, 4) != 0), $urandom_range(1, K));
      repeat (50) search();
    end
    // depth-0 entries are never used by the matcher, but must not break ties
    rst_n = 0; #1; rst_n = 1;
    for (int e = 0; e < E; e++) m_valid[e] = 0;
    #1 check("cleared by reset", int'(hit), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
