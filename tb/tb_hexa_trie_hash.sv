// tb_hexa_trie_hash: checks the trie identifier hash.
//  * Simple hash, 4-bit keys, 9 cells: the identifiers of the nine nodes of
//    the five-prefix example trie with discriminator 00 must land on the cells
//    listed for them in the worked example (0,1,0,2,1,8,1,0,0), and random
//    identifiers must equal their numeric value mod 9.
//  * Mixing hash, default sizes: random identifiers compared with a reference
//    model written here, and every cell index must be below CELLS.
module tb_hexa_trie_hash;
  int checks = 0, failures = 0;

  // --- simple hash, example sizes
  logic [1:0] s_disc;
  logic [2:0] s_depth;
  logic [3:0] s_hist;
  logic [3:0] s_idx;
  hexa_trie_hash #(.ADDR_W(4), .DISC_W(2), .CELLS(9), .HASH_KIND(hexa_pkg::HASH_SIMPLE))
    u_simple (.disc(s_disc), .depth(s_depth), .history(s_hist), .idx(s_idx));

  // --- mixing hash, default sizes
  logic [1:0]  m_disc;
  logic [5:0]  m_depth;
  logic [31:0] m_hist;
  logic [16:0] m_idx;
  hexa_trie_hash u_mix (.disc(m_disc), .depth(m_depth), .history(m_hist), .idx(m_idx));

  function automatic logic [31:0] ref_mix(input logic [39:0] k);
    logic [31:0] a, x;
    logic [63:0] p;
    a = (k[31:0] ^ 32'd0) * 32'h9E3779B1 + ({24'd0, k[39:32]} ^ 32'd1) * 32'h85EBCA77;
    x = a;
    x ^= x >> 16; x *= 32'h85EBCA6B; x ^= x >> 13; x *= 32'hC2B2AE35; x ^= x >> 16;
    p = {32'd0, x} * 64'd110000;
    return p[63:32];
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // example trie: history, depth and expected cell for discriminator 00
  int ex_hist [9] = '{0, 0, 1, 0, 1, 3, 2, 3, 4};
  int ex_dep  [9] = '{0, 1, 1, 2, 2, 2, 3, 3, 4};
  int ex_cell [9] = '{0, 1, 0, 2, 1, 8, 1, 0, 0};

  initial begin
    for (int n = 0; n < 9; n++) begin
      s_disc = 2'd0; s_depth = 3'(ex_dep[n]); s_hist = 4'(ex_hist[n]);
      #1;
      check($sformatf("example node %0d", n + 1), int'(s_idx), ex_cell[n]);
    end
    for (int t = 0; t < 300; t++) begin
      s_disc = 2'($urandom); s_depth = 3'($urandom_range(0, 4));
      s_hist = 4'($urandom & ((1 << s_depth) - 1));
      #1;
      check("simple random", int'(s_idx), int'({s_disc, s_hist, s_depth}) % 9);
    end
    for (int t = 0; t < 2000; t++) begin
      m_disc = 2'($urandom); m_depth = 6'($urandom_range(0, 32));
      m_hist = (m_depth == 0) ? 32'd0 : ($urandom >> (32 - m_depth));
      #1;
      check("mix random", int'(m_idx), int'(ref_mix({m_disc, m_hist, m_depth})));
      check("mix in range", int'(m_idx < 17'd110000), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
