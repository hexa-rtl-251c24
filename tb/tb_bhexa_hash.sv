// tb_bhexa_hash: checks the bounded-HEXA identifier hash.
//  * Simple hash, alphabet {a,b,c} = {1,2,3}, 10 cells, no discriminator: the
//    identifiers of the three-string example automaton must land where the
//    weighted-sum formula puts them (-:0 a:1 b:2 c:3 ab:5 bb:6 abb:1 ba:4
//    bba:9 bc:8 abc:4 ca:5 cab:1), then random identifiers with a
//    discriminator are compared with the formula.
//  * Mixing hash, default sizes: random identifiers against a reference model
//    written here; symbols past the identifier length must not matter.
module tb_bhexa_hash;
  int checks = 0, failures = 0;

  logic [23:0] s_hist;
  logic [1:0]  s_len;
  logic        s_disc;
  logic [3:0]  s_idx;
  bhexa_hash #(.SYM_W(8), .MAX_LEN(3), .DISC_W(0), .CELLS(10), .HASH_KIND(hexa_pkg::HASH_SIMPLE))
    u_simple (.hist(s_hist), .len(s_len), .disc(s_disc), .idx(s_idx));

  logic [23:0] d_hist;
  logic [1:0]  d_len;
  logic [1:0]  d_disc;
  logic [9:0]  d_idx;
  bhexa_hash #(.SYM_W(8), .MAX_LEN(3), .DISC_W(2), .CELLS(1000), .HASH_KIND(hexa_pkg::HASH_SIMPLE))
    u_simple_d (.hist(d_hist), .len(d_len), .disc(d_disc), .idx(d_idx));

  logic [127:0] m_hist;
  logic [4:0]   m_len;
  logic         m_disc;
  logic [16:0]  m_idx;
  bhexa_hash u_mix (.hist(m_hist), .len(m_len), .disc(m_disc), .idx(m_idx));

  localparam logic [31:0] MULS [5] = '{32'h9E3779B1, 32'h85EBCA77, 32'hC2B2AE3D,
                                       32'h27D4EB2F, 32'h165667B1};

  function automatic int ref_mix(input logic [127:0] h, input int len, input logic d);
    logic [159:0] k;
    logic [31:0] a, x;
    logic [63:0] p;
    k = '0;
    for (int j = 0; j < len; j++) k[j*8 +: 8] = h[j*8 +: 8];
    k[128 +: 5] = 5'(len);
    k[133] = d;
    a = 0;
    for (int i = 0; i < 5; i++) a += (k[i*32 +: 32] ^ 32'(i)) * MULS[i];
    x = a;
    x ^= x >> 16; x *= 32'h85EBCA6B; x ^= x >> 13; x *= 32'hC2B2AE35; x ^= x >> 16;
    p = {32'd0, x} * 64'd71377;
    return int'(p[63:32]);
  endfunction

  // identifier written oldest-first as a string over {a,b,c}
  task automatic ex(input string id, input int exp);
    s_hist = '0;
    s_len  = 2'(id.len());
    s_disc = 1'b0;
    for (int i = 0; i < id.len(); i++)   // newest symbol = last character
      s_hist[(id.len() - 1 - i)*8 +: 8] = 8'(id[i] - "a" + 1);
    #1;
    check($sformatf("h(%s)", id), int'(s_idx), exp);
  endtask

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

  initial begin
    ex("", 0); ex("a", 1); ex("b", 2); ex("c", 3); ex("ab", 5); ex("bb", 6);
    ex("abb", 1); ex("ba", 4); ex("bba", 9); ex("bc", 8); ex("abc", 4);
    ex("ca", 5); ex("cab", 1);
    for (int t = 0; t < 500; t++) begin
      int s;
      d_hist = 24'($urandom); d_len = 2'($urandom_range(0, 3)); d_disc = 2'($urandom);
      #1;
      s = 0;
      for (int i = 1; i <= d_len; i++) s += int'(d_hist[(d_len - i)*8 +: 8]) * i;
      s += int'(d_disc) * (d_len + 1);
      check("simple+disc random", int'(d_idx), s % 1000);
    end
    for (int t = 0; t < 2000; t++) begin
      int e;
      for (int w = 0; w < 4; w++) m_hist[w*32 +: 32] = $urandom;
      m_len = 5'($urandom_range(0, 16)); m_disc = 1'($urandom);
      #1;
      e = ref_mix(m_hist, m_len, m_disc);
      check("mix random", int'(m_idx), e);
      if (m_len < 16) begin   // disturb a symbol outside the identifier
        m_hist[m_len*8 +: 8] = ~m_hist[m_len*8 +: 8];
        #1;
        check("mix ignores older symbols", int'(m_idx), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
