// tb_bhexa_matcher: runs bhexa_matcher in two configurations (see
// tb_bhexa_run): the three-string example automaton with the worked example's
// hash, and a random automaton with spilled nodes and a reprogrammed
// superlinear length table. Every symbol's result is compared with a software
// Aho-Corasick automaton; spills, matches and stream restarts must all occur.
module tb_bhexa_matcher;
  int c0, f0, s0, m0, r0, c1, f1, s1, m1, r1;
  bit d0, d1;
  int checks, failures;

  tb_bhexa_run #(.MODE(0), .DISC_W(0), .LEN_W(3), .MAX_LEN(3), .CELLS(10), .SPILL(4),
                 .CAM_SYMS(8), .HASH_KIND(hexa_pkg::HASH_SIMPLE))
    u_example (.checks(c0), .failures(f0), .n_spill(s0), .n_match(m0), .n_restart(r0), .done(d0));

  tb_bhexa_run #(.MODE(1), .DISC_W(1), .LEN_W(2), .MAX_LEN(16), .CELLS(160), .SPILL(32),
                 .CAM_SYMS(16), .HASH_KIND(hexa_pkg::HASH_MIX))
    u_random (.checks(c1), .failures(f1), .n_spill(s1), .n_match(m1), .n_restart(r1), .done(d1));

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    checks = c0 + c1 + 6;
    failures = f0 + f1;
    if (s0 == 0) begin failures++; $display("example: no spilled node visited"); end
    if (s1 == 0) begin failures++; $display("random: no spilled node visited"); end
    if (m0 == 0) begin failures++; $display("example: no match"); end
    if (m1 == 0) begin failures++; $display("random: no match"); end
    if (r0 == 0) begin failures++; $display("example: no restart"); end
    if (r1 == 0) begin failures++; $display("random: no restart"); end
    $display("example: spills %0d matches %0d restarts %0d", s0, m0, r0);
    $display("random : spills %0d matches %0d restarts %0d", s1, m1, r1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
