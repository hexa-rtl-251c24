// spill_cam: content-addressable store for automaton nodes that could not be
// given a memory cell of their own (the "spilled" nodes).
//
// Each entry holds the full string that leads to one spilled node (its depth
// D and its D symbols, last symbol in the lowest SYM_W bits). A search presents
// the most recent KEY_SYMS input symbols, newest in the lowest bits, and
// key_len, how many of them are real input (the rest is padding after a
// stream restart); an entry matches when D <= key_len and its D symbols equal
// the last D input symbols. In an
// Aho-Corasick automaton the state reached is the longest suffix of the input
// that is a node's string, so when several entries match the one with the
// largest depth wins. The search is combinational (hit, slot valid in the same
// cycle); the entries are flops written through wr_* and cleared by reset.
//
// The method only calls for a small on-chip CAM holding the nodes that spill
// and looked up during parsing; keying it by the node's string with a
// longest-match priority is this design's choice.
module spill_cam #(
  parameter int unsigned ENTRIES  = 64,
  parameter int unsigned KEY_SYMS = 64,
  parameter int unsigned SYM_W    = 8,
  localparam int unsigned SW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned DW = $clog2(KEY_SYMS + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // programming
  input  logic                      wr_en,
  input  logic [SW-1:0]             wr_slot,
  input  logic                      wr_valid,
  input  logic [DW-1:0]             wr_depth,
  input  logic [KEY_SYMS*SYM_W-1:0] wr_str,
  // search
  input  logic [KEY_SYMS*SYM_W-1:0] key,
  input  logic [DW-1:0]             key_len,
  output logic                      hit,
  output logic [SW-1:0]             slot
);

  logic [ENTRIES-1:0]        valid;
  logic [DW-1:0]             depth [ENTRIES];
  logic [KEY_SYMS*SYM_W-1:0] str   [ENTRIES];
  logic [ENTRIES-1:0]        match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (wr_en && (32'(wr_slot) < ENTRIES)) begin
      valid[wr_slot] <= wr_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_slot) < ENTRIES)) begin
      depth[wr_slot] <= wr_depth;
      str[wr_slot]   <= wr_str;
    end
  end

  for (genvar e = 0; e < ENTRIES; e++) begin : g_entry
    logic [KEY_SYMS-1:0] sym_ok;
    always_comb begin
      for (int j = 0; j < KEY_SYMS; j++)
        sym_ok[j] = (j >= 32'(depth[e])) || (key[j*SYM_W +: SYM_W] == str[e][j*SYM_W +: SYM_W]);
    end
    assign match[e] = valid[e] && (depth[e] <= key_len) && (&sym_ok);
  end

  always_comb begin
    logic [DW-1:0] best;
    hit  = 1'b0;
    slot = '0;
    best = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (match[e] && (!hit || depth[e] > best)) begin
        hit  = 1'b1;
        slot = SW'(e);
        best = depth[e];
      end
    end
  end

endmodule
