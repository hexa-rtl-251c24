// bhexa_matcher: Aho-Corasick string matcher whose automaton is stored in
// bounded-HEXA (bHEXA) form, consuming one input symbol per clock.
//
// How it works. Every automaton node owns one row of the transition memory
// and one bit of the match-flag memory. For each input symbol the row holds a
// short code {disc, len_code} describing the next node instead of a pointer:
// the next node's row is found by hashing the last len input symbols (len =
// length table entry len_code, the symbol just received included) together
// with the discriminator disc (bhexa_hash). Because every path into an
// Aho-Corasick node ends with the same symbols, that suffix of the input
// history identifies the node. The length table maps each len_code to an
// identifier length; it resets to the identity and may be reprogrammed with
// longer, superlinear steps (for example 0,1,2,3,5,7,12,16). Nodes that could
// not be given a row by hashing ("spilled" nodes) are reached through the code
// of all ones: the spill CAM then finds the longest spilled node string that
// ends the input, and the node's row is CELLS + CAM slot, i.e. spilled nodes
// occupy SPILL extra rows after the hashed ones.
//
// Pipeline (one symbol per clock, no stalls):
//   cycle t   : symbol accepted; transition memory read at {current row, sym};
//               symbol shifted into the history register.
//   cycle t+1 : code returned; next row = hash or CAM; it becomes the current
//               row (and addresses the read of a symbol accepted in this same
//               cycle); match-flag memory read at the next row.
//   cycle t+2 : out_valid with out_match (flag of the node reached on that
//               symbol), out_row, out_spill (node came from the CAM) and
//               out_miss (spill code but no CAM entry matched; the walk then
//               restarts at the root).
// in_start marks a symbol that begins a new stream: it is taken from the root
// row cfg_root_row with an empty history. The first symbol after reset must
// carry in_start. A count of the symbols received since the start (saturating
// at CAM_SYMS) keeps the spill CAM from matching entries longer than the
// stream so far, so any symbol value, 0 included, may appear in patterns.
//
// Control plane: tr_wr_* writes one transition code, mf_wr_* one match flag,
// cam_wr_* one CAM entry, lt_wr_* one length-table entry. The node-to-row
// mapping itself is computed outside this block.
//
// What follows the method: the per-node match flag and per-symbol {disc, len}
// codes in place of next-node pointers, the hash on the recent history, the
// superlinear length table and a CAM for the spilled nodes. This design's own
// choices: the pipeline, reserving the all-ones code to mark a spilled next
// node, CAM keying and placing spilled nodes in extra rows, and the widths
// the method leaves open.
//
// Lint note: rst_n is both the asynchronous reset and the disable condition
// of the assertion below, which Verilator reports as a net used both ways.
module bhexa_matcher
  import hexa_pkg::*;
#(
  parameter int unsigned SYM_W     = 8,
  parameter int unsigned DISC_W    = 1,
  parameter int unsigned LEN_W     = 2,
  parameter int unsigned MAX_LEN   = 16,
  parameter int unsigned CELLS     = 71377,
  parameter int unsigned SPILL     = 64,
  parameter int unsigned CAM_SYMS  = 64,
  parameter hash_kind_e  HASH_KIND = HASH_MIX,
  localparam int unsigned TW   = DISC_W + LEN_W,
  localparam int unsigned ROWS = CELLS + SPILL,
  localparam int unsigned RW   = $clog2(ROWS),
  localparam int unsigned LW   = $clog2(MAX_LEN + 1),
  localparam int unsigned SW   = (SPILL > 1) ? $clog2(SPILL) : 1,
  localparam int unsigned CDW  = $clog2(CAM_SYMS + 1),
  localparam int unsigned DWD  = (DISC_W > 0) ? DISC_W : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // control plane
  input  logic [RW-1:0]             cfg_root_row,
  input  logic                      tr_wr_en,
  input  logic [RW-1:0]             tr_wr_row,
  input  logic [SYM_W-1:0]          tr_wr_sym,
  input  logic [TW-1:0]             tr_wr_code,
  input  logic                      mf_wr_en,
  input  logic [RW-1:0]             mf_wr_row,
  input  logic                      mf_wr_flag,
  input  logic                      cam_wr_en,
  input  logic [SW-1:0]             cam_wr_slot,
  input  logic                      cam_wr_valid,
  input  logic [CDW-1:0]            cam_wr_depth,
  input  logic [CAM_SYMS*SYM_W-1:0] cam_wr_str,
  input  logic                      lt_wr_en,
  input  logic [LEN_W-1:0]          lt_wr_code,
  input  logic [LW-1:0]             lt_wr_len,
  // symbol stream
  input  logic                      in_valid,
  input  logic                      in_start,
  input  logic [SYM_W-1:0]          in_sym,
  // results
  output logic                      out_valid,
  output logic                      out_match,
  output logic [RW-1:0]             out_row,
  output logic                      out_spill,
  output logic                      out_miss
);

  localparam int unsigned HS       = (MAX_LEN > CAM_SYMS) ? MAX_LEN : CAM_SYMS;
  localparam int unsigned LEN_CODES = 1 << LEN_W;
  localparam logic [TW-1:0] SPILL_CODE = '1;

  // ---------------------------------------------------------------- state
  logic [HS*SYM_W-1:0] hist_r;     // newest symbol in [SYM_W-1:0]
  logic [CDW-1:0]      hist_n;     // symbols received since the stream started (saturating)
  logic [RW-1:0]       cur_row;
  logic                p_valid;    // a transition code returns this cycle
  logic                q_valid;    // a match flag returns this cycle
  logic [RW-1:0]       q_row;
  logic                q_spill, q_miss;
  logic [LW-1:0]       len_tab [LEN_CODES];

  // ---------------------------------------------------------------- memories
  logic              tr_rd_en;
  logic [RW-1:0]     src_row;
  logic [TW-1:0]     code;

  hexa_ram #(.WORDS(ROWS << SYM_W), .WIDTH(TW)) u_trans (
    .clk,
    .wr_en(tr_wr_en), .wr_addr({tr_wr_row, tr_wr_sym}), .wr_data(tr_wr_code),
    .rd_en(tr_rd_en), .rd_addr({src_row, in_sym}),      .rd_data(code)
  );

  logic              mf_flag;
  logic [RW-1:0]     next_row;

  hexa_ram #(.WORDS(ROWS), .WIDTH(1)) u_match (
    .clk,
    .wr_en(mf_wr_en), .wr_addr(mf_wr_row), .wr_data(mf_wr_flag),
    .rd_en(p_valid),  .rd_addr(next_row),  .rd_data(mf_flag)
  );

  // ---------------------------------------------------------------- next row
  logic [DWD-1:0]  c_disc;
  logic [LEN_W-1:0] c_lcode;
  logic [LW-1:0]   c_len;
  logic            c_spill;
  logic [$clog2(CELLS > 1 ? CELLS : 2)-1:0] h_idx;
  logic            cam_hit;
  logic [SW-1:0]   cam_slot;

  assign c_lcode = code[LEN_W-1:0];
  assign c_disc  = (DISC_W > 0) ? DWD'(code >> LEN_W) : '0;
  assign c_len   = len_tab[c_lcode];
  assign c_spill = (code == SPILL_CODE);

  bhexa_hash #(.SYM_W(SYM_W), .MAX_LEN(MAX_LEN), .DISC_W(DISC_W), .CELLS(CELLS),
               .HASH_KIND(HASH_KIND))
    u_hash (.hist(hist_r[MAX_LEN*SYM_W-1:0]), .len(c_len), .disc(c_disc), .idx(h_idx));

  spill_cam #(.ENTRIES(SPILL), .KEY_SYMS(CAM_SYMS), .SYM_W(SYM_W)) u_cam (
    .clk, .rst_n,
    .wr_en(cam_wr_en), .wr_slot(cam_wr_slot), .wr_valid(cam_wr_valid),
    .wr_depth(cam_wr_depth), .wr_str(cam_wr_str),
    .key(hist_r[CAM_SYMS*SYM_W-1:0]), .key_len(hist_n), .hit(cam_hit), .slot(cam_slot)
  );

  always_comb begin
    if (!c_spill)     next_row = RW'(h_idx);
    else if (cam_hit) next_row = RW'(CELLS) + RW'(cam_slot);
    else              next_row = cfg_root_row;
  end

  // row the next transition is read from
  always_comb begin
    if (in_start)     src_row = cfg_root_row;
    else if (p_valid) src_row = next_row;
    else              src_row = cur_row;
    tr_rd_en = in_valid;
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_r  <= '0;
      hist_n  <= '0;
      cur_row <= '0;
      p_valid <= 1'b0;
      q_valid <= 1'b0;
      q_row   <= '0;
      q_spill <= 1'b0;
      q_miss  <= 1'b0;
      for (int i = 0; i < LEN_CODES; i++)
        len_tab[i] <= (i <= MAX_LEN) ? LW'(i) : LW'(MAX_LEN);
    end else begin
      if (lt_wr_en) len_tab[lt_wr_code] <= lt_wr_len;

      if (in_valid) begin
        if (in_start) hist_r <= (HS*SYM_W)'(in_sym);
        else          hist_r <= {hist_r[(HS-1)*SYM_W-1:0], in_sym};
        if (in_start)                     hist_n <= CDW'(1);
        else if (32'(hist_n) < CAM_SYMS)  hist_n <= hist_n + CDW'(1);
      end
      p_valid <= in_valid;

      if (p_valid) cur_row <= next_row;
      q_valid <= p_valid;
      if (p_valid) begin
        q_row   <= next_row;
        q_spill <= c_spill && cam_hit;
        q_miss  <= c_spill && !cam_hit;
      end
    end
  end

  assign out_valid = q_valid;
  assign out_match = q_valid & mf_flag;
  assign out_row   = q_row;
  assign out_spill = q_valid & q_spill;
  assign out_miss  = q_valid & q_miss;

  // Spilled rows are the only rows past CELLS.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (p_valid && !c_spill) |-> (32'(next_row) < CELLS));

endmodule
