// hexa_ip_lookup: longest-prefix-match engine over a binary trie stored in
// HEXA form.
//
// How it works. Each trie node owns one fast-path cell holding three fields:
// a prefix flag and the discriminators of its left (0) and right (1) child.
// A discriminator value of 0 means "no such child", so with DISC_W = 2 every
// node has three possible cells. The cell of a node is not stored anywhere: it
// is recomputed from the node's identifier, i.e. the key bits consumed so far
// (history), their number (depth) and the discriminator read from the parent,
// through hexa_trie_hash. The root's discriminator is a configuration input.
// The walk reads one node per clock: the cell read in one cycle supplies the
// child discriminator that, hashed with one more key bit, addresses the next
// read. The deepest node seen with its prefix flag set is the longest match;
// its cell number also addresses the next-hop memory, which mirrors the
// fast-path layout (the shadow trie holding next hops).
//
// Interface.
//   Control plane: fp_wr_* writes a fast-path cell {flag, left, right};
//   nh_wr_* writes a next-hop word; cfg_root_disc selects the root's cell.
//   Which node goes to which cell (the matching) is computed by the control
//   plane, outside this block.
//   Lookup: req_valid/req_ready handshake carries a key. One lookup is in
//   flight at a time. resp_valid is a one-cycle pulse with resp_found,
//   resp_len (matched prefix length), resp_loc (cell of the matching node) and
//   resp_next_hop (valid when resp_found); there is no response back-pressure.
//
// Timing. If the request is accepted at clock edge 0 and the walk visits the
// nodes at depths 0..D (D = depth of the last node on the key's path),
// resp_valid is high in the cycle after edge D+1, and req_ready returns in the
// cycle after that. One trie level per clock.
//
// The fast-path cell contents, the NULL encoding, the traversal and the
// separate next-hop memory follow the method; the handshake, the one-level-per-
// clock schedule and the widths not fixed by the method are this design's.
//
// Lint note: rst_n is both the asynchronous reset and the disable condition
// of the assertion below, which Verilator reports as a net used both ways.
module hexa_ip_lookup
  import hexa_pkg::*;
#(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned DISC_W    = 2,
  parameter int unsigned CELLS     = 110000,
  parameter int unsigned NH_W      = 8,
  parameter hash_kind_e  HASH_KIND = HASH_MIX,
  localparam int unsigned DW = $clog2(ADDR_W + 1),
  localparam int unsigned AW = (CELLS > 1) ? $clog2(CELLS) : 1,
  localparam int unsigned EW = 1 + 2 * DISC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // control plane
  input  logic [DISC_W-1:0] cfg_root_disc,
  input  logic              fp_wr_en,
  input  logic [AW-1:0]     fp_wr_addr,
  input  logic [EW-1:0]     fp_wr_data,
  input  logic              nh_wr_en,
  input  logic [AW-1:0]     nh_wr_addr,
  input  logic [NH_W-1:0]   nh_wr_data,
  // lookups
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_key,
  output logic              resp_valid,
  output logic              resp_found,
  output logic [DW-1:0]     resp_len,
  output logic [AW-1:0]     resp_loc,
  output logic [NH_W-1:0]   resp_next_hop
);

  typedef enum logic [1:0] {S_IDLE, S_WALK, S_NHOP} state_e;

  typedef struct packed {
    logic              flag;
    logic [DISC_W-1:0] left;
    logic [DISC_W-1:0] right;
  } cell_t;

  state_e            state;
  logic [ADDR_W-1:0] key_r;
  logic [DW-1:0]     depth_r;
  logic [AW-1:0]     cur_loc;
  logic              found_r;
  logic [DW-1:0]     best_len;
  logic [AW-1:0]     best_loc;

  // fast-path memory
  logic              fp_rd_en;
  logic [AW-1:0]     fp_rd_addr;
  logic [EW-1:0]     fp_rd_raw;
  cell_t             fp_cell;

  hexa_ram #(.WORDS(CELLS), .WIDTH(EW)) u_fast_path (
    .clk, .wr_en(fp_wr_en), .wr_addr(fp_wr_addr), .wr_data(fp_wr_data),
    .rd_en(fp_rd_en), .rd_addr(fp_rd_addr), .rd_data(fp_rd_raw)
  );
  assign fp_cell = cell_t'(fp_rd_raw);

  // next-hop memory, same cell numbering as the fast path
  logic              nh_rd_en;
  logic [AW-1:0]     nh_rd_addr;
  logic [NH_W-1:0]   nh_rd_data;

  hexa_ram #(.WORDS(CELLS), .WIDTH(NH_W)) u_next_hop (
    .clk, .wr_en(nh_wr_en), .wr_addr(nh_wr_addr), .wr_data(nh_wr_data),
    .rd_en(nh_rd_en), .rd_addr(nh_rd_addr), .rd_data(nh_rd_data)
  );

  // hash of the node about to be read
  logic [DISC_W-1:0] h_disc;
  logic [DW-1:0]     h_depth;
  logic [ADDR_W-1:0] h_hist;
  logic [AW-1:0]     h_idx;

  hexa_trie_hash #(.ADDR_W(ADDR_W), .DISC_W(DISC_W), .CELLS(CELLS), .HASH_KIND(HASH_KIND))
    u_hash (.disc(h_disc), .depth(h_depth), .history(h_hist), .idx(h_idx));

  // walk decisions for the cell being returned this cycle
  logic              key_bit;
  logic [DISC_W-1:0] child;
  logic              at_leaf;
  logic [DW-1:0]     next_depth;
  logic              best_now;

  always_comb begin
    key_bit    = (depth_r < DW'(ADDR_W)) ? key_r[ADDR_W - 1 - 32'(depth_r)] : 1'b0;
    child      = key_bit ? fp_cell.right : fp_cell.left;
    at_leaf    = (depth_r == DW'(ADDR_W)) || (child == '0);
    next_depth = depth_r + 1'b1;
    best_now   = fp_cell.flag;

    h_disc  = cfg_root_disc;
    h_depth = '0;
    h_hist  = '0;
    if (state == S_WALK) begin
      h_disc  = child;
      h_depth = next_depth;
      h_hist  = (next_depth == DW'(ADDR_W)) ? key_r : (key_r >> (ADDR_W - 32'(next_depth)));
    end

    fp_rd_en   = 1'b0;
    fp_rd_addr = h_idx;
    if (state == S_IDLE && req_valid)           fp_rd_en = 1'b1;
    if (state == S_WALK && !at_leaf)            fp_rd_en = 1'b1;

    nh_rd_en   = (state == S_WALK) && at_leaf && (best_now || found_r);
    nh_rd_addr = best_now ? cur_loc : best_loc;
  end

  assign req_ready     = (state == S_IDLE);
  assign resp_valid    = (state == S_NHOP);
  assign resp_found    = found_r;
  assign resp_len      = best_len;
  assign resp_loc      = best_loc;
  assign resp_next_hop = found_r ? nh_rd_data : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      key_r    <= '0;
      depth_r  <= '0;
      cur_loc  <= '0;
      found_r  <= 1'b0;
      best_len <= '0;
      best_loc <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            key_r    <= req_key;
            depth_r  <= '0;
            cur_loc  <= h_idx;
            found_r  <= 1'b0;
            best_len <= '0;
            best_loc <= '0;
            state    <= S_WALK;
          end
        end
        S_WALK: begin
          if (best_now) begin
            found_r  <= 1'b1;
            best_len <= depth_r;
            best_loc <= cur_loc;
          end
          if (at_leaf) begin
            state <= S_NHOP;
          end else begin
            depth_r <= next_depth;
            cur_loc <= h_idx;
          end
        end
        S_NHOP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A lookup never reads deeper than the key is long.
  assert property (@(posedge clk) disable iff (!rst_n) depth_r <= DW'(ADDR_W));

endmodule
