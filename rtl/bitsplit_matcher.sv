// bitsplit_matcher: bit-split Aho-Corasick string matcher in which each
// bit-sliced state machine is stored in bounded-HEXA form.
//
// How it works. A group of NPAT patterns over SYM_W-bit symbols is matched by
// MACHINES small automata running in lockstep. Machine m sees only bits
// [m*BITS +: BITS] of every input symbol, and its automaton is the
// Aho-Corasick automaton of the patterns projected onto those bits. Each
// machine state carries a partial-match vector (PMV) of NPAT bits: bit i is
// set when the projection of pattern i ends the machine's input. A pattern
// has occurred exactly when all of its projections have, so the result is the
// AND of the MACHINES vectors. Every machine is a bhexa_matcher with BITS-bit
// symbols: its transitions hold {disc, length code} instead of pointers, its
// nodes are found by hashing the last few BITS-bit input slices, and its
// unmappable nodes go to its own spill CAM. Each machine also has a PMV
// memory, indexed by the row of the node it reached. All machines share one
// length table (lt_wr_* writes into every machine), so that one set of
// superlinear identifier lengths serves the whole group.
//
// Interface and timing. Programming ports select a machine with *_mach:
// tr_wr_* (transition code), pmv_wr_* (partial-match vector; the machine's
// own match flag is written with the OR of the vector), cam_wr_* (spill CAM
// entry, a string of BITS-bit slices, newest in the low bits) and
// cfg_root_row (one root row per machine). One symbol is accepted per clock
// (in_valid, bubbles allowed; in_start restarts at the roots). The result for
// a symbol accepted in cycle t appears in cycle t+3: out_vec (patterns that
// end at this symbol), out_match (any of them), out_spill (some machine's
// node came from its spill CAM), out_miss (some machine met a spill code
// without a CAM hit). Each machine's own one-bit match output is left open:
// the vectors carry that information.
//
// What follows the method: several machines each looking at a few bits of
// the symbol (four machines of two bits at the defaults), and their nodes
// stored with discriminators and bHEXA lengths (5 bits per transition at the
// defaults) with a superlinear length table and spill CAM. This design's own
// choices: the partial-match vectors and their AND, the group size NPAT, a
// length table shared by the machines, and the table sizes.
//
// Lint notes: rst_n is both the asynchronous reset and the assertion's
// disable condition (reported as a net used both ways), and the empty
// out_match pins are deliberate.
module bitsplit_matcher
  import hexa_pkg::*;
#(
  parameter int unsigned MACHINES  = 4,
  parameter int unsigned BITS      = 2,
  parameter int unsigned NPAT      = 16,
  parameter int unsigned DISC_W    = 2,
  parameter int unsigned LEN_W     = 3,
  parameter int unsigned MAX_LEN   = 16,
  parameter int unsigned CELLS     = 283,
  parameter int unsigned SPILL     = 16,
  parameter int unsigned CAM_SYMS  = 64,
  parameter hash_kind_e  HASH_KIND = HASH_MIX,
  localparam int unsigned SYM_W = MACHINES * BITS,
  localparam int unsigned TW    = DISC_W + LEN_W,
  localparam int unsigned ROWS  = CELLS + SPILL,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned LW    = $clog2(MAX_LEN + 1),
  localparam int unsigned SW    = (SPILL > 1) ? $clog2(SPILL) : 1,
  localparam int unsigned CDW   = $clog2(CAM_SYMS + 1),
  localparam int unsigned MW    = (MACHINES > 1) ? $clog2(MACHINES) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // configuration and programming
  input  logic [MACHINES-1:0][RW-1:0]    cfg_root_row,
  input  logic                           tr_wr_en,
  input  logic [MW-1:0]                  tr_wr_mach,
  input  logic [RW-1:0]                  tr_wr_row,
  input  logic [BITS-1:0]                tr_wr_sym,
  input  logic [TW-1:0]                  tr_wr_code,
  input  logic                           pmv_wr_en,
  input  logic [MW-1:0]                  pmv_wr_mach,
  input  logic [RW-1:0]                  pmv_wr_row,
  input  logic [NPAT-1:0]                pmv_wr_vec,
  input  logic                           cam_wr_en,
  input  logic [MW-1:0]                  cam_wr_mach,
  input  logic [SW-1:0]                  cam_wr_slot,
  input  logic                           cam_wr_valid,
  input  logic [CDW-1:0]                 cam_wr_depth,
  input  logic [CAM_SYMS*BITS-1:0]       cam_wr_str,
  input  logic                           lt_wr_en,
  input  logic [LEN_W-1:0]               lt_wr_code,
  input  logic [LW-1:0]                  lt_wr_len,
  // symbol stream
  input  logic                           in_valid,
  input  logic                           in_start,
  input  logic [SYM_W-1:0]               in_sym,
  // results, three cycles after the symbol
  output logic                           out_valid,
  output logic                           out_match,
  output logic [NPAT-1:0]                out_vec,
  output logic                           out_spill,
  output logic                           out_miss
);

  logic [MACHINES-1:0]           m_valid, m_miss, m_spill;
  logic [MACHINES-1:0][RW-1:0]   m_row;
  logic [MACHINES-1:0][NPAT-1:0] m_pmv;

  for (genvar m = 0; m < MACHINES; m++) begin : g_mach
    bhexa_matcher #(
      .SYM_W(BITS), .DISC_W(DISC_W), .LEN_W(LEN_W), .MAX_LEN(MAX_LEN), .CELLS(CELLS),
      .SPILL(SPILL), .CAM_SYMS(CAM_SYMS), .HASH_KIND(HASH_KIND)
    ) u_fsm (
      .clk, .rst_n,
      .cfg_root_row(cfg_root_row[m]),
      .tr_wr_en(tr_wr_en && tr_wr_mach == MW'(m)), .tr_wr_row, .tr_wr_sym, .tr_wr_code,
      .mf_wr_en(pmv_wr_en && pmv_wr_mach == MW'(m)), .mf_wr_row(pmv_wr_row),
      .mf_wr_flag(|pmv_wr_vec),
      .cam_wr_en(cam_wr_en && cam_wr_mach == MW'(m)), .cam_wr_slot, .cam_wr_valid,
      .cam_wr_depth, .cam_wr_str,
      .lt_wr_en, .lt_wr_code, .lt_wr_len,
      .in_valid, .in_start, .in_sym(in_sym[m*BITS +: BITS]),
      .out_valid(m_valid[m]), .out_match(), .out_row(m_row[m]),
      .out_spill(m_spill[m]), .out_miss(m_miss[m])
    );

    hexa_ram #(.WORDS(ROWS), .WIDTH(NPAT)) u_pmv (
      .clk,
      .wr_en(pmv_wr_en && pmv_wr_mach == MW'(m)), .wr_addr(pmv_wr_row), .wr_data(pmv_wr_vec),
      .rd_en(m_valid[m]), .rd_addr(m_row[m]), .rd_data(m_pmv[m])
    );
  end

  // ---------------------------------------------------------------- combine
  logic v_r, miss_r, spill_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r    <= 1'b0;
      miss_r <= 1'b0;
      spill_r <= 1'b0;
    end else begin
      v_r    <= m_valid[0];
      miss_r <= m_valid[0] && (|m_miss);
      spill_r <= m_valid[0] && (|m_spill);
    end
  end

  always_comb begin
    out_vec = '1;
    for (int m = 0; m < MACHINES; m++) out_vec &= m_pmv[m];
    if (!v_r) out_vec = '0;
  end

  assign out_valid = v_r;
  assign out_match = |out_vec;
  assign out_miss  = miss_r;
  assign out_spill = spill_r;

  // the machines run in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) m_valid == '0 || m_valid == '1);

endmodule
