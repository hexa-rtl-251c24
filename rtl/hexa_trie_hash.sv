// hexa_trie_hash: maps the HEXA identifier of a binary-trie node onto one of
// CELLS fast-path memory cells.
//
// A trie node is identified by the bits of the key that lead to it from the
// root (its history), the number of those bits (its depth) and a c-bit
// discriminator chosen by the control plane so that every node lands in a
// cell of its own. The identifier is laid out as {disc, history, depth}, with
// the history right-aligned and zero-padded to ADDR_W bits and the depth in
// DW bits; this is the layout of the method's worked example, where the
// length is appended and short identifiers are padded with zeros.
//
//   HASH_KIND = HASH_SIMPLE : cell = numeric value of the identifier mod CELLS
//                             (the worked example's hash)
//   HASH_KIND = HASH_MIX    : the identifier is cut into 32-bit chunks, each
//                             chunk multiplied by an odd constant, summed,
//                             mixed (hexa_pkg::fmix32) and range-reduced.
//                             This pseudo-random choice is this design's own.
//
// Purely combinational: idx follows the inputs in the same cycle.
//
// Lint note: the range reduction leaves the cell in the low bits of a 32-bit
// value; the upper bits are unused by construction.
module hexa_trie_hash
  import hexa_pkg::*;
#(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned DISC_W    = 2,
  parameter int unsigned CELLS     = 110000,
  parameter hash_kind_e  HASH_KIND = HASH_MIX,
  localparam int unsigned DW = $clog2(ADDR_W + 1),
  localparam int unsigned AW = (CELLS > 1) ? $clog2(CELLS) : 1
) (
  input  logic [DISC_W-1:0] disc,
  input  logic [DW-1:0]     depth,
  input  logic [ADDR_W-1:0] history,   // right-aligned path bits
  output logic [AW-1:0]     idx
);

  localparam int unsigned KW     = DISC_W + ADDR_W + DW;
  localparam int unsigned CHUNKS = (KW + 31) / 32;
  localparam int unsigned MW     = (KW > 32) ? KW : 32;

  logic [KW-1:0]       ident;
  logic [CHUNKS*32-1:0] ident_pad;
  logic [31:0]         acc;
  logic [31:0]         red;

  assign ident     = {disc, history, depth};
  assign ident_pad = (CHUNKS*32)'(ident);

  always_comb begin
    acc = 32'd0;
    for (int i = 0; i < CHUNKS; i++) begin
      acc = acc + (ident_pad[i*32 +: 32] ^ 32'(i)) * CHUNK_MUL[i % 8];
    end
    red = range_reduce(fmix32(acc), CELLS);
    if (HASH_KIND == HASH_SIMPLE) idx = AW'(MW'(ident) % MW'(CELLS));
    else                          idx = AW'(red);
  end

endmodule
