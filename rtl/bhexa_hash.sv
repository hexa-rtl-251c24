// bhexa_hash: maps a bounded-HEXA identifier onto one of CELLS memory cells.
//
// A bHEXA identifier is the last k input symbols s_1..s_k (s_1 the oldest,
// s_k the symbol just received) plus an optional c-bit discriminator. The
// history window is presented as MAX_LEN symbols with the newest symbol in the
// lowest SYM_W bits; symbols beyond the first len are ignored.
//
//   HASH_KIND = HASH_SIMPLE : cell = (sum_{i=1..k} s_i * i + disc * (k+1))
//                             mod CELLS. Without a discriminator this is the
//                             hash of the method's worked example; treating
//                             the discriminator as one more weighted term is
//                             this design's extension.
//   HASH_KIND = HASH_MIX    : the masked window, len and disc are cut into
//                             32-bit chunks, multiplied by odd constants,
//                             summed, mixed (hexa_pkg::fmix32) and
//                             range-reduced; this pseudo-random hash is this
//                             design's choice.
//
// Purely combinational.
//
// Lint note: the range reduction leaves the row in the low bits of a 32-bit
// value; the upper bits are unused by construction.
module bhexa_hash
  import hexa_pkg::*;
#(
  parameter int unsigned SYM_W     = 8,
  parameter int unsigned MAX_LEN   = 16,
  parameter int unsigned DISC_W    = 1,
  parameter int unsigned CELLS     = 71377,
  parameter hash_kind_e  HASH_KIND = HASH_MIX,
  localparam int unsigned LW  = $clog2(MAX_LEN + 1),
  localparam int unsigned DWD = (DISC_W > 0) ? DISC_W : 1,
  localparam int unsigned AW  = (CELLS > 1) ? $clog2(CELLS) : 1
) (
  input  logic [MAX_LEN*SYM_W-1:0] hist,   // newest symbol in bits [SYM_W-1:0]
  input  logic [LW-1:0]            len,
  input  logic [DWD-1:0]           disc,   // ignored when DISC_W = 0
  output logic [AW-1:0]            idx
);

  localparam int unsigned KW     = DWD + LW + MAX_LEN * SYM_W;
  localparam int unsigned CHUNKS = (KW + 31) / 32;

  logic [MAX_LEN*SYM_W-1:0] masked;
  logic [CHUNKS*32-1:0]     key_pad;
  logic [31:0]              acc;
  logic [31:0]              mixed;
  logic [47:0]              wsum;
  logic [DWD-1:0]           disc_eff;

  always_comb begin
    disc_eff = (DISC_W > 0) ? disc : '0;
    masked = '0;
    wsum   = '0;
    for (int j = 0; j < MAX_LEN; j++) begin
      if (j < 32'(len)) begin
        masked[j*SYM_W +: SYM_W] = hist[j*SYM_W +: SYM_W];
        wsum = wsum + 48'(hist[j*SYM_W +: SYM_W]) * 48'(32'(len) - j);
      end
    end
    wsum = wsum + 48'(disc_eff) * (48'(len) + 48'd1);

    key_pad = (CHUNKS*32)'({disc_eff, len, masked});
    acc = 32'd0;
    for (int i = 0; i < CHUNKS; i++) begin
      acc = acc + (key_pad[i*32 +: 32] ^ 32'(i)) * CHUNK_MUL[i % 8];
    end
    mixed = range_reduce(fmix32(acc), CELLS);

    if (HASH_KIND == HASH_SIMPLE) idx = AW'(wsum % 48'(CELLS));
    else                          idx = AW'(mixed);
  end

endmodule
