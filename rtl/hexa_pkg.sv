// hexa_pkg: constants and hash helpers shared by the HEXA lookup engines.
//
// The HEXA engines locate a graph node in memory by hashing the node's
// identifier (recent input history, its length and a few discriminator bits).
// The hash family used by default is a pseudo-random 32-bit mix followed by a
// multiply-shift range reduction onto [0, CELLS). The mix is the well known
// 32-bit avalanche finalizer (xor-shift / multiply, three rounds); the choice
// of this particular function is this design's own, the method only asks for
// a pseudo-random hash. Everything here is combinational.
//
// Lint notes: CHUNK_MUL is used by the hash modules, not inside the package,
// and range_reduce keeps only the upper half of its 64-bit product.
package hexa_pkg;

  // Hash selection, used by both hash modules.
  //   HASH_MIX    : pseudo-random mix + range reduction (default)
  //   HASH_SIMPLE : the small arithmetic hashes of the worked examples
  //                 (numeric value modulo the cell count for tries,
  //                 weighted symbol sum modulo the cell count for bHEXA)
  typedef enum logic [0:0] {
    HASH_SIMPLE = 1'b0,
    HASH_MIX    = 1'b1
  } hash_kind_e;

  // Odd multipliers used to combine 32-bit key chunks before the mix.
  localparam logic [31:0] CHUNK_MUL [8] = '{
    32'h9E3779B1, 32'h85EBCA77, 32'hC2B2AE3D, 32'h27D4EB2F,
    32'h165667B1, 32'hD3A2646D, 32'hFD7046C5, 32'hB55A4F09
  };

  // 32-bit avalanche finalizer.
  function automatic logic [31:0] fmix32(input logic [31:0] x_in);
    logic [31:0] x;
    x = x_in;
    x = x ^ (x >> 16);
    x = x * 32'h85EBCA6B;
    x = x ^ (x >> 13);
    x = x * 32'hC2B2AE35;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // Map a 32-bit pseudo-random value onto [0, cells) by multiply-shift.
  function automatic logic [31:0] range_reduce(input logic [31:0] x, input int unsigned cells);
    logic [63:0] p;
    p = {32'd0, x} * {32'd0, cells};
    return p[63:32];
  endfunction

endpackage
