// hexa_ram: simple dual-port memory array used for every table of the HEXA
// engines: the trie fast-path cells, the next-hop (shadow) memory, and the
// automaton's transition and match-flag memories.
//
// One write port and one read port, both synchronous to clk. A read issued
// with rd_en in cycle t returns rd_data in cycle t+1 (the output register
// holds its value while rd_en is low). A read and a write to the same word in
// the same cycle return the old contents. The array itself is not reset: the
// control plane programs every word that the lookup logic can reach.
//
// The method only says that the graph lives in a fast on-chip memory and the
// next hops in a slower memory; the port structure and one-cycle read latency
// are this design's choice.
module hexa_ram #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < WORDS)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= (32'(rd_addr) < WORDS) ? mem[rd_addr] : '0;
  end

endmodule
