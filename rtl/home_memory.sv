// home_memory: data of the coherence blocks whose home is this node.
//
// One block (32 bytes) per entry, read combinationally and written on the
// clock edge. The protocol engine supplies data from here for replies and
// speculative pushes and stores writebacks here. The contents are not reset.
//
// The document only names the node memory; the organisation (one whole block
// per access, asynchronous read) is this design's choice.
module home_memory
  import dsm_pkg::*;
#(
  parameter int unsigned BLOCKS = HOME_BLOCKS
) (
  input  logic                      clk,
  input  logic [$clog2(BLOCKS)-1:0] rd_blk,
  output block_t                    rd_data,
  input  logic                      wr_en,
  input  logic [$clog2(BLOCKS)-1:0] wr_blk,
  input  block_t                    wr_data
);

  block_t mem [BLOCKS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_blk] <= wr_data;
  end

  assign rd_data = mem[rd_blk];

endmodule
