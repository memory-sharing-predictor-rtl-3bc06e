// directory: sharing state of every block whose home is this node.
//
// For each home block the directory keeps the full-map entry of a
// write-invalidate protocol: the state (Idle: no remote copy, Shared: one or
// more read-only copies, Exclusive: one writable copy), the owner of the
// writable copy and the sharer bit-vector with one bit per node. The protocol
// engine reads one entry combinationally (rd_blk -> rd_entry in the same
// cycle) and writes one entry per clock edge; a write and a read of the same
// block in one cycle return the old entry. Reset puts every block in Idle with
// no sharers.
//
// The three states and the full-map vector follow the document; the port
// timing and reset behaviour are this design's choices.
module directory
  import dsm_pkg::*;
#(
  parameter int unsigned BLOCKS = HOME_BLOCKS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(BLOCKS)-1:0] rd_blk,
  output dir_entry_t                rd_entry,
  input  logic                      wr_en,
  input  logic [$clog2(BLOCKS)-1:0] wr_blk,
  input  dir_entry_t                wr_entry
);

  dir_entry_t mem [BLOCKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(BLOCKS); i++) mem[i] <= '{st: D_IDLE, owner: '0, sharers: '0};
    end else if (wr_en) begin
      mem[wr_blk] <= wr_entry;
    end
  end

  assign rd_entry = mem[rd_blk];

endmodule
