// ewi_table: early-write-invalidate table of the speculative write
// invalidation (SWI) heuristic.
//
// The table holds, per processor, the home block of its last write or upgrade
// request. A new write by processor p to block b is presented on upd_*; in the
// same cycle the table reports whether p's previous write went to a different
// block (stale_valid, stale_blk): SWI then takes that block to be finished by
// its producer. On the clock edge the entry of p becomes b. Reset empties the
// table.
//
// Recording the last written block per processor and treating a write to
// another block as the end of production follow the document; the port timing
// is this design's choice.
module ewi_table
  import dsm_pkg::*;
#(
  parameter int unsigned PROCS  = NODES,
  parameter int unsigned BLOCKS = HOME_BLOCKS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      upd_valid,
  input  logic [$clog2(PROCS)-1:0]  upd_pid,
  input  logic [$clog2(BLOCKS)-1:0] upd_blk,
  output logic                      stale_valid,
  output logic [$clog2(BLOCKS)-1:0] stale_blk
);

  logic                      vld [PROCS];
  logic [$clog2(BLOCKS)-1:0] blk [PROCS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(PROCS); i++) begin
        vld[i] <= 1'b0;
        blk[i] <= '0;
      end
    end else if (upd_valid) begin
      vld[upd_pid] <= 1'b1;
      blk[upd_pid] <= upd_blk;
    end
  end

  assign stale_valid = upd_valid && vld[upd_pid] && (blk[upd_pid] != upd_blk);
  assign stale_blk   = blk[upd_pid];

endmodule
