// dsm_node: the speculative DSM hardware of one node.
//
// The node joins the processor side of the node to three message networks.
// Its remote cache serves the processor's word reads and writes, sends
// requests to the home nodes and answers their invalidations. Its home part
// keeps the directory and the memory of the blocks whose home is this node,
// runs the write-invalidate protocol engine for them and feeds every served
// request to the vector sharing predictor (VMSP), whose advice the engine
// executes early: pushing read-only copies to predicted readers on the first
// read of a sequence, or taking a finished producer's writable copy back
// (speculative write invalidation) and pushing it to the predicted readers.
//
// Ports: node_id (fixed per node), the processor port of the remote cache,
// one outgoing and one incoming port per network (requests go to homes,
// forwards come from homes, responses go to homes), and a bundle of activity
// strobes. All handshakes are valid/ready.
//
// The composition (remote cache, protocol engine, directory and predictor on
// one board, the predictor advising a protocol it does not change) follows
// the document; letting the processor reach its own home blocks through the
// same path as remote ones is this design's simplification.
module dsm_node
  import dsm_pkg::*;
#(
  parameter int unsigned PT_ENTRIES = 8,
  parameter bit          SWI_EN     = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pid_t        node_id,
  // processor port
  input  logic        cpu_req_valid,
  output logic        cpu_req_ready,
  input  logic        cpu_req_write,
  input  gblk_t       cpu_req_addr,
  input  wsel_t       cpu_req_word,
  input  word_t       cpu_req_wdata,
  output logic        cpu_resp_valid,
  output word_t       cpu_resp_rdata,
  // request network: out from the remote cache, in to the home
  output logic        rq_out_valid,
  input  logic        rq_out_ready,
  output msg_t        rq_out_msg,
  input  logic        rq_in_valid,
  output logic        rq_in_ready,
  input  msg_t        rq_in_msg,
  // forward network: out from the home, in to the remote cache
  output logic        fw_out_valid,
  input  logic        fw_out_ready,
  output msg_t        fw_out_msg,
  input  logic        fw_in_valid,
  output logic        fw_in_ready,
  input  msg_t        fw_in_msg,
  // response network: out from the remote cache, in to the home
  output logic        rs_out_valid,
  input  logic        rs_out_ready,
  output msg_t        rs_out_msg,
  input  logic        rs_in_valid,
  output logic        rs_in_ready,
  input  msg_t        rs_in_msg,
  output node_stats_t stats
);

  lblk_t      dir_rd_blk, dir_wr_blk, mem_rd_blk, mem_wr_blk;
  dir_entry_t dir_rd_entry, dir_wr_entry;
  logic       dir_wr_en, mem_wr_en;
  block_t     mem_rd_data, mem_wr_data;
  logic       ev_valid, ev_ready, adv_valid, adv_ready;
  msp_ev_t    ev;
  msp_adv_t   adv;

  remote_cache u_rc (
    .clk            (clk),
    .rst_n          (rst_n),
    .node_id        (node_id),
    .cpu_req_valid  (cpu_req_valid),
    .cpu_req_ready  (cpu_req_ready),
    .cpu_req_write  (cpu_req_write),
    .cpu_req_addr   (cpu_req_addr),
    .cpu_req_word   (cpu_req_word),
    .cpu_req_wdata  (cpu_req_wdata),
    .cpu_resp_valid (cpu_resp_valid),
    .cpu_resp_rdata (cpu_resp_rdata),
    .req_valid      (rq_out_valid),
    .req_ready      (rq_out_ready),
    .req_msg        (rq_out_msg),
    .rsp_valid      (rs_out_valid),
    .rsp_ready      (rs_out_ready),
    .rsp_msg        (rs_out_msg),
    .fwd_valid      (fw_in_valid),
    .fwd_ready      (fw_in_ready),
    .fwd_msg        (fw_in_msg),
    .st_hit         (stats.hit),
    .st_miss        (stats.miss),
    .st_spec_install(stats.spec_install),
    .st_spec_drop   (stats.spec_drop),
    .st_spec_ref    (stats.spec_ref)
  );

  protocol_fsm u_proto (
    .clk          (clk),
    .rst_n        (rst_n),
    .node_id      (node_id),
    .req_valid    (rq_in_valid),
    .req_ready    (rq_in_ready),
    .req_msg      (rq_in_msg),
    .rsp_valid    (rs_in_valid),
    .rsp_ready    (rs_in_ready),
    .rsp_msg      (rs_in_msg),
    .fwd_valid    (fw_out_valid),
    .fwd_ready    (fw_out_ready),
    .fwd_msg      (fw_out_msg),
    .dir_rd_blk   (dir_rd_blk),
    .dir_rd_entry (dir_rd_entry),
    .dir_wr_en    (dir_wr_en),
    .dir_wr_blk   (dir_wr_blk),
    .dir_wr_entry (dir_wr_entry),
    .mem_rd_blk   (mem_rd_blk),
    .mem_rd_data  (mem_rd_data),
    .mem_wr_en    (mem_wr_en),
    .mem_wr_blk   (mem_wr_blk),
    .mem_wr_data  (mem_wr_data),
    .ev_valid     (ev_valid),
    .ev_ready     (ev_ready),
    .ev           (ev),
    .adv_valid    (adv_valid),
    .adv_ready    (adv_ready),
    .adv          (adv),
    .st_inv       (stats.inv),
    .st_fetch     (stats.fetch),
    .st_spec      (stats.spec_push),
    .st_swi       (stats.swi_done),
    .st_adv_stale (stats.adv_stale)
  );

  directory u_dir (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_blk   (dir_rd_blk),
    .rd_entry (dir_rd_entry),
    .wr_en    (dir_wr_en),
    .wr_blk   (dir_wr_blk),
    .wr_entry (dir_wr_entry)
  );

  home_memory u_mem (
    .clk     (clk),
    .rd_blk  (mem_rd_blk),
    .rd_data (mem_rd_data),
    .wr_en   (mem_wr_en),
    .wr_blk  (mem_wr_blk),
    .wr_data (mem_wr_data)
  );

  vmsp #(
    .PT_ENTRIES (PT_ENTRIES),
    .SWI_EN     (SWI_EN)
  ) u_vmsp (
    .clk          (clk),
    .rst_n        (rst_n),
    .ev_valid     (ev_valid),
    .ev_ready     (ev_ready),
    .ev           (ev),
    .adv_valid    (adv_valid),
    .adv_ready    (adv_ready),
    .adv          (adv),
    .st_pred      (stats.pred),
    .st_correct   (stats.correct),
    .st_fr        (stats.fr),
    .st_swi       (stats.swi),
    .st_premature (stats.premature),
    .st_remove    (stats.remove),
    .st_adv_lost  (stats.adv_lost)
  );

endmodule
