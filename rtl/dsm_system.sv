// dsm_system: a speculative coherent distributed shared memory of NODES
// nodes.
//
// Each node's speculative DSM hardware (dsm_node) connects to three
// point-to-point switches: requests (remote cache to home), forwards (home to
// remote cache) and responses (remote cache to home). Keeping the three
// classes apart means a home can always drain responses while it holds
// requests back, so the protocol cannot deadlock in the switches. The
// processors of each node are outside this design: each node's processor
// port (word reads and writes of global blocks) is brought out as an array
// indexed by node, together with the nodes' activity strobes.
//
// The node count (16) and the point-to-point switch follow the document; the
// split into three switches and their FIFO depth are this design's choices.
module dsm_system
  import dsm_pkg::*;
#(
  parameter int unsigned PT_ENTRIES = 8,
  parameter bit          SWI_EN     = 1'b1,
  parameter int unsigned NET_DEPTH  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu_req_valid  [NODES],
  output logic        cpu_req_ready  [NODES],
  input  logic        cpu_req_write  [NODES],
  input  gblk_t       cpu_req_addr   [NODES],
  input  wsel_t       cpu_req_word   [NODES],
  input  word_t       cpu_req_wdata  [NODES],
  output logic        cpu_resp_valid [NODES],
  output word_t       cpu_resp_rdata [NODES],
  output node_stats_t stats          [NODES]
);

  logic rq_o_v [NODES], rq_o_r [NODES], rq_i_v [NODES], rq_i_r [NODES];
  logic fw_o_v [NODES], fw_o_r [NODES], fw_i_v [NODES], fw_i_r [NODES];
  logic rs_o_v [NODES], rs_o_r [NODES], rs_i_v [NODES], rs_i_r [NODES];
  msg_t rq_o_m [NODES], rq_i_m [NODES];
  msg_t fw_o_m [NODES], fw_i_m [NODES];
  msg_t rs_o_m [NODES], rs_i_m [NODES];

  for (genvar n = 0; n < int'(NODES); n++) begin : g_node
    dsm_node #(
      .PT_ENTRIES (PT_ENTRIES),
      .SWI_EN     (SWI_EN)
    ) u_node (
      .clk            (clk),
      .rst_n          (rst_n),
      .node_id        (pid_t'(n)),
      .cpu_req_valid  (cpu_req_valid[n]),
      .cpu_req_ready  (cpu_req_ready[n]),
      .cpu_req_write  (cpu_req_write[n]),
      .cpu_req_addr   (cpu_req_addr[n]),
      .cpu_req_word   (cpu_req_word[n]),
      .cpu_req_wdata  (cpu_req_wdata[n]),
      .cpu_resp_valid (cpu_resp_valid[n]),
      .cpu_resp_rdata (cpu_resp_rdata[n]),
      .rq_out_valid   (rq_o_v[n]),
      .rq_out_ready   (rq_o_r[n]),
      .rq_out_msg     (rq_o_m[n]),
      .rq_in_valid    (rq_i_v[n]),
      .rq_in_ready    (rq_i_r[n]),
      .rq_in_msg      (rq_i_m[n]),
      .fw_out_valid   (fw_o_v[n]),
      .fw_out_ready   (fw_o_r[n]),
      .fw_out_msg     (fw_o_m[n]),
      .fw_in_valid    (fw_i_v[n]),
      .fw_in_ready    (fw_i_r[n]),
      .fw_in_msg      (fw_i_m[n]),
      .rs_out_valid   (rs_o_v[n]),
      .rs_out_ready   (rs_o_r[n]),
      .rs_out_msg     (rs_o_m[n]),
      .rs_in_valid    (rs_i_v[n]),
      .rs_in_ready    (rs_i_r[n]),
      .rs_in_msg      (rs_i_m[n]),
      .stats          (stats[n])
    );
  end

  msg_network #(.PORTS(NODES), .DEPTH(NET_DEPTH)) u_req_net (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rq_o_v), .in_ready(rq_o_r), .in_msg(rq_o_m),
    .out_valid(rq_i_v), .out_ready(rq_i_r), .out_msg(rq_i_m)
  );

  msg_network #(.PORTS(NODES), .DEPTH(NET_DEPTH)) u_fwd_net (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fw_o_v), .in_ready(fw_o_r), .in_msg(fw_o_m),
    .out_valid(fw_i_v), .out_ready(fw_i_r), .out_msg(fw_i_m)
  );

  msg_network #(.PORTS(NODES), .DEPTH(NET_DEPTH)) u_rsp_net (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rs_o_v), .in_ready(rs_o_r), .in_msg(rs_o_m),
    .out_valid(rs_i_v), .out_ready(rs_i_r), .out_msg(rs_i_m)
  );

endmodule
