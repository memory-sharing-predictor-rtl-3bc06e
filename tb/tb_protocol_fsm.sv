// tb_protocol_fsm: self-checking test of the home protocol engine, with its
// directory and home memory, for home node 0. The testbench plays the
// network and the predictor and checks each forward message, each event and
// the data carried, against the write-invalidate rules:
//   write on Idle -> writable copy; read on Exclusive -> fetch back, then a
//   read-only copy with the written-back data; upgrade on Shared -> one
//   invalidation per other sharer, grant after the acknowledgements, with the
//   acknowledgement's verification bit passed on in the event; stale advice
//   is dropped; SWI advice fetches the owner's copy and pushes it to the
//   predicted readers; spec-read advice pushes only to non-sharers; a write
//   invalidates every sharer, pushed ones included. Advice is served before a
//   waiting request and requests are held off during a transaction.
module tb_protocol_fsm;
  import dsm_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  pid_t       node_id;
  logic       req_valid, req_ready, rsp_valid, rsp_ready, fwd_valid, fwd_ready;
  msg_t       req_msg, rsp_msg, fwd_msg;
  lblk_t      dir_rd_blk, dir_wr_blk, mem_rd_blk, mem_wr_blk;
  dir_entry_t dir_rd_entry, dir_wr_entry;
  logic       dir_wr_en, mem_wr_en;
  block_t     mem_rd_data, mem_wr_data;
  logic       ev_valid, ev_ready, adv_valid, adv_ready;
  msp_ev_t    ev;
  msp_adv_t   adv;
  logic       st_inv, st_fetch, st_spec, st_swi, st_adv_stale;
  int         checks = 0, failures = 0;
  msg_t       fq[$];
  msp_ev_t    eq[$];
  int         n_stale = 0;

  protocol_fsm dut (.*);
  directory   u_dir (.clk, .rst_n, .rd_blk(dir_rd_blk), .rd_entry(dir_rd_entry), .wr_en(dir_wr_en),
                     .wr_blk(dir_wr_blk), .wr_entry(dir_wr_entry));
  home_memory u_mem (.clk, .rd_blk(mem_rd_blk), .rd_data(mem_rd_data), .wr_en(mem_wr_en),
                     .wr_blk(mem_wr_blk), .wr_data(mem_wr_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (fwd_valid && fwd_ready) fq.push_back(fwd_msg);
      if (ev_valid && ev_ready) eq.push_back(ev);
      n_stale += int'(st_adv_stale);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic block_t pattern(int seed);
    block_t b;
    for (int w = 0; w < int'(WORDS); w++) b[w*WORD_W +: WORD_W] = 32'(seed * 1000 + w);
    return b;
  endfunction

  task automatic request(input mtype_t t, input int src, input int blk);
    @(negedge clk);
    req_valid = 1'b1;
    req_msg = '0; req_msg.mtype = t; req_msg.src = pid_t'(src); req_msg.dst = node_id;
    req_msg.addr = {node_id, lblk_t'(blk)};
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic respond(input mtype_t t, input int src, input int blk, input block_t d,
                         input bit hit = 0, input bit miss = 0);
    @(negedge clk);
    rsp_valid = 1'b1;
    rsp_msg = '0; rsp_msg.mtype = t; rsp_msg.src = pid_t'(src); rsp_msg.dst = node_id;
    rsp_msg.addr = {node_id, lblk_t'(blk)}; rsp_msg.data = d;
    rsp_msg.spec_hit = hit; rsp_msg.spec_miss = miss;
    @(negedge clk);
    rsp_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic advise(input adv_kind_t k, input int blk, input int owner, input nvec_t rd);
    @(negedge clk);
    adv_valid = 1'b1;
    adv = '{kind: k, blk: lblk_t'(blk), owner: pid_t'(owner), readers: rd};
    while (!adv_ready) @(negedge clk);
    @(negedge clk);
    adv_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_fwd(input mtype_t t, input int dst, input string what,
                            input bit chk_data = 0, input block_t d = '0);
    msg_t m;
    if (fq.size() == 0) begin
      check(1'b0, {what, ": no message"});
      return;
    end
    m = fq.pop_front();
    check(m.mtype == t && int'(m.dst) == dst && (!chk_data || m.data == d),
          $sformatf("%s (got type %0d to %0d)", what, m.mtype, m.dst));
  endtask

  initial begin
    msp_ev_t e;
    node_id = 4'd0;
    req_valid = 0; req_msg = '0; rsp_valid = 0; rsp_msg = '0; fwd_ready = 1'b1;
    ev_ready = 1'b1; adv_valid = 1'b0; adv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // write on Idle
    request(M_WRITE, 1, 3);
    expect_fwd(M_DATA_EX, 1, "write on Idle gets a writable copy");
    // read on Exclusive
    request(M_READ, 2, 3);
    expect_fwd(M_FETCH_INV, 1, "read on Exclusive fetches the owner's copy");
    check(fq.size() == 0, "no reply before the writeback");
    respond(M_WRITEBACK, 1, 3, pattern(7));
    expect_fwd(M_DATA_SH, 2, "read-only copy after writeback", 1'b1, pattern(7));
    request(M_READ, 3, 3);
    expect_fwd(M_DATA_SH, 3, "second reader served from memory", 1'b1, pattern(7));
    check(eq.size() == 3, "one event per served request");
    eq.delete();

    // upgrade on Shared {2,3}
    request(M_UPGRADE, 2, 3);
    expect_fwd(M_INV, 3, "upgrade invalidates the other sharer");
    check(fq.size() == 0 && !req_ready, "grant waits for the acknowledgement; requests held off");
    respond(M_INV_ACK, 3, 3, '0, 1'b1, 1'b0);
    expect_fwd(M_UPG_ACK, 2, "upgrade granted without data");
    e = eq.pop_front();
    check(e.kind == EV_REQ && e.typ == RQ_UPGRADE && e.pid == 2 && e.spec_hit == nvec_t'(1 << 3),
          "event carries the referenced push of node 3");

    // stale advice: block is Exclusive
    advise(ADV_SPEC_READ, 3, 0, nvec_t'(1 << 9));
    check(fq.size() == 0 && n_stale == 1, "push advice on an Exclusive block dropped");

    // SWI advice
    advise(ADV_SWI, 3, 2, nvec_t'((1 << 4) | (1 << 5)));
    expect_fwd(M_FETCH_INV, 2, "SWI fetches the producer's copy");
    respond(M_WRITEBACK, 2, 3, pattern(8));
    expect_fwd(M_SPEC_DATA, 4, "SWI pushes to reader 4", 1'b1, pattern(8));
    expect_fwd(M_SPEC_DATA, 5, "SWI pushes to reader 5", 1'b1, pattern(8));
    e = eq.pop_front();
    check(e.kind == EV_SWI && e.blk == 3 && e.pid == 2, "SWI completion reported");

    // pushed reader asks anyway: served, nothing invalidated
    request(M_READ, 4, 3);
    expect_fwd(M_DATA_SH, 4, "read from a pushed sharer served directly", 1'b1, pattern(8));
    eq.delete();

    // spec-read advice pushes only to non-sharers
    advise(ADV_SPEC_READ, 3, 0, nvec_t'((1 << 5) | (1 << 6)));
    expect_fwd(M_SPEC_DATA, 6, "push only to the non-sharer");
    check(fq.size() == 0, "no push to an existing sharer");

    // advice waiting beside a request is served first
    @(negedge clk);
    req_valid = 1'b1;
    req_msg = '0; req_msg.mtype = M_WRITE; req_msg.src = 4'd7; req_msg.dst = node_id;
    req_msg.addr = {node_id, 8'd3};
    adv_valid = 1'b1;
    adv = '{kind: ADV_SPEC_READ, blk: 8'd3, owner: '0, readers: nvec_t'(1 << 10)};
    @(negedge clk);
    adv_valid = 1'b0;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
    repeat (6) @(negedge clk);
    expect_fwd(M_SPEC_DATA, 10, "advice served before the waiting write");
    // write invalidates sharers 4,5,6,10
    for (int s = 4; s <= 6; s++) expect_fwd(M_INV, s, $sformatf("write invalidates sharer %0d", s));
    expect_fwd(M_INV, 10, "write invalidates sharer 10");
    respond(M_INV_ACK, 5, 3, '0, 1'b1, 1'b0);
    respond(M_INV_ACK, 10, 3, '0, 1'b0, 1'b1);
    respond(M_INV_ACK, 4, 3, '0);
    check(fq.size() == 0, "writable copy waits for all acknowledgements");
    respond(M_INV_ACK, 6, 3, '0, 1'b0, 1'b1);
    expect_fwd(M_DATA_EX, 7, "writable copy after all acknowledgements", 1'b1, pattern(8));
    e = eq.pop_front();
    check(e.typ == RQ_WRITE && e.spec_hit == nvec_t'(1 << 5) &&
          e.spec_miss == nvec_t'((1 << 6) | (1 << 10)), "verification bits gathered per node");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
