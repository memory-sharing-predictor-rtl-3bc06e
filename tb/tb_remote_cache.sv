// tb_remote_cache: self-checking test of the node-side remote cache.
// The testbench plays the processor and the three networks of node 2 and
// checks, against values it computes itself:
//  - read miss -> read request to the block's home; reply data reaches the
//    processor; a following hit answers in the next cycle;
//  - write to a read-only line -> upgrade; grant; writable hit; a
//    fetch-invalidate returns the block with both written words;
//  - write miss -> write request; writable reply merged with the word;
//  - a pushed copy that is invalidated unreferenced acknowledges spec_miss,
//    one the processor read acknowledges spec_hit;
//  - a push that races with an outstanding read of the same block is dropped
//    and the read completes from the protocol's reply.
module tb_remote_cache;
  import dsm_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  pid_t   node_id;
  logic   cpu_req_valid, cpu_req_ready, cpu_req_write, cpu_resp_valid;
  gblk_t  cpu_req_addr;
  wsel_t  cpu_req_word;
  word_t  cpu_req_wdata, cpu_resp_rdata;
  logic   req_valid, req_ready, rsp_valid, rsp_ready, fwd_valid, fwd_ready;
  msg_t   req_msg, rsp_msg, fwd_msg;
  logic   st_hit, st_miss, st_spec_install, st_spec_drop, st_spec_ref;
  int     checks = 0, failures = 0;
  int     n_req = 0, n_rsp = 0, n_inst = 0, n_drop = 0, n_ref = 0;
  msg_t   last_req, last_rsp;

  remote_cache dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (req_valid && req_ready) begin n_req++; last_req = req_msg; end
      if (rsp_valid && rsp_ready) begin n_rsp++; last_rsp = rsp_msg; end
      n_inst += int'(st_spec_install);
      n_drop += int'(st_spec_drop);
      n_ref  += int'(st_spec_ref);
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

  // issue one processor access and give a hit time to answer
  task automatic cpu(input bit wr, input gblk_t a, input int w, input word_t d);
    @(negedge clk);
    cpu_req_valid = 1'b1; cpu_req_write = wr; cpu_req_addr = a;
    cpu_req_word = wsel_t'(w); cpu_req_wdata = d;
    while (!cpu_req_ready) @(negedge clk);
    @(negedge clk);
    cpu_req_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic fwd(input mtype_t t, input gblk_t a, input block_t d);
    @(negedge clk);
    fwd_valid = 1'b1;
    fwd_msg = '0; fwd_msg.mtype = t; fwd_msg.src = home_of(a); fwd_msg.dst = node_id;
    fwd_msg.addr = a; fwd_msg.data = d;
    while (!fwd_ready) @(negedge clk);
    @(negedge clk);
    fwd_valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  word_t got;
  always @(posedge clk) if (cpu_resp_valid) got = cpu_resp_rdata;

  initial begin
    gblk_t A, B, C, E, F;
    block_t exp_b;
    A = {4'd5, 8'd10}; B = {4'd7, 8'd1}; C = {4'd7, 8'd2}; E = {4'd1, 8'd3}; F = {4'd9, 8'd4};
    node_id = 4'd2;
    cpu_req_valid = 0; cpu_req_write = 0; cpu_req_addr = '0; cpu_req_word = '0; cpu_req_wdata = '0;
    req_ready = 1'b1; rsp_ready = 1'b1; fwd_valid = 1'b0; fwd_msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // read miss, reply, hit
    cpu(1'b0, A, 3, '0);
    repeat (3) @(negedge clk);
    check(n_req == 1 && last_req.mtype == M_READ && last_req.dst == 5 && last_req.src == 2 &&
          last_req.addr == A, "read miss sends read to home 5");
    fwd(M_DATA_SH, A, pattern(1));
    check(got == 32'(1003), "miss data reaches the processor");
    @(negedge clk);
    cpu_req_valid = 1'b1; cpu_req_write = 1'b0; cpu_req_addr = A; cpu_req_word = 3'd6;
    @(negedge clk);
    cpu_req_valid = 1'b0;
    check(cpu_resp_valid && cpu_resp_rdata == 32'(1006), "hit answers in the next cycle");

    // upgrade, grant, writable hit, fetch-invalidate
    cpu(1'b1, A, 0, 32'hAAAA0000);
    repeat (3) @(negedge clk);
    check(n_req == 2 && last_req.mtype == M_UPGRADE && !last_req.spec_hit, "write to shared line upgrades");
    fwd(M_UPG_ACK, A, '0);
    cpu(1'b1, A, 7, 32'hBBBB0007);
    check(n_req == 2, "write to writable line is a hit");
    fwd(M_FETCH_INV, A, '0);
    exp_b = pattern(1);
    exp_b[0 +: 32] = 32'hAAAA0000;
    exp_b[7*32 +: 32] = 32'hBBBB0007;
    check(n_rsp == 1 && last_rsp.mtype == M_WRITEBACK && last_rsp.dst == 5 && last_rsp.data == exp_b,
          "fetch-invalidate writes back both words");

    // unreferenced push
    fwd(M_SPEC_DATA, B, pattern(2));
    check(n_inst == 1, "push installed");
    fwd(M_INV, B, '0);
    check(n_rsp == 2 && last_rsp.mtype == M_INV_ACK && last_rsp.spec_miss && !last_rsp.spec_hit,
          "unreferenced push acknowledged as spec_miss");

    // referenced push
    fwd(M_SPEC_DATA, C, pattern(3));
    cpu(1'b0, C, 1, '0);
    check(n_ref == 1 && got == 32'(3001) && n_req == 2, "pushed copy serves the read locally");
    fwd(M_INV, C, '0);
    check(n_rsp == 3 && last_rsp.spec_hit && !last_rsp.spec_miss, "referenced push acknowledged as spec_hit");

    // race: push during an outstanding read is dropped
    cpu(1'b0, E, 2, '0);
    repeat (2) @(negedge clk);
    fwd(M_SPEC_DATA, E, pattern(4));
    check(n_drop == 1 && n_inst == 2, "racing push dropped");
    fwd(M_DATA_SH, E, pattern(5));
    check(got == 32'(5002), "outstanding read completes from the reply");

    // write miss
    cpu(1'b1, F, 4, 32'hCAFE0004);
    repeat (3) @(negedge clk);
    check(last_req.mtype == M_WRITE && last_req.dst == 9, "write miss sends write");
    fwd(M_DATA_EX, F, pattern(6));
    fwd(M_FETCH_INV, F, '0);
    exp_b = pattern(6);
    exp_b[4*32 +: 32] = 32'hCAFE0004;
    check(last_rsp.mtype == M_WRITEBACK && last_rsp.data == exp_b, "write merged into writable reply");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
