// tb_dsm_node: self-checking test of one node with its three network ports
// looped back, so that node 0 is the home of every block it touches and its
// own processor is the only sharer. Checks, against values the testbench
// tracks: write miss -> writable copy, writable hits, read of an untouched
// block -> read-only copy from home memory, write to it -> upgrade; every
// read returns the last value written. With a single processor there is no
// sharing to predict, so the predictor must stay silent: no speculative push
// may occur.
module tb_dsm_node;
  import dsm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  pid_t        node_id;
  logic        cpu_req_valid, cpu_req_ready, cpu_req_write, cpu_resp_valid;
  gblk_t       cpu_req_addr;
  wsel_t       cpu_req_word;
  word_t       cpu_req_wdata, cpu_resp_rdata;
  logic        rq_v, rq_r, fw_v, fw_r, rs_v, rs_r;
  msg_t        rq_m, fw_m, rs_m;
  node_stats_t stats;
  int          checks = 0, failures = 0;
  int          n_miss = 0, n_hit = 0, n_push = 0;
  word_t       model [4][WORDS];

  dsm_node dut (
    .clk, .rst_n, .node_id, .cpu_req_valid, .cpu_req_ready, .cpu_req_write, .cpu_req_addr,
    .cpu_req_word, .cpu_req_wdata, .cpu_resp_valid, .cpu_resp_rdata,
    .rq_out_valid(rq_v), .rq_out_ready(rq_r), .rq_out_msg(rq_m),
    .rq_in_valid(rq_v),  .rq_in_ready(rq_r),  .rq_in_msg(rq_m),
    .fw_out_valid(fw_v), .fw_out_ready(fw_r), .fw_out_msg(fw_m),
    .fw_in_valid(fw_v),  .fw_in_ready(fw_r),  .fw_in_msg(fw_m),
    .rs_out_valid(rs_v), .rs_out_ready(rs_r), .rs_out_msg(rs_m),
    .rs_in_valid(rs_v),  .rs_in_ready(rs_r),  .rs_in_msg(rs_m),
    .stats);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_miss += int'(stats.miss);
    n_hit  += int'(stats.hit);
    n_push += int'(stats.spec_push);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(input bit wr, input int b, input int w, input word_t d, output word_t q);
    @(negedge clk);
    cpu_req_valid = 1'b1; cpu_req_write = wr; cpu_req_addr = {4'd0, lblk_t'(b)};
    cpu_req_word = wsel_t'(w); cpu_req_wdata = d;
    do @(posedge clk); while (!cpu_req_ready);
    @(negedge clk);
    cpu_req_valid = 1'b0;
    while (!cpu_resp_valid) @(posedge clk);
    q = cpu_resp_rdata;
    @(posedge clk);
  endtask

  initial begin
    word_t q;
    int m0;
    node_id = 4'd0;
    cpu_req_valid = 0; cpu_req_write = 0; cpu_req_addr = '0; cpu_req_word = '0; cpu_req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // fill blocks 0..3 completely through write misses and hits
    for (int b = 0; b < 4; b++) begin
      for (int w = 0; w < int'(WORDS); w++) begin
        model[b][w] = $urandom;
        access(1'b1, b, w, model[b][w], q);
      end
    end
    check(n_miss == 4 && n_hit == 28, "one write miss per block, then hits");
    for (int n = 0; n < 200; n++) begin
      int b, w;
      bit wr;
      b  = $urandom_range(0, 3);
      w  = $urandom_range(0, WORDS - 1);
      wr = $urandom_range(0, 1);
      if (wr) begin
        model[b][w] = $urandom;
        access(1'b1, b, w, model[b][w], q);
      end else begin
        access(1'b0, b, w, '0, q);
        check(q == model[b][w], "read returns last written value");
      end
    end
    // read of a never-touched block misses, then write upgrades
    m0 = n_miss;
    access(1'b0, 50, 0, '0, q);
    access(1'b1, 50, 0, 32'h1234, q);
    access(1'b0, 50, 0, '0, q);
    check(n_miss == m0 + 2 && q == 32'h1234, "read miss then upgrade");
    check(n_push == 0, "no speculative push without sharing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
