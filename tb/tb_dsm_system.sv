// tb_dsm_system: end-to-end test of the 16-node speculative DSM at its
// default sizes.
//
// The testbench plays the 16 processors. Each iteration has three phases,
// separated by barriers (every processor waits for the others):
//  1. production: producers 0..7 each write a new value into word (it % 8)
//     of their two blocks (homed at node (p+5) % 16), one block after the
//     other, so the second write marks the first block finished (SWI).
//     Producer 0 then reads its first block back at once, which makes the
//     early invalidation premature.
//  2. consumption: the three consumers of each producer read both blocks
//     concurrently; every value must be the one written in this iteration.
//     From iteration 6 producer 1 gets two different consumers, so copies
//     pushed to its old consumers are never referenced.
//  3. migration: nodes 8..15 in turn read a counter block (homed at node 2)
//     and write it back incremented (migratory sharing); its final value is
//     checked.
// Each processor access is checked against a reference value. At the end,
// every mechanism of the design must have occurred: hits and misses,
// invalidations, writebacks, first-read and SWI triggers, speculative pushes,
// installs, references, a push dropped in a race, premature invalidation,
// removal of a mispredicted entry, and correct predictions. Counts and the
// prediction accuracy are printed.
module tb_dsm_system;
  import dsm_pkg::*;

  localparam int ITERS = 10;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cpu_req_valid  [NODES];
  logic        cpu_req_ready  [NODES];
  logic        cpu_req_write  [NODES];
  gblk_t       cpu_req_addr   [NODES];
  wsel_t       cpu_req_word   [NODES];
  word_t       cpu_req_wdata  [NODES];
  logic        cpu_resp_valid [NODES];
  word_t       cpu_resp_rdata [NODES];
  node_stats_t stats          [NODES];

  int checks = 0, failures = 0;
  longint n_hit, n_miss, n_inst, n_drop, n_ref, n_inv, n_fetch, n_push, n_swid, n_stale;
  longint n_pred, n_corr, n_fr, n_swi, n_prem, n_rem;

  dsm_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_hit, n_miss, n_inst, n_drop, n_ref, n_inv, n_fetch, n_push, n_swid, n_stale} = '0;
    {n_pred, n_corr, n_fr, n_swi, n_prem, n_rem} = '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < int'(NODES); n++) begin
        n_hit   += longint'(stats[n].hit);
        n_miss  += longint'(stats[n].miss);
        n_inst  += longint'(stats[n].spec_install);
        n_drop  += longint'(stats[n].spec_drop);
        n_ref   += longint'(stats[n].spec_ref);
        n_inv   += longint'(stats[n].inv);
        n_fetch += longint'(stats[n].fetch);
        n_push  += longint'(stats[n].spec_push);
        n_swid  += longint'(stats[n].swi_done);
        n_stale += longint'(stats[n].adv_stale);
        n_pred  += longint'(stats[n].pred);
        n_corr  += longint'(stats[n].correct);
        n_fr    += longint'(stats[n].fr);
        n_swi   += longint'(stats[n].swi);
        n_prem  += longint'(stats[n].premature);
        n_rem   += longint'(stats[n].remove);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // one processor access, blocking until the answer
  task automatic access(input int n, input bit wr, input gblk_t a, input int w,
                        input word_t d, output word_t q);
    @(negedge clk);
    cpu_req_valid[n] = 1'b1;
    cpu_req_write[n] = wr;
    cpu_req_addr[n]  = a;
    cpu_req_word[n]  = wsel_t'(w);
    cpu_req_wdata[n] = d;
    do @(posedge clk); while (!cpu_req_ready[n]);
    @(negedge clk);
    cpu_req_valid[n] = 1'b0;
    while (!cpu_resp_valid[n]) @(posedge clk);
    q = cpu_resp_rdata[n];
    @(posedge clk);
  endtask

  function automatic gblk_t pblk(int p, int m);
    return {pid_t'((p + 5) % NODES), lblk_t'(p * 4 + m)};
  endfunction

  function automatic word_t pval(int it, int p, int m);
    return word_t'((it << 16) | (p << 8) | m);
  endfunction

  function automatic int consumer(int it, int p, int k);
    if (p == 1 && it >= 6) return (p + 3 + k) % NODES;
    return (k == 0) ? (p + 1) % NODES : (k == 1) ? (p + 2) % NODES : (p + 8) % NODES;
  endfunction

  function automatic int n_consumers(int it, int p);
    return (p == 1 && it >= 6) ? 2 : 3;
  endfunction

  localparam gblk_t CNT = {4'd2, 8'd100};

  initial begin
    word_t q;
    int    counter;
    for (int n = 0; n < int'(NODES); n++) begin
      cpu_req_valid[n] = 1'b0; cpu_req_write[n] = 1'b0; cpu_req_addr[n] = '0;
      cpu_req_word[n] = '0; cpu_req_wdata[n] = '0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    counter = 0;
    access(8, 1'b1, CNT, 0, 32'd0, q);

    for (int it = 0; it < ITERS; it++) begin
      // 1. production
      for (int p = 0; p < 8; p++) begin
        fork
          automatic int pp = p;
          begin
            word_t r;
            access(pp, 1'b1, pblk(pp, 0), it % 8, pval(it, pp, 0), r);
            access(pp, 1'b1, pblk(pp, 1), it % 8, pval(it, pp, 1), r);
            if (pp == 0) begin
              repeat (40) @(posedge clk);
              access(pp, 1'b0, pblk(pp, 0), it % 8, '0, r);
              check(r == pval(it, pp, 0), "producer reads back its value");
            end
          end
        join_none
      end
      wait fork;
      repeat (60) @(posedge clk);   // leave time for early invalidations

      // 2. consumption: each consumer node reads its producers' blocks
      for (int c = 0; c < int'(NODES); c++) begin
        fork
          automatic int cc = c;
          begin
            word_t r;
            for (int p = 0; p < 8; p++) begin
              for (int k = 0; k < n_consumers(it, p); k++) begin
                if (consumer(it, p, k) == cc) begin
                  for (int m = 0; m < 2; m++) begin
                    access(cc, 1'b0, pblk(p, m), it % 8, '0, r);
                    check(r == pval(it, p, m),
                          $sformatf("it %0d node %0d reads block of producer %0d.%0d: %h", it, cc, p, m, r));
                  end
                end
              end
            end
          end
        join_none
      end
      wait fork;

      // 3. migration
      for (int n = 8; n < int'(NODES); n++) begin
        access(n, 1'b0, CNT, 0, '0, q);
        check(int'(q) == counter, $sformatf("migratory counter read by %0d", n));
        counter++;
        access(n, 1'b1, CNT, 0, word_t'(counter), q);
      end
    end

    access(0, 1'b0, CNT, 0, '0, q);
    check(int'(q) == counter, "final counter");

    $display("hits %0d misses %0d invalidations %0d writebacks %0d", n_hit, n_miss, n_inv, n_fetch);
    $display("first-read triggers %0d SWI triggers %0d SWI done %0d stale advice %0d",
             n_fr, n_swi, n_swid, n_stale);
    $display("pushes %0d installed %0d referenced %0d dropped %0d", n_push, n_inst, n_ref, n_drop);
    $display("predictions %0d correct %0d premature %0d removed %0d", n_pred, n_corr, n_prem, n_rem);
    check(n_hit > 0,   "mechanism: remote cache hit");
    check(n_miss > 0,  "mechanism: remote cache miss");
    check(n_inv > 0,   "mechanism: invalidation");
    check(n_fetch > 0, "mechanism: writeback of a writable copy");
    check(n_fr > 0,    "mechanism: first-read trigger");
    check(n_swi > 0,   "mechanism: SWI trigger");
    check(n_swid > 0,  "mechanism: early write invalidation done");
    check(n_push > 0,  "mechanism: speculative push");
    check(n_inst > 0,  "mechanism: pushed copy installed");
    check(n_ref > 0,   "mechanism: pushed copy referenced");
    check(n_drop > 0,  "mechanism: racing push dropped");
    check(n_prem > 0,  "mechanism: premature invalidation detected");
    check(n_rem > 0,   "mechanism: mispredicted entry removed");
    check(n_corr > 0,  "mechanism: correct prediction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
