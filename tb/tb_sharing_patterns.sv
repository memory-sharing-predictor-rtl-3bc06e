// tb_sharing_patterns: the sharing patterns of the evaluated applications,
// run on two full-size 16-node systems side by side: one with both read
// triggers (SWI and first read, the main configuration) and one with the
// first-read trigger only.
//
// Each pattern runs for ITERS iterations of a production phase and a
// consumption phase separated by barriers; the last ITERS-WARM iterations are
// measured. A consumer read is counted as served speculatively when it hits a
// copy pushed by the home and not yet referenced (the remote cache's
// reference strobe). The patterns:
//  0 static producer/consumer: four producers each write four blocks once
//    per iteration, one after the other; three fixed consumers per producer
//    read them. SWI can push three of the four blocks before the first read;
//    the first-read trigger can only push to the readers after the first.
//  1 producer re-reads: the producer reads its first block back shortly
//    after writing the second. The early invalidation is premature and the
//    entry's SWI is switched off (once for the write key and once for the
//    upgrade key the re-read causes next time); SWI then stops for these
//    blocks, the re-read hits locally, and the first consumer's read
//    triggers the push to the second.
//  2 wide read sharing: one producer, twelve readers per block. The first
//    read triggers the other eleven.
//  3 migratory sharing: three nodes in turn read and update two counters.
//    A read/write pair has no second reader, so the first-read trigger never
//    helps; SWI moves the first counter to the next node when the current
//    one updates the second.
// Every value read is checked. Per pattern and system, the fraction of
// measured reads served speculatively is printed and checked against the
// pattern's expected behaviour, and each trigger must have occurred where
// expected.
module tb_sharing_patterns;
  import dsm_pkg::*;

  localparam int ITERS = 8;
  localparam int WARM  = 3;
  localparam int NPAT  = 4;
  localparam int STAG  = 60;   // cycles between the starts of successive readers
  localparam int MIG_FIRST = 8;
  localparam int MIG_NODES = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cpu_req_valid  [2][NODES];
  logic        cpu_req_ready  [2][NODES];
  logic        cpu_req_write  [2][NODES];
  gblk_t       cpu_req_addr   [2][NODES];
  wsel_t       cpu_req_word   [2][NODES];
  word_t       cpu_req_wdata  [2][NODES];
  logic        cpu_resp_valid [2][NODES];
  word_t       cpu_resp_rdata [2][NODES];
  node_stats_t stats          [2][NODES];

  int checks = 0, failures = 0;

  // system 0: SWI and first read; system 1: first read only
  dsm_system u_swi (
    .clk, .rst_n,
    .cpu_req_valid (cpu_req_valid[0]),  .cpu_req_ready (cpu_req_ready[0]),
    .cpu_req_write (cpu_req_write[0]),  .cpu_req_addr  (cpu_req_addr[0]),
    .cpu_req_word  (cpu_req_word[0]),   .cpu_req_wdata (cpu_req_wdata[0]),
    .cpu_resp_valid(cpu_resp_valid[0]), .cpu_resp_rdata(cpu_resp_rdata[0]),
    .stats         (stats[0])
  );

  dsm_system #(.SWI_EN(1'b0)) u_fr (
    .clk, .rst_n,
    .cpu_req_valid (cpu_req_valid[1]),  .cpu_req_ready (cpu_req_ready[1]),
    .cpu_req_write (cpu_req_write[1]),  .cpu_req_addr  (cpu_req_addr[1]),
    .cpu_req_word  (cpu_req_word[1]),   .cpu_req_wdata (cpu_req_wdata[1]),
    .cpu_resp_valid(cpu_resp_valid[1]), .cpu_resp_rdata(cpu_resp_rdata[1]),
    .stats         (stats[1])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- counting
  int  cur_pat [2];
  bit  meas    [2];              // inside a measured consumption phase
  bit  late    [2];              // inside the last three iterations
  longint n_reads [2][NPAT];     // measured consumer reads
  longint n_spec  [2][NPAT];     // ... served from a pushed copy
  longint n_fr    [2][NPAT];
  longint n_swi   [2][NPAT];
  longint n_swi_late [2][NPAT];  // SWI triggers in the last three iterations
  longint n_prem  [2][NPAT];
  longint n_push  [2][NPAT];
  longint n_pred  [2][NPAT];
  longint n_corr  [2][NPAT];

  initial begin
    for (int d = 0; d < 2; d++) begin
      cur_pat[d] = 0; meas[d] = 1'b0; late[d] = 1'b0;
      for (int p = 0; p < NPAT; p++) begin
        n_reads[d][p] = 0; n_spec[d][p] = 0; n_fr[d][p] = 0; n_swi[d][p] = 0;
        n_swi_late[d][p] = 0; n_prem[d][p] = 0; n_push[d][p] = 0;
        n_pred[d][p] = 0; n_corr[d][p] = 0;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < 2; d++) begin
        for (int n = 0; n < int'(NODES); n++) begin
          if (meas[d]) n_spec[d][cur_pat[d]] += longint'(stats[d][n].spec_ref);
          n_fr[d][cur_pat[d]]   += longint'(stats[d][n].fr);
          n_swi[d][cur_pat[d]]  += longint'(stats[d][n].swi);
          if (late[d]) n_swi_late[d][cur_pat[d]] += longint'(stats[d][n].swi);
          n_prem[d][cur_pat[d]] += longint'(stats[d][n].premature);
          n_push[d][cur_pat[d]] += longint'(stats[d][n].spec_push);
          n_pred[d][cur_pat[d]] += longint'(stats[d][n].pred);
          n_corr[d][cur_pat[d]] += longint'(stats[d][n].correct);
        end
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

  // one processor access on system d, blocking until the answer
  task automatic access(input int d, input int n, input bit wr, input gblk_t a,
                        input int w, input word_t dat, output word_t q);
    @(negedge clk);
    cpu_req_valid[d][n] = 1'b1;
    cpu_req_write[d][n] = wr;
    cpu_req_addr[d][n]  = a;
    cpu_req_word[d][n]  = wsel_t'(w);
    cpu_req_wdata[d][n] = dat;
    do @(posedge clk); while (!cpu_req_ready[d][n]);
    @(negedge clk);
    cpu_req_valid[d][n] = 1'b0;
    while (!cpu_resp_valid[d][n]) @(posedge clk);
    q = cpu_resp_rdata[d][n];
    @(posedge clk);
  endtask

  // a consumer read, checked and counted
  task automatic cread(input int d, input int n, input gblk_t a, input int w,
                       input word_t exp, input string what);
    word_t q;
    access(d, n, 1'b0, a, w, '0, q);
    check(q == exp, $sformatf("sys %0d node %0d %s: read %h expected %h", d, n, what, q, exp));
    if (meas[d]) n_reads[d][cur_pat[d]]++;
  endtask

  function automatic gblk_t blk(int pat, int home, int idx);
    return {pid_t'(home % NODES), lblk_t'(pat * 64 + idx)};
  endfunction

  function automatic word_t val(int pat, int it, int p, int m);
    return word_t'((pat << 24) | (it << 16) | (p << 8) | m);
  endfunction

  // ------------------------------------------------------------- patterns
  // 0: static producer/consumer
  task automatic pat_static(input int d);
    for (int it = 0; it < ITERS; it++) begin
      late[d] = (it >= ITERS - 3);
      for (int p = 0; p < 4; p++) begin
        fork
          automatic int pp = p;
          begin
            word_t r;
            for (int m = 0; m < 4; m++)
              access(d, pp, 1'b1, blk(0, pp + 4, pp * 4 + m), it % 8, val(0, it, pp, m), r);
          end
        join_none
      end
      wait fork;
      repeat (80) @(posedge clk);
      meas[d] = (it >= WARM);
      for (int c = 0; c < 3; c++) begin
        for (int p = 0; p < 4; p++) begin
          fork
            automatic int pp = p, cc = c;
            begin
              repeat (STAG * cc) @(posedge clk);
              for (int m = 0; m < 4; m++)
                cread(d, (pp + 1 + 5 * cc) % NODES, blk(0, pp + 4, pp * 4 + m), it % 8,
                      val(0, it, pp, m), "static producer/consumer");
            end
          join_none
        end
      end
      wait fork;
      meas[d] = 1'b0;
    end
  endtask

  // 1: producer reads its block back after writing the next one
  task automatic pat_reread(input int d);
    for (int it = 0; it < ITERS; it++) begin
      late[d] = (it >= ITERS - 3);
      for (int p = 0; p < 4; p++) begin
        fork
          automatic int pp = p;
          begin
            word_t r;
            access(d, pp, 1'b1, blk(1, pp + 8, pp * 2),     it % 8, val(1, it, pp, 0), r);
            access(d, pp, 1'b1, blk(1, pp + 8, pp * 2 + 1), it % 8, val(1, it, pp, 1), r);
            repeat (40) @(posedge clk);
            access(d, pp, 1'b0, blk(1, pp + 8, pp * 2), it % 8, '0, r);
            check(r == val(1, it, pp, 0), "producer reads its value back");
          end
        join_none
      end
      wait fork;
      repeat (80) @(posedge clk);
      meas[d] = (it >= WARM);
      for (int c = 0; c < 2; c++) begin
        for (int p = 0; p < 4; p++) begin
          fork
            automatic int pp = p, cc = c;
            begin
              repeat (STAG * cc) @(posedge clk);
              for (int m = 0; m < 2; m++)
                cread(d, (pp + 4 + 6 * cc) % NODES, blk(1, pp + 8, pp * 2 + m), it % 8,
                      val(1, it, pp, m), "producer re-reads");
            end
          join_none
        end
      end
      wait fork;
      meas[d] = 1'b0;
    end
  endtask

  // 2: one producer, twelve readers
  task automatic pat_wide(input int d);
    for (int it = 0; it < ITERS; it++) begin
      late[d] = (it >= ITERS - 3);
      begin
        word_t r;
        for (int m = 0; m < 4; m++)
          access(d, 0, 1'b1, blk(2, 9, m), it % 8, val(2, it, 0, m), r);
      end
      repeat (80) @(posedge clk);
      meas[d] = (it >= WARM);
      for (int c = 1; c <= 12; c++) begin
        fork
          automatic int cc = c;
          begin
            repeat (STAG * (cc - 1)) @(posedge clk);
            for (int m = 0; m < 4; m++)
              cread(d, cc, blk(2, 9, (m + cc) % 4), it % 8, val(2, it, 0, (m + cc) % 4),
                    "wide read sharing");
          end
        join_none
      end
      wait fork;
      meas[d] = 1'b0;
    end
  endtask

  // 3: migratory sharing of two counters
  task automatic pat_migratory(input int d);
    int    cnt;
    word_t r0;
    cnt = 0;
    access(d, MIG_FIRST, 1'b1, blk(3, 3, 0), 0, word_t'(0), r0);
    access(d, MIG_FIRST, 1'b1, blk(3, 3, 1), 0, word_t'(1), r0);
    for (int it = 0; it < ITERS; it++) begin
      late[d] = (it >= ITERS - 3);
      meas[d] = (it >= WARM);
      for (int n = MIG_FIRST; n < MIG_FIRST + MIG_NODES; n++) begin
        word_t r;
        for (int k = 0; k < 2; k++) begin
          cread(d, n, blk(3, 3, k), 0, word_t'(cnt + k), "migratory counter");
          access(d, n, 1'b1, blk(3, 3, k), 0, word_t'(cnt + k + 1), r);
        end
        cnt++;
        repeat (20) @(posedge clk);
      end
      meas[d] = 1'b0;
    end
  endtask

  task automatic run_all(input int d);
    cur_pat[d] = 0; pat_static(d);
    cur_pat[d] = 1; pat_reread(d);
    cur_pat[d] = 2; pat_wide(d);
    cur_pat[d] = 3; pat_migratory(d);
  endtask

  function automatic int pct(longint a, longint b);
    return (b == 0) ? 0 : int'((a * 100) / b);
  endfunction

  localparam string PNAME [NPAT] = '{"static producer/consumer", "producer re-reads",
                                     "wide read sharing", "migratory sharing"};

  initial begin
    int f [2][NPAT];
    for (int d = 0; d < 2; d++)
      for (int n = 0; n < int'(NODES); n++) begin
        cpu_req_valid[d][n] = 1'b0; cpu_req_write[d][n] = 1'b0; cpu_req_addr[d][n] = '0;
        cpu_req_word[d][n] = '0; cpu_req_wdata[d][n] = '0;
      end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    fork
      run_all(0);
      run_all(1);
    join

    for (int p = 0; p < NPAT; p++) begin
      for (int d = 0; d < 2; d++) begin
        f[d][p] = pct(n_spec[d][p], n_reads[d][p]);
        $display("%-26s %s: reads %0d speculative %0d (%0d%%) FR %0d SWI %0d (late %0d) premature %0d pushes %0d predictions %0d correct %0d",
                 PNAME[p], d == 0 ? "SWI+FR" : "FR    ", n_reads[d][p], n_spec[d][p], f[d][p],
                 n_fr[d][p], n_swi[d][p], n_swi_late[d][p], n_prem[d][p], n_push[d][p],
                 n_pred[d][p], n_corr[d][p]);
      end
    end

    // first-read-only system never invalidates early
    for (int p = 0; p < NPAT; p++) check(n_swi[1][p] == 0, "no SWI without SWI_EN");
    // static producer/consumer: SWI pushes three of four blocks before the
    // first read (11 of 12 reads); first read alone serves 2 of 3 readers
    check(n_swi[0][0] > 0 && n_fr[1][0] > 0, "static: both triggers fire");
    check(f[1][0] >= 60 && f[1][0] <= 70, "static: first read serves the other two readers");
    check(f[0][0] >= 85, "static: SWI serves the readers before the first read");
    // producer re-reads: premature invalidations switch SWI off; then the
    // producer's re-read hits locally and each block's first consumer
    // triggers the push to the second (1 of 2 reads)
    check(n_prem[0][1] > 0, "re-read: premature invalidation detected");
    check(n_swi_late[0][1] == 0, "re-read: SWI switched off for these blocks");
    for (int d = 0; d < 2; d++)
      check(f[d][1] >= 45 && f[d][1] <= 55, "re-read: first read serves the second consumer");
    // wide sharing: first read serves the other eleven of twelve readers
    check(f[1][2] >= 85, "wide: first read serves the other eleven readers");
    check(f[0][2] >= f[1][2], "wide: SWI does not lose reads");
    // migratory: a read/write pair gives first read nothing to push; SWI
    // moves the first counter ahead (1 of 2 reads)
    check(f[1][3] == 0, "migratory: first read cannot help");
    check(n_swi[0][3] > 0 && f[0][3] >= 45 && f[0][3] <= 55, "migratory: SWI moves a counter ahead");
    for (int d = 0; d < 2; d++)
      for (int p = 0; p < NPAT; p++) check(n_reads[d][p] > 0, "pattern measured");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
