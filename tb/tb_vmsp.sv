// tb_vmsp: self-checking test of the vector sharing predictor.
// Events are fed as the protocol engine would report them; the expected
// advice and learning outcomes are worked out by hand from the predictor's
// rules:
//  1. producer/consumer on block 5 (P3 writes, P1 and P2 read): nothing is
//     predicted in the first round; in the second round the first read (P2)
//     triggers a push to P1 only (first-read trigger), and the closing write,
//     whose invalidations report P1's pushed copy referenced, confirms both
//     pattern entries (2 correct predictions).
//  2. P3 then writes block 6: block 5 is finished, so SWI advice to take P3's
//     copy of block 5 and push it to {P1,P2} must follow.
//  3. after the early invalidation is reported, P3 reads block 5 again before
//     anyone else: premature, and SWI must never again fire for P3's write of
//     block 5.
//  4. on block 9, a pushed copy reported unreferenced removes the entry, so
//     the next first read triggers nothing.
//  5. a processed event frees the event port after two cycles.
module tb_vmsp;
  import dsm_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     ev_valid, ev_ready, adv_valid, adv_ready;
  msp_ev_t  ev;
  msp_adv_t adv;
  logic [1:0] st_pred, st_correct;
  logic     st_fr, st_swi, st_premature, st_remove, st_adv_lost;
  int       checks = 0, failures = 0;
  int       n_pred = 0, n_corr = 0, n_fr = 0, n_swi = 0, n_prem = 0, n_rem = 0, n_adv = 0;
  msp_adv_t last_adv;

  vmsp #(.PT_ENTRIES(8), .SWI_EN(1'b1)) dut (
    .clk, .rst_n, .ev_valid, .ev_ready, .ev, .adv_valid, .adv_ready, .adv,
    .st_pred, .st_correct, .st_fr, .st_swi, .st_premature, .st_remove, .st_adv_lost);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      n_pred += int'(st_pred);
      n_corr += int'(st_correct);
      n_fr   += int'(st_fr);
      n_swi  += int'(st_swi);
      n_prem += int'(st_premature);
      n_rem  += int'(st_remove);
      if (adv_valid && adv_ready) begin
        n_adv++;
        last_adv = adv;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic nvec_t v(int a, int b = -1);
    nvec_t r;
    r = '0;
    r[a] = 1'b1;
    if (b >= 0) r[b] = 1'b1;
    return r;
  endfunction

  // send one event and wait until the predictor is idle again
  task automatic send(input ev_kind_t k, input req_t t, input int p, input int b,
                      input nvec_t hit = '0, input nvec_t miss = '0);
    @(negedge clk);
    while (!ev_ready) @(negedge clk);
    ev_valid     = 1'b1;
    ev.kind      = k;
    ev.typ       = t;
    ev.pid       = pid_t'(p);
    ev.blk       = lblk_t'(b);
    ev.spec_hit  = hit;
    ev.spec_miss = miss;
    @(negedge clk);
    ev_valid = 1'b0;
    while (!ev_ready) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int a0, p0, c0, cyc;
    ev_valid = 1'b0; ev = '0; adv_ready = 1'b1; last_adv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. first round: learn only
    send(EV_REQ, RQ_WRITE, 3, 5);
    send(EV_REQ, RQ_READ, 1, 5);
    send(EV_REQ, RQ_READ, 2, 5);
    send(EV_REQ, RQ_WRITE, 3, 5);
    check(n_adv == 0 && n_pred == 0, "round 1 predicts nothing");
    // second round, readers re-ordered
    send(EV_REQ, RQ_READ, 2, 5);
    check(n_fr == 1 && n_adv == 1, "first read triggers a push");
    check(last_adv.kind == ADV_SPEC_READ && last_adv.blk == 5 && last_adv.readers == v(1),
          "push goes to the other predicted reader only");
    p0 = n_pred; c0 = n_corr;
    send(EV_REQ, RQ_WRITE, 3, 5, v(1));
    check(n_pred - p0 == 2 && n_corr - c0 == 2, "read vector and writer confirmed");

    // 2. P3 moves on to block 6: SWI for block 5
    a0 = n_adv;
    send(EV_REQ, RQ_WRITE, 3, 6);
    check(n_swi == 1 && n_adv == a0 + 1, "write to another block triggers SWI");
    check(last_adv.kind == ADV_SWI && last_adv.blk == 5 && last_adv.owner == 3 &&
          last_adv.readers == v(1, 2), "SWI advice names block, owner and readers");

    // 3. premature early invalidation
    send(EV_SWI, RQ_NONE, 3, 5);
    send(EV_REQ, RQ_READ, 3, 5);
    check(n_prem == 1, "producer re-reading first is premature");
    send(EV_REQ, RQ_WRITE, 3, 5);       // learns <W3> -> reads {3}
    send(EV_REQ, RQ_READ, 1, 5);
    send(EV_REQ, RQ_WRITE, 3, 5);       // learns <W3> -> reads {1}
    a0 = n_adv;
    send(EV_REQ, RQ_WRITE, 3, 6);
    check(n_swi == 1 && n_adv == a0, "SWI stays off for a write marked premature");

    // 4. unreferenced push removes the entry
    send(EV_REQ, RQ_WRITE, 4, 9);
    send(EV_REQ, RQ_READ, 5, 9);
    send(EV_REQ, RQ_WRITE, 4, 9);
    a0 = n_adv;
    send(EV_REQ, RQ_READ, 6, 9);
    check(n_adv == a0 + 1 && last_adv.readers == v(5), "push to predicted reader P5");
    send(EV_REQ, RQ_WRITE, 4, 9, '0, v(5));
    check(n_rem == 1, "unreferenced push removes the entry");
    a0 = n_adv;
    send(EV_REQ, RQ_READ, 6, 9);
    check(n_adv == a0, "removed entry predicts nothing");

    // 5. event port timing: ready again two cycles after acceptance
    @(negedge clk);
    ev_valid = 1'b1;
    ev = '{kind: EV_REQ, typ: RQ_READ, pid: pid_t'(7), blk: lblk_t'(20), spec_hit: '0, spec_miss: '0};
    @(negedge clk);
    ev_valid = 1'b0;
    cyc = 1;
    while (!ev_ready) begin @(negedge clk); cyc++; end
    check(cyc == 2, $sformatf("event takes two cycles (%0d)", cyc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
