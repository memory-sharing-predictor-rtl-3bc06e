// vmsp: Vector Memory Sharing Predictor of one home node, with the
// first-read (FR) and speculative write-invalidation (SWI) triggers.
//
// The predictor is a two-level pattern predictor over the request messages
// (read, write, upgrade) that the home's protocol engine serves; protocol
// acknowledgements are never recorded. History depth is one.
//
//  * History table, one entry per home block: the last request message. A
//    sequence of reads is folded into one message whose field is the reader
//    bit-vector, so the order of the reads does not matter. While a read
//    sequence is open, the write or upgrade that preceded it is kept beside
//    the history entry, because the pattern entry keyed by that write can
//    only be learned once the sequence is complete.
//  * Pattern table, PT_ENTRIES entries per home block, fully associative
//    within the block: key message -> predicted next message. An entry keyed
//    by a write or upgrade predicts either a reader vector or another writer;
//    an entry keyed by a reader vector predicts the next writer. Learning
//    overwrites the prediction of a matching entry or allocates a free entry
//    (else a per-block round-robin victim).
//  * Learning happens on each write or upgrade: the completed read sequence
//    is the set of readers the home has seen plus the speculatively pushed
//    copies that the invalidation acknowledgements report as referenced.
//    If any pushed copy is reported unreferenced, the entry that predicted
//    the sequence is removed instead of updated.
//  * FR: on the first read of a sequence, if the entry keyed by the current
//    history predicts a reader vector, advise the protocol to push read-only
//    copies to the other predicted readers.
//  * SWI (when SWI_EN): the early-write-invalidate table remembers each
//    processor's last written block. When processor p writes a different
//    block, p's previous block b0 is taken to be finished: if b0's history
//    is still p's write and its pattern entry predicts a reader vector and
//    its swi_off bit is clear, advise the protocol to take the writable copy
//    back and push it to the predicted readers. When the protocol reports the
//    early invalidation done, the block is marked; if the producer then asks
//    for the block again before anyone read it, the invalidation was
//    premature and the entry's swi_off bit is set, ending SWI for it.
//
// Interface: events from the protocol engine (ev_valid/ev_ready) are taken
// one at a time; each costs two cycles, or three when it starts an SWI check.
// Advice is held in a one-entry register until the engine takes it; a newer
// advice replaces one not yet taken (it is only a hint). Strobes report the
// predictions checked and correct, triggers and removals.
//
// The vector encoding, the request-only history, the FR and SWI triggers, the
// swi_off bit and the removal of mispredicted sequences follow the document;
// the entry count per block, the replacement choice, the exact definition of
// a premature invalidation and the interface are this design's choices.
module vmsp
  import dsm_pkg::*;
#(
  parameter int unsigned PT_ENTRIES = 8,
  parameter bit          SWI_EN     = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ev_valid,
  output logic     ev_ready,
  input  msp_ev_t  ev,
  output logic     adv_valid,
  input  logic     adv_ready,
  output msp_adv_t adv,
  // activity strobes
  output logic [1:0] st_pred,      // pattern-table predictions checked
  output logic [1:0] st_correct,   // ... of which correct
  output logic       st_fr,        // first-read advice issued
  output logic       st_swi,       // SWI advice issued
  output logic       st_premature, // premature early invalidation detected
  output logic       st_remove,    // mispredicted entry removed
  output logic       st_adv_lost   // untaken advice replaced
);

  localparam int unsigned RRW = (PT_ENTRIES > 1) ? $clog2(PT_ENTRIES) : 1;

  typedef struct packed {
    pte_t [PT_ENTRIES-1:0] e;
    logic [RRW-1:0]        rr;
  } prow_t;

  typedef struct packed {
    logic valid;
    req_t typ;
    pid_t pid;
  } wrec_t;

  typedef enum logic [1:0] {V_IDLE, V_PROC, V_SWI} vstate_t;

  hist_t hist   [HOME_BLOCKS];
  wrec_t lastw  [HOME_BLOCKS];
  logic  swiflg [HOME_BLOCKS];
  prow_t prow   [HOME_BLOCKS];

  vstate_t state;
  msp_ev_t e;
  lblk_t   b0;

  // ---------------------------------------------------------------- helpers
  function automatic nvec_t onehot(pid_t p);
    return nvec_t'(1) << p;
  endfunction

  function automatic logic key_match(pte_t x, req_t kt, nvec_t kf);
    if (!x.valid || x.ktyp != kt) return 1'b0;
    if (kt == RQ_READ) return x.vec == kf;
    return x.id == kf[PID_W-1:0];
  endfunction

  function automatic nvec_t pred_field(pte_t x);
    return (x.ktyp == RQ_READ) ? nvec_t'(x.id) : x.vec;
  endfunction

  // look up key; returns hit, the entry
  function automatic logic pt_find(prow_t r, req_t kt, nvec_t kf, output pte_t hit_e);
    logic found;
    found = 1'b0;
    hit_e = '0;
    for (int i = 0; i < int'(PT_ENTRIES); i++) begin
      if (!found && key_match(r.e[i], kt, kf)) begin
        found = 1'b1;
        hit_e = r.e[i];
      end
    end
    return found;
  endfunction

  // learn key -> prediction (or remove the key's entry)
  function automatic prow_t pt_learn(prow_t r, req_t kt, nvec_t kf, req_t pt, nvec_t pf,
                                     logic remove, output logic had, output logic correct);
    logic found, freef;
    int   idx, fidx;
    found = 1'b0; freef = 1'b0; idx = 0; fidx = 0;
    for (int i = 0; i < int'(PT_ENTRIES); i++) begin
      if (!found && key_match(r.e[i], kt, kf)) begin
        found = 1'b1;
        idx   = i;
      end
      if (!freef && !r.e[i].valid) begin
        freef = 1'b1;
        fidx  = i;
      end
    end
    had     = found;
    correct = found && r.e[idx].ptyp == pt && pred_field(r.e[idx]) == pf;
    if (!found) begin
      idx = freef ? fidx : int'(r.rr);
      if (!freef) r.rr = (int'(r.rr) == PT_ENTRIES - 1) ? '0 : r.rr + 1'b1;
      r.e[idx].swi_off = 1'b0;
    end
    if (remove) begin
      if (found) r.e[idx].valid = 1'b0;
    end else begin
      r.e[idx].valid = 1'b1;
      r.e[idx].ktyp  = kt;
      r.e[idx].ptyp  = pt;
      if (kt == RQ_READ) begin
        r.e[idx].vec = kf;
        r.e[idx].id  = pf[PID_W-1:0];
      end else begin
        r.e[idx].id  = kf[PID_W-1:0];
        r.e[idx].vec = pf;
      end
    end
    return r;
  endfunction

  function automatic prow_t pt_disable_swi(prow_t r, req_t kt, pid_t kp);
    for (int i = 0; i < int'(PT_ENTRIES); i++) begin
      if (key_match(r.e[i], kt, nvec_t'(kp))) r.e[i].swi_off = 1'b1;
    end
    return r;
  endfunction

  // ------------------------------------------------ early-write-invalidate
  logic  ewi_upd;
  logic  ewi_stale;
  lblk_t ewi_blk;

  assign ewi_upd = (state == V_PROC) && (e.kind == EV_REQ) && (e.typ != RQ_READ) && SWI_EN;

  ewi_table u_ewi (
    .clk        (clk),
    .rst_n      (rst_n),
    .upd_valid  (ewi_upd),
    .upd_pid    (e.pid),
    .upd_blk    (e.blk),
    .stale_valid(ewi_stale),
    .stale_blk  (ewi_blk)
  );

  // ------------------------------------------------------ event processing
  hist_t    h, nh;
  wrec_t    lw, nlw;
  prow_t    row, nrow;
  logic     nflag;
  logic     new_adv;
  msp_adv_t nadv;
  logic     had1, had2, cor1, cor2;
  logic     premature, removed, fr, swi;

  always_comb begin
    hist_t  h0;
    prow_t  r0;
    pte_t   pe;
    nvec_t  rset;
    wrec_t  k;
    logic   hit;
    wrec_t  prod;

    h        = hist[e.blk];
    lw       = lastw[e.blk];
    row      = prow[e.blk];
    nh       = h;
    nlw      = lw;
    nrow     = row;
    nflag    = swiflg[e.blk];
    new_adv  = 1'b0;
    nadv     = '0;
    had1 = 1'b0; had2 = 1'b0; cor1 = 1'b0; cor2 = 1'b0;
    premature = 1'b0; removed = 1'b0; fr = 1'b0; swi = 1'b0;
    pe   = '0;
    rset = '0;
    k    = '0;
    hit  = 1'b0;
    h0   = hist[b0];
    r0   = prow[b0];
    prod = '0;

    if (state == V_PROC && e.kind == EV_SWI) begin
      nflag = 1'b1;
    end else if (state == V_PROC) begin
      rset = ((h.valid && h.typ == RQ_READ) ? h.field : '0) | e.spec_hit;
      // premature early invalidation: producer asks again before any reader
      prod = (h.typ == RQ_READ) ? lw : '{valid: h.valid, typ: h.typ, pid: h.field[PID_W-1:0]};
      if (swiflg[e.blk] && prod.valid && e.pid == prod.pid &&
          ((e.typ == RQ_READ && h.typ != RQ_READ) || (e.typ != RQ_READ && rset == '0))) begin
        premature = 1'b1;
        nrow      = pt_disable_swi(nrow, prod.typ, prod.pid);
        nflag     = 1'b0;
      end

      if (e.typ == RQ_READ) begin
        if (h.valid && h.typ == RQ_READ) begin
          nh.field = h.field | onehot(e.pid);
        end else begin
          if (h.valid) begin
            hit = pt_find(nrow, h.typ, h.field, pe);
            if (hit && pe.ptyp == RQ_READ && (pe.vec & ~onehot(e.pid)) != '0) begin
              fr           = 1'b1;
              new_adv      = 1'b1;
              nadv.kind    = ADV_SPEC_READ;
              nadv.blk     = e.blk;
              nadv.owner   = '0;
              nadv.readers = pe.vec & ~onehot(e.pid);
            end
          end
          nlw = '{valid: h.valid, typ: h.typ, pid: h.field[PID_W-1:0]};
          nh  = '{valid: 1'b1, typ: RQ_READ, field: onehot(e.pid)};
        end
      end else begin
        if (rset != '0) begin
          k = (h.typ == RQ_READ) ? lw : '{valid: h.valid, typ: h.typ, pid: h.field[PID_W-1:0]};
          if (k.valid) begin
            nrow    = pt_learn(nrow, k.typ, nvec_t'(k.pid), RQ_READ, rset,
                               e.spec_miss != '0, had1, cor1);
            removed = (e.spec_miss != '0) && had1;
          end
          nrow = pt_learn(nrow, RQ_READ, rset, e.typ, nvec_t'(e.pid), 1'b0, had2, cor2);
        end else if (h.valid) begin
          nrow = pt_learn(nrow, h.typ, h.field, e.typ, nvec_t'(e.pid), 1'b0, had1, cor1);
        end
        nh    = '{valid: 1'b1, typ: e.typ, field: nvec_t'(e.pid)};
        nlw   = '0;
        nflag = 1'b0;
      end
    end else if (state == V_SWI) begin
      // p = e.pid has moved on to another block: is b0 finished?
      if (h0.valid && h0.typ != RQ_READ && h0.typ != RQ_NONE && h0.field[PID_W-1:0] == e.pid) begin
        hit = pt_find(r0, h0.typ, h0.field, pe);
        if (hit && pe.ptyp == RQ_READ && !pe.swi_off && pe.vec != '0) begin
          swi          = 1'b1;
          new_adv      = 1'b1;
          nadv.kind    = ADV_SWI;
          nadv.blk     = b0;
          nadv.owner   = e.pid;
          nadv.readers = pe.vec;
        end
      end
    end
  end

  assign ev_ready     = (state == V_IDLE);
  assign st_pred      = {1'b0, had1} + {1'b0, had2};
  assign st_correct   = {1'b0, cor1} + {1'b0, cor2};
  assign st_fr        = fr;
  assign st_swi       = swi;
  assign st_premature = premature;
  assign st_remove    = removed;
  assign st_adv_lost  = new_adv && adv_valid && !adv_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(HOME_BLOCKS); i++) begin
        hist[i]   <= '0;
        lastw[i]  <= '0;
        swiflg[i] <= 1'b0;
        prow[i]   <= '0;
      end
      state     <= V_IDLE;
      e         <= '0;
      b0        <= '0;
      adv_valid <= 1'b0;
      adv       <= '0;
    end else begin
      if (adv_valid && adv_ready) adv_valid <= 1'b0;
      if (new_adv) begin
        adv_valid <= 1'b1;
        adv       <= nadv;
      end
      unique case (state)
        V_IDLE: if (ev_valid) begin
          e     <= ev;
          state <= V_PROC;
        end
        V_PROC: begin
          hist[e.blk]   <= nh;
          lastw[e.blk]  <= nlw;
          swiflg[e.blk] <= nflag;
          prow[e.blk]   <= nrow;
          if (ewi_stale) begin
            b0    <= ewi_blk;
            state <= V_SWI;
          end else begin
            state <= V_IDLE;
          end
        end
        default: state <= V_IDLE;
      endcase
    end
  end

endmodule
