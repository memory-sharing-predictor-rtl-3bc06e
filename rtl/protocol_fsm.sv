// protocol_fsm: home-side engine of a full-map write-invalidate coherence
// protocol that also carries out the sharing predictor's advice.
//
// Requests for home blocks arrive on the request port and are served one at a
// time (the port is held not-ready while a transaction is open):
//   read     - if a writable copy exists elsewhere it is invalidated and
//              written back first; the requester gets a read-only copy.
//   write    - all other copies are invalidated (read-only copies) or fetched
//              back (writable copy); the requester gets a writable copy.
//   upgrade  - like write, but a requester that still holds its read-only
//              copy gets a grant without data; otherwise it is served as a
//              write.
// Invalidations are sent one per cycle and overlap; acknowledgements and
// writebacks are accepted on the response port at any time. An acknowledgement
// carries two piggy-backed bits from the remote cache (a speculatively pushed
// copy was / was not referenced); these are gathered per node and handed to
// the predictor with the event that reports the served request.
//
// Advice from the predictor is taken whenever the engine is idle, before any
// waiting request. It never changes the protocol, it only starts existing
// operations early, and it is dropped when the directory shows it is stale:
//   spec-read - push read-only copies to the predicted readers that do not
//               hold one yet (block must not be held writable);
//   SWI       - fetch back the writable copy of the predicted owner (must
//               still be the owner) and then push read-only copies to the
//               predicted readers. Completion is reported to the predictor.
//
// Timing: one cycle to accept, one to decide from the directory, then one
// message per cycle on the forward port while it is ready, plus the wait for
// responses. Block data is not stored here: the outgoing data field is the
// memory read port and the memory write data is the incoming writeback, wired
// straight through, as are the node's own id in a message's source and home
// fields; a forward message's reference bits are always zero (only
// acknowledgements carry them), and the response port is always ready.
//
// The protocol's states and message flow follow the document; the
// serialisation per home, the message set and the advice checks are this
// design's choices.
module protocol_fsm
  import dsm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pid_t       node_id,
  // request network in
  input  logic       req_valid,
  output logic       req_ready,
  input  msg_t       req_msg,
  // response network in
  input  logic       rsp_valid,
  output logic       rsp_ready,
  input  msg_t       rsp_msg,
  // forward network out
  output logic       fwd_valid,
  input  logic       fwd_ready,
  output msg_t       fwd_msg,
  // directory
  output lblk_t      dir_rd_blk,
  input  dir_entry_t dir_rd_entry,
  output logic       dir_wr_en,
  output lblk_t      dir_wr_blk,
  output dir_entry_t dir_wr_entry,
  // home memory
  output lblk_t      mem_rd_blk,
  input  block_t     mem_rd_data,
  output logic       mem_wr_en,
  output lblk_t      mem_wr_blk,
  output block_t     mem_wr_data,
  // predictor
  output logic       ev_valid,
  input  logic       ev_ready,
  output msp_ev_t    ev,
  input  logic       adv_valid,
  output logic       adv_ready,
  input  msp_adv_t   adv,
  // activity strobes
  output logic       st_inv,        // invalidation sent
  output logic       st_fetch,      // writable copy fetched back
  output logic       st_spec,       // speculative copy pushed
  output logic       st_swi,        // early write invalidation completed
  output logic       st_adv_stale   // advice dropped as stale
);

  typedef enum logic [2:0] {
    P_IDLE, P_DECIDE, P_FETCH, P_INV, P_WAIT, P_REPLY, P_SPEC, P_EVENT
  } pstate_t;

  pstate_t   state;
  logic      cur_adv;
  adv_kind_t cur_akind;
  req_t      cur_typ;
  pid_t      cur_pid;     // requester, or predicted owner for SWI
  lblk_t     cur_blk;
  nvec_t     targets;     // invalidation or push targets still to send
  nvec_t     pushed;      // all push targets of this advice
  nvec_t     hit_vec, miss_vec;
  pid_t      fetch_tgt;
  logic      upg_ok;
  logic [PID_W:0] pending;

  function automatic pid_t lowest(nvec_t v);
    pid_t r;
    r = '0;
    for (int i = NODES - 1; i >= 0; i--) if (v[i]) r = pid_t'(i);
    return r;
  endfunction

  function automatic nvec_t onehot(pid_t p);
    return nvec_t'(1) << p;
  endfunction

  function automatic gblk_t gaddr(lblk_t b);
    return {node_id, b};
  endfunction

  dir_entry_t d;
  assign d          = dir_rd_entry;
  assign dir_rd_blk = cur_blk;
  assign mem_rd_blk = cur_blk;

  assign req_ready = (state == P_IDLE) && !adv_valid;
  assign adv_ready = (state == P_IDLE);
  assign rsp_ready = 1'b1;

  logic rsp_take;
  assign rsp_take    = rsp_valid;
  assign mem_wr_en   = rsp_take && (rsp_msg.mtype == M_WRITEBACK);
  assign mem_wr_blk  = lblk_of(rsp_msg.addr);
  assign mem_wr_data = rsp_msg.data;

  // forward message of the current state
  always_comb begin
    fwd_valid     = 1'b0;
    fwd_msg       = '0;
    fwd_msg.src   = node_id;
    fwd_msg.addr  = gaddr(cur_blk);
    fwd_msg.data  = mem_rd_data;
    unique case (state)
      P_FETCH: begin
        fwd_valid     = 1'b1;
        fwd_msg.mtype = M_FETCH_INV;
        fwd_msg.dst   = fetch_tgt;
      end
      P_INV: begin
        fwd_valid     = 1'b1;
        fwd_msg.mtype = M_INV;
        fwd_msg.dst   = lowest(targets);
      end
      P_SPEC: begin
        fwd_valid     = 1'b1;
        fwd_msg.mtype = M_SPEC_DATA;
        fwd_msg.dst   = lowest(targets);
      end
      P_REPLY: begin
        fwd_valid     = 1'b1;
        fwd_msg.dst   = cur_pid;
        if (cur_typ == RQ_READ)  fwd_msg.mtype = M_DATA_SH;
        else if (upg_ok)         fwd_msg.mtype = M_UPG_ACK;
        else                     fwd_msg.mtype = M_DATA_EX;
      end
      default: ;
    endcase
  end

  // directory update at the end of a transaction
  always_comb begin
    dir_wr_en    = 1'b0;
    dir_wr_blk   = cur_blk;
    dir_wr_entry = d;
    if (state == P_REPLY && fwd_ready) begin
      dir_wr_en = 1'b1;
      if (cur_typ == RQ_READ) begin
        dir_wr_entry.st      = D_SHARED;
        dir_wr_entry.sharers = ((d.st == D_EXCL) ? '0 : d.sharers) | onehot(cur_pid);
      end else begin
        dir_wr_entry.st      = D_EXCL;
        dir_wr_entry.owner   = cur_pid;
        dir_wr_entry.sharers = '0;
      end
    end else if (state == P_SPEC && fwd_ready && (targets & ~onehot(lowest(targets))) == '0) begin
      dir_wr_en            = 1'b1;
      dir_wr_entry.st      = D_SHARED;
      dir_wr_entry.sharers = ((d.st == D_EXCL) ? '0 : d.sharers) | pushed;
    end else if (state == P_WAIT && cur_adv && pending == 0 && pushed == '0) begin
      dir_wr_en            = 1'b1;
      dir_wr_entry.st      = D_IDLE;
      dir_wr_entry.sharers = '0;
    end
  end

  assign ev_valid     = (state == P_EVENT);
  assign ev.kind      = cur_adv ? EV_SWI : EV_REQ;
  assign ev.typ       = cur_typ;
  assign ev.pid       = cur_pid;
  assign ev.blk       = cur_blk;
  assign ev.spec_hit  = hit_vec;
  assign ev.spec_miss = miss_vec;

  assign st_inv   = (state == P_INV) && fwd_ready;
  assign st_fetch = (state == P_FETCH) && fwd_ready;
  assign st_spec  = (state == P_SPEC) && fwd_ready;
  assign st_swi   = (state == P_EVENT) && ev_ready && cur_adv;

  always_comb begin
    st_adv_stale = 1'b0;
    if (state == P_DECIDE && cur_adv) begin
      if (cur_akind == ADV_SWI) st_adv_stale = !(d.st == D_EXCL && d.owner == cur_pid);
      else                      st_adv_stale = !(d.st != D_EXCL && (pushed & ~d.sharers) != '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      cur_adv   <= 1'b0;
      cur_akind <= ADV_SPEC_READ;
      cur_typ   <= RQ_NONE;
      cur_pid   <= '0;
      cur_blk   <= '0;
      targets   <= '0;
      pushed    <= '0;
      hit_vec   <= '0;
      miss_vec  <= '0;
      fetch_tgt <= '0;
      upg_ok    <= 1'b0;
      pending   <= '0;
    end else begin
      // responses: count down, gather piggy-backed verification bits
      logic inc;
      inc = (state == P_FETCH || state == P_INV) && fwd_ready;
      if (rsp_take) begin
        if (rsp_msg.spec_hit)  hit_vec[rsp_msg.src]  <= 1'b1;
        if (rsp_msg.spec_miss) miss_vec[rsp_msg.src] <= 1'b1;
      end
      pending <= pending + {{PID_W{1'b0}}, inc} - {{PID_W{1'b0}}, rsp_take};

      unique case (state)
        P_IDLE: begin
          if (adv_valid) begin
            cur_adv   <= 1'b1;
            cur_akind <= adv.kind;
            cur_typ   <= RQ_NONE;
            cur_pid   <= adv.owner;
            cur_blk   <= adv.blk;
            pushed    <= adv.readers;
            hit_vec   <= '0;
            miss_vec  <= '0;
            state     <= P_DECIDE;
          end else if (req_valid) begin
            cur_adv   <= 1'b0;
            cur_pid   <= req_msg.src;
            cur_blk   <= lblk_of(req_msg.addr);
            pushed    <= '0;
            hit_vec   <= req_msg.spec_hit  ? onehot(req_msg.src) : '0;
            miss_vec  <= req_msg.spec_miss ? onehot(req_msg.src) : '0;
            unique case (req_msg.mtype)
              M_READ:    cur_typ <= RQ_READ;
              M_WRITE:   cur_typ <= RQ_WRITE;
              default:   cur_typ <= RQ_UPGRADE;
            endcase
            state     <= P_DECIDE;
          end
        end

        P_DECIDE: begin
          fetch_tgt <= d.owner;
          upg_ok    <= (cur_typ == RQ_UPGRADE) && (d.st == D_SHARED) && d.sharers[cur_pid];
          if (cur_adv) begin
            if (cur_akind == ADV_SWI) begin
              if (d.st == D_EXCL && d.owner == cur_pid) state <= P_FETCH;
              else                                      state <= P_IDLE;
            end else begin
              targets <= pushed & ~d.sharers;
              pushed  <= pushed & ~d.sharers;
              if (d.st != D_EXCL && (pushed & ~d.sharers) != '0) state <= P_SPEC;
              else                                              state <= P_IDLE;
            end
          end else if (d.st == D_EXCL && d.owner != cur_pid) begin
            state <= P_FETCH;
          end else if (cur_typ != RQ_READ && d.st == D_SHARED &&
                       (d.sharers & ~onehot(cur_pid)) != '0) begin
            targets <= d.sharers & ~onehot(cur_pid);
            state   <= P_INV;
          end else begin
            state <= P_REPLY;
          end
        end

        P_FETCH: if (fwd_ready) state <= P_WAIT;

        P_INV: if (fwd_ready) begin
          targets <= targets & ~onehot(lowest(targets));
          if ((targets & ~onehot(lowest(targets))) == '0) state <= P_WAIT;
        end

        P_WAIT: begin
          if (pending == 0) begin
            if (!cur_adv)            state <= P_REPLY;
            else if (pushed != '0) begin
              targets <= pushed;
              state   <= P_SPEC;
            end else                 state <= P_EVENT;
          end
        end

        P_REPLY: if (fwd_ready) state <= P_EVENT;

        P_SPEC: if (fwd_ready) begin
          targets <= targets & ~onehot(lowest(targets));
          if ((targets & ~onehot(lowest(targets))) == '0)
            state <= (cur_akind == ADV_SWI) ? P_EVENT : P_IDLE;
        end

        P_EVENT: if (ev_ready) state <= P_IDLE;

        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
