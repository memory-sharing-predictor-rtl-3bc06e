// remote_cache: node-side coherence agent with the speculative reference bits.
//
// The remote cache is the node's repository for shared data. It is sized to
// hold every block of the shared address space (one line per global block),
// so there are no capacity or conflict misses and no replacements. Each line
// has a state (Invalid, Shared read-only, Exclusive writable), its 32 bytes of
// data and two bits for speculation: 'spec' (the line was pushed by a home
// node without being requested) and 'unref' (the local processor has not
// referenced it since). A processor read or write of a speculative line
// clears 'unref', which confirms the prediction.
//
// Processor side: one word read or write per request (cpu_req_valid/ready);
// a hit answers on cpu_resp_valid in the next cycle, a miss sends one request
// (read, write, or upgrade for a held read-only copy) to the block's home and
// blocks until the reply arrives, then answers in the cycle after the reply.
// An upgrade carries the line's speculation bits.
//
// Network side, forward messages from homes are taken whenever the one-entry
// response register is free, with priority over the processor:
//   invalidate        -> line Invalid, acknowledgement carries
//                        spec_hit = spec & ~unref, spec_miss = spec & unref;
//   fetch-invalidate  -> line Invalid, writeback with the data;
//   speculative data  -> installed as Shared with spec = unref = 1, unless the
//                        line is valid or a miss for it is outstanding, in
//                        which case the push is dropped and the outstanding
//                        request is left to the protocol;
//   replies           -> complete the outstanding miss.
//
// The reference bit, its piggy-backing on the invalidation acknowledgement
// and the dropping of a push that races with an outstanding read follow the
// document; the line organisation, the blocking miss handling and the message
// format are this design's choices.
module remote_cache
  import dsm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  pid_t   node_id,
  // processor side
  input  logic   cpu_req_valid,
  output logic   cpu_req_ready,
  input  logic   cpu_req_write,
  input  gblk_t  cpu_req_addr,
  input  wsel_t  cpu_req_word,
  input  word_t  cpu_req_wdata,
  output logic   cpu_resp_valid,
  output word_t  cpu_resp_rdata,
  // request network out
  output logic   req_valid,
  input  logic   req_ready,
  output msg_t   req_msg,
  // response network out
  output logic   rsp_valid,
  input  logic   rsp_ready,
  output msg_t   rsp_msg,
  // forward network in
  input  logic   fwd_valid,
  output logic   fwd_ready,
  input  msg_t   fwd_msg,
  // activity strobes
  output logic   st_hit,
  output logic   st_miss,
  output logic   st_spec_install,
  output logic   st_spec_drop,
  output logic   st_spec_ref
);

  typedef enum logic [1:0] {L_I = 2'd0, L_S = 2'd1, L_E = 2'd2} lstate_t;
  typedef enum logic [1:0] {C_IDLE, C_SEND, C_WAIT} cstate_t;

  lstate_t lst   [ALL_BLOCKS];
  logic    spec  [ALL_BLOCKS];
  logic    unref [ALL_BLOCKS];
  block_t  data  [ALL_BLOCKS];

  cstate_t state;
  gblk_t   p_addr;
  logic    p_write;
  wsel_t   p_word;
  word_t   p_wdata;
  mtype_t  p_mtype;
  logic    p_hit_flag;

  function automatic block_t put_word(block_t b, wsel_t w, word_t v);
    block_t r;
    r = b;
    r[w*WORD_W +: WORD_W] = v;
    return r;
  endfunction

  function automatic word_t get_word(block_t b, wsel_t w);
    return b[w*WORD_W +: WORD_W];
  endfunction

  // forward message acceptance
  gblk_t  fa;
  logic   take_fwd;
  logic   take_cpu;
  logic   pend_on_fa;
  assign fa         = fwd_msg.addr;
  assign fwd_ready  = !rsp_valid;
  assign take_fwd   = fwd_valid && fwd_ready;
  assign pend_on_fa = (state != C_IDLE) && (p_addr == fa);

  assign cpu_req_ready = (state == C_IDLE) && !fwd_valid;
  assign take_cpu      = cpu_req_valid && cpu_req_ready;

  // request message
  always_comb begin
    req_msg           = '0;
    req_msg.mtype     = p_mtype;
    req_msg.src       = node_id;
    req_msg.dst       = home_of(p_addr);
    req_msg.addr      = p_addr;
    req_msg.spec_hit  = p_hit_flag;
    req_msg.spec_miss = 1'b0;
  end
  assign req_valid = (state == C_SEND);

  lstate_t cl;
  assign cl = lst[cpu_req_addr];

  assign st_hit          = take_cpu && ((!cpu_req_write && cl != L_I) || (cpu_req_write && cl == L_E));
  assign st_miss         = take_cpu && !st_hit;
  assign st_spec_ref     = take_cpu && cl != L_I && spec[cpu_req_addr] && unref[cpu_req_addr];
  assign st_spec_install = take_fwd && fwd_msg.mtype == M_SPEC_DATA && lst[fa] == L_I && !pend_on_fa;
  assign st_spec_drop    = take_fwd && fwd_msg.mtype == M_SPEC_DATA && !(lst[fa] == L_I && !pend_on_fa);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ALL_BLOCKS); i++) begin
        lst[i]   <= L_I;
        spec[i]  <= 1'b0;
        unref[i] <= 1'b0;
      end
      state          <= C_IDLE;
      p_addr         <= '0;
      p_write        <= 1'b0;
      p_word         <= '0;
      p_wdata        <= '0;
      p_mtype        <= M_READ;
      p_hit_flag     <= 1'b0;
      rsp_valid      <= 1'b0;
      rsp_msg        <= '0;
      cpu_resp_valid <= 1'b0;
      cpu_resp_rdata <= '0;
    end else begin
      cpu_resp_valid <= 1'b0;
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;

      if (take_fwd) begin
        unique case (fwd_msg.mtype)
          M_INV: begin
            rsp_valid         <= 1'b1;
            rsp_msg           <= '0;
            rsp_msg.mtype     <= M_INV_ACK;
            rsp_msg.src       <= node_id;
            rsp_msg.dst       <= fwd_msg.src;
            rsp_msg.addr      <= fa;
            rsp_msg.spec_hit  <= (lst[fa] != L_I) && spec[fa] && !unref[fa];
            rsp_msg.spec_miss <= (lst[fa] != L_I) && spec[fa] && unref[fa];
            lst[fa]           <= L_I;
            spec[fa]          <= 1'b0;
          end
          M_FETCH_INV: begin
            rsp_valid     <= 1'b1;
            rsp_msg       <= '0;
            rsp_msg.mtype <= M_WRITEBACK;
            rsp_msg.src   <= node_id;
            rsp_msg.dst   <= fwd_msg.src;
            rsp_msg.addr  <= fa;
            rsp_msg.data  <= data[fa];
            lst[fa]       <= L_I;
            spec[fa]      <= 1'b0;
          end
          M_SPEC_DATA: begin
            if (lst[fa] == L_I && !pend_on_fa) begin
              lst[fa]   <= L_S;
              spec[fa]  <= 1'b1;
              unref[fa] <= 1'b1;
              data[fa]  <= fwd_msg.data;
            end
          end
          M_DATA_SH: begin
            lst[fa]        <= L_S;
            spec[fa]       <= 1'b0;
            data[fa]       <= fwd_msg.data;
            cpu_resp_valid <= 1'b1;
            cpu_resp_rdata <= get_word(fwd_msg.data, p_word);
            state          <= C_IDLE;
          end
          M_DATA_EX: begin
            lst[fa]        <= L_E;
            spec[fa]       <= 1'b0;
            data[fa]       <= p_write ? put_word(fwd_msg.data, p_word, p_wdata) : fwd_msg.data;
            cpu_resp_valid <= 1'b1;
            cpu_resp_rdata <= p_write ? p_wdata : get_word(fwd_msg.data, p_word);
            state          <= C_IDLE;
          end
          M_UPG_ACK: begin
            lst[fa]        <= L_E;
            spec[fa]       <= 1'b0;
            data[fa]       <= put_word(data[fa], p_word, p_wdata);
            cpu_resp_valid <= 1'b1;
            cpu_resp_rdata <= p_wdata;
            state          <= C_IDLE;
          end
          default: ;
        endcase
      end else if (take_cpu) begin
        if (!cpu_req_write && cl != L_I) begin
          cpu_resp_valid       <= 1'b1;
          cpu_resp_rdata       <= get_word(data[cpu_req_addr], cpu_req_word);
          unref[cpu_req_addr]  <= 1'b0;
        end else if (cpu_req_write && cl == L_E) begin
          cpu_resp_valid       <= 1'b1;
          cpu_resp_rdata       <= cpu_req_wdata;
          data[cpu_req_addr]   <= put_word(data[cpu_req_addr], cpu_req_word, cpu_req_wdata);
        end else begin
          p_addr     <= cpu_req_addr;
          p_write    <= cpu_req_write;
          p_word     <= cpu_req_word;
          p_wdata    <= cpu_req_wdata;
          p_mtype    <= !cpu_req_write ? M_READ : (cl == L_S ? M_UPGRADE : M_WRITE);
          p_hit_flag <= cpu_req_write && cl == L_S && spec[cpu_req_addr];
          if (cpu_req_write && cl == L_S) begin
            spec[cpu_req_addr]  <= 1'b0;
            unref[cpu_req_addr] <= 1'b0;
          end
          state      <= C_SEND;
        end
      end

      if (state == C_SEND && req_ready) state <= C_WAIT;
    end
  end

endmodule
