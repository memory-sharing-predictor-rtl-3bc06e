// dsm_pkg: sizes, message formats and predictor record layouts shared by the
// speculative DSM.
//
// The machine has NODES nodes (16), each the home of HOME_BLOCKS coherence
// blocks of BLOCK_BYTES bytes (32). A global block number is the home node id
// in its upper bits followed by the block index inside that home.
//
// Coherence traffic travels on three message classes: requests (node to home),
// forwards (home to node: invalidations, data, speculative data) and responses
// (node to home: invalidation acknowledgements and writebacks). All three use
// the same msg_t record.
//
// The predictor encodes a request type in two bits and a processor in four
// bits; a read sequence is a 16-bit reader vector. A pattern-table entry stores
// one 2-bit key type, one 2-bit prediction type, one 16-bit field (the reader
// vector, or the predicted writer when no vector is involved) and one 4-bit
// processor id, i.e. 24 bits, plus a valid bit and the speculative
// write-invalidate disable bit.
//
// Node count, block size, type and id widths and the 24-bit entry layout come
// from the document; the number of blocks per home, the pattern-table size and
// the message encoding are this design's own choices.
package dsm_pkg;

  localparam int unsigned NODES       = 16;
  localparam int unsigned PID_W       = $clog2(NODES);
  localparam int unsigned HOME_BLOCKS = 256;
  localparam int unsigned LBLK_W      = $clog2(HOME_BLOCKS);
  localparam int unsigned GBLK_W      = PID_W + LBLK_W;
  localparam int unsigned ALL_BLOCKS  = NODES * HOME_BLOCKS;
  localparam int unsigned BLOCK_BYTES = 32;
  localparam int unsigned BLOCK_W     = BLOCK_BYTES * 8;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned WORDS       = BLOCK_W / WORD_W;
  localparam int unsigned WSEL_W      = $clog2(WORDS);

  typedef logic [PID_W-1:0]   pid_t;
  typedef logic [NODES-1:0]   nvec_t;
  typedef logic [LBLK_W-1:0]  lblk_t;
  typedef logic [GBLK_W-1:0]  gblk_t;
  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [WSEL_W-1:0]  wsel_t;

  // Request types: two bits for three requests.
  typedef enum logic [1:0] {
    RQ_NONE    = 2'd0,
    RQ_READ    = 2'd1,
    RQ_WRITE   = 2'd2,
    RQ_UPGRADE = 2'd3
  } req_t;

  typedef enum logic [3:0] {
    M_READ      = 4'd0,   // request:  read-only copy wanted
    M_WRITE     = 4'd1,   // request:  writable copy wanted
    M_UPGRADE   = 4'd2,   // request:  write to a held read-only copy
    M_INV       = 4'd3,   // forward:  drop your read-only copy
    M_FETCH_INV = 4'd4,   // forward:  drop your writable copy and write it back
    M_DATA_SH   = 4'd5,   // forward:  read-only copy (reply)
    M_DATA_EX   = 4'd6,   // forward:  writable copy (reply)
    M_UPG_ACK   = 4'd7,   // forward:  upgrade granted, no data
    M_SPEC_DATA = 4'd8,   // forward:  speculatively pushed read-only copy
    M_INV_ACK   = 4'd9,   // response: copy dropped
    M_WRITEBACK = 4'd10   // response: copy dropped, data returned
  } mtype_t;

  typedef struct packed {
    mtype_t mtype;
    pid_t   src;
    pid_t   dst;
    gblk_t  addr;
    logic   spec_hit;   // dropped copy had been pushed speculatively and was referenced
    logic   spec_miss;  // dropped copy had been pushed speculatively and never referenced
    block_t data;
  } msg_t;

  // Directory entry: full-map write-invalidate states of the document.
  typedef enum logic [1:0] {
    D_IDLE   = 2'd0,
    D_SHARED = 2'd1,
    D_EXCL   = 2'd2
  } dstate_t;

  typedef struct packed {
    dstate_t st;
    pid_t    owner;
    nvec_t   sharers;
  } dir_entry_t;

  // History-table entry (18 bits of message plus a valid bit). For a read
  // sequence 'field' is the reader vector, otherwise its low bits hold the
  // requesting processor.
  typedef struct packed {
    logic  valid;
    req_t  typ;
    nvec_t field;
  } hist_t;

  // Pattern-table entry. If key_t is a read, 'vec' is the key's reader vector
  // and 'id' the predicted writer; otherwise 'id' is the key's writer and
  // 'vec' the prediction (reader vector, or writer id in the low bits).
  typedef struct packed {
    logic  valid;
    logic  swi_off;     // a previous early invalidation after this write was premature
    req_t  ktyp;
    req_t  ptyp;
    nvec_t vec;
    pid_t  id;
  } pte_t;

  // Protocol engine -> predictor: what the protocol has just done.
  typedef enum logic {
    EV_REQ = 1'b0,     // a request was served
    EV_SWI = 1'b1      // an early write invalidation was carried out
  } ev_kind_t;

  typedef struct packed {
    ev_kind_t kind;
    req_t     typ;
    pid_t     pid;
    lblk_t    blk;
    nvec_t    spec_hit;   // speculative copies found referenced while serving it
    nvec_t    spec_miss;  // speculative copies found unreferenced
  } msp_ev_t;

  // Predictor -> protocol engine: advice.
  typedef enum logic {
    ADV_SPEC_READ = 1'b0,  // push read-only copies to 'readers'
    ADV_SWI       = 1'b1   // take the writable copy from 'owner', then push to 'readers'
  } adv_kind_t;

  typedef struct packed {
    adv_kind_t kind;
    lblk_t     blk;
    pid_t      owner;
    nvec_t     readers;
  } msp_adv_t;

  // Per-node activity strobes (one cycle each), brought out for counting.
  typedef struct packed {
    logic       hit;           // processor access hit in the remote cache
    logic       miss;          // processor access sent a request
    logic       spec_install;  // pushed copy installed
    logic       spec_drop;     // pushed copy dropped (raced with own request or already held)
    logic       spec_ref;      // first reference to a pushed copy
    logic       inv;           // home sent an invalidation
    logic       fetch;         // home fetched back a writable copy
    logic       spec_push;     // home pushed a speculative copy
    logic       swi_done;      // home completed an early write invalidation
    logic       adv_stale;     // home dropped stale advice
    logic [1:0] pred;          // predictions checked
    logic [1:0] correct;       // ... of which correct
    logic       fr;            // first-read trigger fired
    logic       swi;           // SWI trigger fired
    logic       premature;     // premature early invalidation detected
    logic       remove;        // mispredicted pattern entry removed
    logic       adv_lost;      // advice replaced before being taken
  } node_stats_t;

  function automatic pid_t home_of(gblk_t a);
    return a[GBLK_W-1 -: PID_W];
  endfunction

  function automatic lblk_t lblk_of(gblk_t a);
    return a[LBLK_W-1:0];
  endfunction

endpackage
