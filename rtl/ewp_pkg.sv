// ewp_pkg: sizes, operation codes and bundle types shared by the embedded
// way prediction LLC bank.
//
// A 2MB tile has four 512KB banks. A bank holds 512 sets of 16 ways with
// 64-byte blocks. Each data row stores the 512-bit block and 11 ECC bits.
// The CAM next to each data sub-array compares a 7-bit partial tag (the low
// tag bits) plus one inhibit bit. These numbers follow the original design. The
// 32-bit tag, the 49-bit physical address and the 6/15-cycle split of the
// tag and data pipelines are this design's choices.
package ewp_pkg;

  localparam int unsigned NUM_BANKS  = 4;
  localparam int unsigned NUM_SETS   = 512;
  localparam int unsigned NUM_WAYS   = 16;
  localparam int unsigned NUM_MATS   = NUM_WAYS / 2;
  localparam int unsigned SET_W      = $clog2(NUM_SETS);   // 9
  localparam int unsigned WAY_W      = $clog2(NUM_WAYS);   // 4
  localparam int unsigned BANK_W     = $clog2(NUM_BANKS);  // 2
  localparam int unsigned OFFS_W     = 6;                  // 64B blocks
  localparam int unsigned TAG_W      = 32;
  localparam int unsigned PADDR_W    = TAG_W + SET_W + BANK_W + OFFS_W; // 49
  localparam int unsigned PTAG_W     = 7;
  localparam int unsigned DATA_W     = 512;
  localparam int unsigned ECC_W      = 11;
  localparam int unsigned CW_W       = DATA_W + ECC_W;     // 523
  localparam int unsigned SA_ROWS    = 256;                // rows per sub-array
  localparam int unsigned CAM_ROWS   = SA_ROWS / 2;        // top / bottom CAM
  localparam int unsigned ID_W       = 8;
  localparam int unsigned SLOT_W     = 2;                  // in-flight predictions
  localparam int unsigned TAG_LAT    = 6;
  localparam int unsigned DATA_LAT   = 15;

  typedef logic [TAG_W-1:0]    tag_t;
  typedef logic [SET_W-1:0]    set_idx_t;
  typedef logic [WAY_W-1:0]    way_t;
  typedef logic [PTAG_W-1:0]   ptag_t;
  typedef logic [NUM_WAYS-1:0] wayvec_t;
  typedef logic [DATA_W-1:0]   block_t;
  typedef logic [CW_W-1:0]     cw_t;

  typedef enum logic [1:0] {
    OP_READ  = 2'd0,  // load / instruction fetch from an L1 miss
    OP_WRITE = 2'd1,  // write-back of a whole block into a present line
    OP_FILL  = 2'd2,  // allocate a block returned from memory
    OP_INVAL = 2'd3   // coherence invalidation
  } op_e;

  // What a data-pipeline operation is for; travels with it through the H-tree.
  typedef enum logic [1:0] {
    DK_PRED  = 2'd0,  // way-predicted read issued in parallel with the tags
    DK_SEQ   = 2'd1,  // sequential read of the hit way
    DK_EVICT = 2'd2,  // read-out of a dirty block being evicted or invalidated
    DK_NONE  = 2'd3   // write or CAM update only; nothing is returned
  } dkind_e;

  // Outcome of a read lookup, in the terms used to judge prediction accuracy.
  typedef enum logic [2:0] {
    CLS_PRED_UNIQUE    = 3'd0,  // hit, one matching partial tag, predicted
    CLS_PRED_COLLISION = 3'd1,  // hit, several matches, inhibit bits chose right
    CLS_NOPRED_MISS    = 3'd2,  // miss, no way activated
    CLS_MISPRED        = 3'd3,  // hit, wrong way or none activated
    CLS_OVERPRED_MISS  = 3'd4   // miss, a way was activated anyway
  } cls_e;

  typedef struct packed {
    tag_t tag;
    logic valid;
    logic dirty;
    logic inh;      // copy of the inhibit bit held in the data-array CAM
  } way_entry_t;

  typedef struct packed {
    way_entry_t [NUM_WAYS-1:0]   way;
    logic [NUM_WAYS-1:0][WAY_W-1:0] age;  // 0 = most recently used
  } tag_set_t;

  // One operation on the data arrays. The comparison lines carry the partial
  // tag to every way's CAM and one inhibit comparison line per way; the CAM
  // write fields update entries of the addressed set at the end of the cycle.
  typedef struct packed {
    logic     en;
    set_idx_t set;
    ptag_t    ptag;
    wayvec_t  inh_cmp;
    logic     wr;
    cw_t      wdata;
    wayvec_t  cam_we_ptag;
    ptag_t    cam_ptag;
    wayvec_t  cam_we_inh;
    wayvec_t  cam_inh;
  } dp_op_t;

  typedef struct packed {
    dkind_e            kind;
    logic [SLOT_W-1:0] slot;
    logic [ID_W-1:0]   id;
    tag_t              tag;
    set_idx_t          set;
  } dp_meta_t;

  typedef enum logic [2:0] {
    TR_READ_MISS  = 3'd0,
    TR_WRITE_ACK  = 3'd1,
    TR_WRITE_MISS = 3'd2,
    TR_FILL_ACK   = 3'd3,   // dirty=1: an eviction data response follows
    TR_INVAL_ACK  = 3'd4    // dirty=1: the block's data follows
  } tresp_e;

  typedef enum logic {
    DR_READ  = 1'b0,
    DR_EVICT = 1'b1
  } dresp_e;

  // One-cycle event pulses of a bank, for accuracy and mechanism counters.
  typedef struct packed {
    logic pred_unique;
    logic pred_collision;
    logic nopred_miss;
    logic mispred;
    logic overpred_miss;
    logic pred_skipped;     // read found the data pipeline busy: no prediction
    logic inh_update;       // an operation rewrote CAM inhibit bits
    logic forced_access;    // sequential access by forced CAM match
    logic eviction;
    logic ecc_corrected;
  } bank_stats_t;

endpackage
