// rdc_pkg: shared constants and types of the reconfigurable L1 data cache (RDC).
//
// The geometry follows the cache the design is built around: 48-bit physical
// addresses, 64-byte lines, 4 ways, 256 tag entries per way (8 index bits,
// A13..A6) and 128 data rows per way, each row holding two lines (upper and
// lower cells). The tag is 35 bits wide (A47..A13) in both modes, so A13 is
// held in the tag as well as used as the most significant index bit.
//
// The 3-bit operation code {a,b,c} drives the per-way control signal
// generator in TM mode. In general purpose mode the decoder itself forces
// a=1, b=A6, c=0, so the code given by the controller only matters in TM mode.
// The code points follow the decoder's control equations; which unused code
// points stay unused is this design's choice.
package rdc_pkg;

  localparam int unsigned ADDR_W     = 48;
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;   // 512 e-cells per row
  localparam int unsigned OFFSET_W   = 6;
  localparam int unsigned INDEX_W    = 8;                // A13..A6
  localparam int unsigned TAG_W      = ADDR_W - 13;      // A47..A13 = 35 bits
  localparam int unsigned WAYS       = 4;
  localparam int unsigned TAG_ROWS   = 256;
  localparam int unsigned DATA_ROWS  = 128;
  localparam int unsigned WORD_W     = 64;               // CPU access width
  localparam int unsigned WORD_BYTES = WORD_W / 8;

  // {a,b,c} operation codes used in TM mode.
  typedef enum logic [2:0] {
    OP_STOREALL = 3'b000,   // copy every upper cell to its lower cell
    OP_ULWRITE  = 3'b001,   // WL1 and WL2 together
    OP_UPPER    = 3'b100,   // WL1: URead / UWrite
    OP_LOWER    = 3'b110,   // WL2: LRead / LWrite
    OP_RESTORE  = 3'b011,   // lower -> upper of one line
    OP_STORE    = 3'b111    // upper -> lower of one line
  } cell_op_e;

  // Per-line tag entry.
  typedef struct packed {
    logic             valid;
    logic             dirty;  // line holds data newer than the next level
    logic             txw;    // written by the running transaction (write-set)
    logic             vsc;    // Valid Shadow Copy: lower cells hold a committed value
    logic [TAG_W-1:0] tag;
  } tag_entry_t;

  // CPU side requests.
  typedef enum logic [2:0] {
    REQ_LOAD     = 3'd0,
    REQ_STORE    = 3'd1,
    REQ_TX_BEGIN = 3'd2,
    REQ_TX_COMMIT= 3'd3,
    REQ_TX_ABORT = 3'd4,
    REQ_SET_MODE = 3'd5
  } req_op_e;

  // Requests towards the next level (L2).
  typedef enum logic [1:0] {
    MEM_READ     = 2'd0,  // line fill
    MEM_WRITE    = 2'd1,  // write back a committed / non-transactional value
    MEM_WRITE_TX = 2'd2   // spill a transactionally modified value
  } mem_cmd_e;

  // One-cycle event pulses, one per mechanism, for performance counting.
  typedef struct packed {
    logic hit;          // load/store hit
    logic miss;         // load/store miss
    logic storeall;     // StoreAll at transaction begin
    logic ulwrite;      // fill that created a shadow copy
    logic uwrite_fill;  // fill without shadow copy
    logic store;        // per-line Store at lazy commit
    logic restore;      // per-line Restore at abort
    logic abort_inval;  // write-set line without shadow copy dropped at abort
    logic vsc_clear;    // commit-time flash clear of VSC bits
    logic log;          // shadow copy written to the log
    logic shadow_wb;    // committed shadow copy written back (lazy eviction)
    logic spill_tx;     // transactional value sent to the next level
    logic evict_wb;     // ordinary dirty write-back on eviction
    logic fwd_lread;    // forwarded request served from the shadow copy
    logic fwd_nack;     // forwarded request refused (write-set conflict)
    logic flush_wb;     // write-back during the mode-switch flush
    logic mode_switch;  // TMM changed
  } rdc_events_t;

endpackage
