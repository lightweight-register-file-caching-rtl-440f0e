// Shared constants and types of the collector-unit register-file cache.
//
// The register file of one streaming multiprocessor is split into banks of
// warp-wide (32 threads x 32 bit = 1024 bit) registers. Operand collector
// units are turned into small caches ("caching collector units", CCUs): each
// CCU keeps a cache table (CT) of CT_SIZE warp registers, tagged by the 8-bit
// register number, with a lock bit, a 1-bit reuse-distance hint (near/far)
// and a 3-bit LRU age per entry, plus an operand collector table (OCT) whose
// NSRC slots point into the CT.
//
// Numbers that follow the design description: 1024-bit data, 8-bit tags,
// 1-bit reuse hint, 3-bit LRU, CT of 8 entries, 7 source operand slots,
// 8 banks, 8 CCUs, 32 warps, a 256 KB register file, 10000-cycle STHLD
// intervals. Own choices: the 8-bit opcode field, the register-to-bank
// mapping (see bank_of/row_of), two writeback slots per cycle and the IPC
// comparison threshold.
package malekeh_pkg;

  // ---- architectural sizes -------------------------------------------
  localparam int unsigned DATA_W     = 1024; // warp register: 32 threads x 32 bit
  localparam int unsigned NSRC       = 7;    // source operand slots (HMMA needs 7)
  localparam int unsigned TAG_W      = 8;    // register number, 1 byte
  localparam int unsigned CT_SIZE    = 8;    // cache table entries per CCU
  localparam int unsigned CT_IDX_W   = 3;    // OCT index field
  localparam int unsigned LRU_W      = 3;    // LRU age field
  localparam int unsigned NUM_WARPS  = 32;   // 1024 threads / 32
  localparam int unsigned WARP_W     = 5;
  localparam int unsigned NUM_CCU    = 8;
  localparam int unsigned NUM_BANKS  = 8;
  localparam int unsigned BANK_W     = 3;
  localparam int unsigned REGS_PER_WARP = 64; // 256 KB / (32 warps * 128 B)
  localparam int unsigned BANK_ROWS  = NUM_WARPS * REGS_PER_WARP / NUM_BANKS; // 256
  localparam int unsigned ROW_W      = 8;
  localparam int unsigned NUM_WB     = 2;    // writeback slots per cycle
  localparam int unsigned OPC_W      = 8;
  localparam int unsigned STHLD_W    = 8;
  localparam int unsigned INTERVAL   = 10000; // cycles per STHLD interval

  typedef logic [WARP_W-1:0]   warp_t;
  typedef logic [TAG_W-1:0]    regnum_t;
  typedef logic [DATA_W-1:0]   data_t;
  typedef logic [CT_IDX_W-1:0] ctidx_t;
  typedef logic [BANK_W-1:0]   bank_t;
  typedef logic [ROW_W-1:0]    row_t;

  // one source operand of an issued instruction; near is the compiler's
  // 1-bit reuse-distance hint (1 = next reuse closer than RTHLD)
  typedef struct packed {
    logic    valid;
    regnum_t num;
    logic    near;
  } src_t;

  typedef struct packed {
    logic [OPC_W-1:0]   opcode;
    logic               dst_valid;
    regnum_t            dst;
    logic               dst_near;
    src_t [NSRC-1:0]    src;
  } instr_t;

  // writeback from the execution units
  typedef struct packed {
    logic    valid;
    warp_t   warp;
    regnum_t num;
    logic    near;
    data_t   data;
  } wb_t;

  // read request from a CCU to the register-file banks
  typedef struct packed {
    logic    valid;
    warp_t   warp;
    regnum_t num;
    ctidx_t  idx;   // CT entry that waits for the value
  } rdreq_t;

  // port S: a source operand value returned by a bank
  typedef struct packed {
    logic   valid;
    ctidx_t idx;
    data_t  data;
  } sport_t;

  // port D: a destination value the arbiter lets through to a CCU
  typedef struct packed {
    logic    valid;
    regnum_t num;
    data_t   data;
  } dport_t;

  // register number of a write that bypassed the CCU (only to the banks)
  typedef struct packed {
    logic    valid;
    regnum_t num;
  } inval_t;

  // port R: what a CCU tells the issue scheduler and the CCU allocator
  typedef struct packed {
    logic  owned;    // CT holds data of `warp`
    warp_t warp;
    logic  busy;     // an instruction waits in the CCU (not dispatched yet)
    logic  has_near; // minimum reuse distance of live values is "near"
  } rport_t;

  localparam int unsigned WB_IDX_W = 1;
  typedef logic [WB_IDX_W-1:0] wbidx_t;

  // arbiter -> crossbar: bank whose read data goes to a CCU's port S
  typedef struct packed {
    logic   valid;
    bank_t  bank;
    ctidx_t idx;
  } sroute_t;

  // arbiter -> crossbar: writeback slot whose data goes to a CCU's port D
  // (or to a bank's write port)
  typedef struct packed {
    logic   valid;
    wbidx_t slot;
  } wsel_t;

  // register-to-bank mapping: consecutive registers of a warp in
  // consecutive banks, skewed by the warp number
  function automatic bank_t bank_of(warp_t w, regnum_t r);
    return bank_t'(w) + bank_t'(r);
  endfunction

  function automatic row_t row_of(warp_t w, regnum_t r);
    return row_t'({w, r[5:3]});
  endfunction

endpackage
