// tblmi_pkg: shared configuration, types and helper functions of the TB-LMI
// (Time-Based Least Memory Intensive) memory scheduler.
//
// The system has one bank memory controller per DRAM bank and one Meta memory
// controller. Every request that reaches a bank controller carries the ID of
// the thread (core) that issued it, so that the controllers can count how many
// accesses each thread received and rank the threads by that count.
//
// Configuration values that shape the request format (thread count, bank count,
// address field widths) live here as package constants, so every module agrees
// on the request struct. Values that do not change the format (queue depth,
// quantum length, DRAM latencies, first-ready threshold) are module parameters
// whose defaults are the constants below.
//
// From the evaluated system: 8 cores with one thread each, 4 DRAM banks with
// one controller per bank, 8-entry bank queues, row-hit/closed/conflict
// latencies of 108/140/216 cycles, a schedule quantum (SQ) of 1M cycles, a
// 20-bit SQ register, TMAPB sized as log2(SQ / hit latency) and TMA as
// log2(hit latency * 1e8 instructions), 3 thread-ID bits per request and a
// first-ready threshold of 1. This design's own choices: 256 rows per bank
// (8 row bits), 32 cache blocks per row (5 column bits), a 6-bit request tag,
// a warm-up quantum as long as SQ, and ties in the ranking broken toward the
// lower thread ID.
package tblmi_pkg;

  // ---------------------------------------------------------------- system
  localparam int unsigned NUM_THREADS = 8;   // one thread per core, 8 cores
  localparam int unsigned NUM_BANKS   = 4;   // one controller per bank
  localparam int unsigned TID_W       = $clog2(NUM_THREADS);  // 3 bits
  localparam int unsigned BANK_W      = $clog2(NUM_BANKS);    // 2 bits

  // ------------------------------------------------------- address fields
  // Block address (64-byte cache blocks) = { row, bank, column }.
  localparam int unsigned ROW_W  = 8;        // 256 rows per bank
  localparam int unsigned COL_W  = 5;        // 32 blocks per row
  localparam int unsigned ADDR_W = ROW_W + BANK_W + COL_W;
  localparam int unsigned TAG_W  = 6;        // requester's own tag, returned

  // ------------------------------------------------------------ timing
  localparam int unsigned T_HIT_DEF      = 108;  // row buffer hit
  localparam int unsigned T_CLOSED_DEF   = 140;  // row buffer closed
  localparam int unsigned T_CONFLICT_DEF = 216;  // row buffer conflict

  // ---------------------------------------------------------- scheduling
  localparam int unsigned QDEPTH_DEF = 8;          // bank queue entries
  localparam int unsigned SQ_DEF     = 1_000_000;  // schedule quantum, cycles
  localparam int unsigned WARMUP_DEF = SQ_DEF;     // warm-up quantum, cycles
  localparam int unsigned FRT_DEF    = 1;          // first-ready threshold
  localparam longint unsigned MAX_INSTR = 64'd100_000_000;  // TMA flush period

  // Counter widths from the worst cases of the sizing equations.
  localparam int unsigned TMAPB_W_DEF = $clog2(SQ_DEF / T_HIT_DEF + 1);      // 14
  localparam int unsigned TMA_W_DEF   = $clog2(longint'(T_HIT_DEF) * MAX_INSTR); // 34
  localparam int unsigned PRI_W       = TID_W;       // a rank is a thread slot
  localparam int unsigned TPSR_W      = NUM_THREADS * TID_W;  // 24 bits

  // ------------------------------------------------------------- types
  typedef logic [TID_W-1:0] tid_t;
  typedef logic [ROW_W-1:0] row_t;
  typedef logic [COL_W-1:0] col_t;
  typedef logic [TAG_W-1:0] tag_t;

  // A request as it sits in a bank queue.
  typedef struct packed {
    tid_t tid;   // issuing thread (the added log2(N) bits)
    row_t row;
    col_t col;
    logic we;    // 1 = write back, 0 = read
    tag_t tag;
  } mem_req_t;

  // How the bank found its row buffer when an access started.
  typedef enum logic [1:0] {
    RB_HIT      = 2'd0,
    RB_CLOSED   = 2'd1,
    RB_CONFLICT = 2'd2
  } rb_kind_e;

  // Which rule picked a request.
  typedef enum logic [1:0] {
    PICK_FCFS   = 2'd0,   // warm-up quantum: oldest request
    PICK_LEVEL1 = 2'd1,   // oldest row buffer hit
    PICK_LEVEL2 = 2'd2    // oldest request of the highest-priority thread
  } pick_e;

  // Thread ID stored in TPSR slot s; slot 0 is the most significant field,
  // the highest-priority thread.
  function automatic tid_t tpsr_slot(input logic [TPSR_W-1:0] w, input int unsigned s);
    return w[TPSR_W-1-s*TID_W -: TID_W];
  endfunction

endpackage
