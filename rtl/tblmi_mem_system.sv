// tblmi_mem_system: a banked main-memory controller with TB-LMI scheduling.
//
// Top level. The L2 cache sends its misses here; each miss carries the ID of
// the thread that caused it. The block address is split into row, bank and
// column, and the request goes to the memory controller of its bank. There
// are NUM_BANKS (4) bank controllers, each scheduling its own bank
// independently, and one Meta memory controller that, every schedule quantum,
// collects the per-thread access counts of all banks, ranks the threads from
// least to most memory-intensive and broadcasts one ranking to every bank.
//
// Address map (this design's choice): block address = { row, bank, column },
// so consecutive cache blocks stay in one row of one bank.
//
// Interface:
//   req_*      one request per cycle from the L2 cache; req_ready is low while
//              the addressed bank's queue is full, and the L2 must hold the
//              request (this is the stall that reaches L2, L1 and the cores).
//   flush      clears the Meta controller's profile history; the cores raise
//              it every 100 million instructions.
//   iss_*      per bank: a request was taken from the queue and its DRAM
//              access started (row buffer class and picking rule included).
//   done_*     per bank: the access of done_req ended; a read's data would be
//              returned to the L2 now.
//   observation: queue occupancy, TPSR of every bank, Meta-TPSR, TMA totals,
//              quantum-end strobe and warm-up (FCFS) mode.
// Timing: see bank_mem_ctrl and meta_mem_ctrl; the router adds no cycle.
module tblmi_mem_system
  import tblmi_pkg::*;
#(
  parameter int unsigned QDEPTH     = QDEPTH_DEF,
  parameter int unsigned T_HIT      = T_HIT_DEF,
  parameter int unsigned T_CLOSED   = T_CLOSED_DEF,
  parameter int unsigned T_CONFLICT = T_CONFLICT_DEF,
  parameter int unsigned FRT        = FRT_DEF,
  parameter int unsigned SQ         = SQ_DEF,
  parameter int unsigned WARMUP     = WARMUP_DEF,
  parameter int unsigned TMAPB_W    = TMAPB_W_DEF,
  parameter int unsigned TMA_W      = TMA_W_DEF,
  localparam int unsigned CNT_W = $clog2(QDEPTH + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // L2 request port
  input  logic                                  req_valid,
  input  tid_t                                  req_tid,
  input  logic [ADDR_W-1:0]                     req_addr,
  input  logic                                  req_we,
  input  tag_t                                  req_tag,
  output logic                                  req_ready,
  // profile flush from the cores
  input  logic                                  flush,
  // per-bank events
  output logic     [NUM_BANKS-1:0]              iss_valid,
  output mem_req_t [NUM_BANKS-1:0]              iss_req,
  output rb_kind_e [NUM_BANKS-1:0]              iss_kind,
  output pick_e    [NUM_BANKS-1:0]              iss_pick,
  output logic     [NUM_BANKS-1:0]              done,
  output mem_req_t [NUM_BANKS-1:0]              done_req,
  // observation
  output logic [NUM_BANKS-1:0][CNT_W-1:0]       q_count,
  output logic [NUM_BANKS-1:0][TPSR_W-1:0]      bank_tpsr,
  output logic [TPSR_W-1:0]                     meta_tpsr,
  output logic [NUM_THREADS-1:0][TMA_W-1:0]     tma_total,
  output logic                                  q_end,
  output logic                                  fcfs_mode
);

  // ---------------------------------------------------------- request routing
  logic [BANK_W-1:0] bank_sel;
  mem_req_t          req_s;
  logic [NUM_BANKS-1:0] bank_ready;

  assign bank_sel  = req_addr[COL_W +: BANK_W];
  assign req_s.tid = req_tid;
  assign req_s.row = req_addr[COL_W + BANK_W +: ROW_W];
  assign req_s.col = req_addr[COL_W-1:0];
  assign req_s.we  = req_we;
  assign req_s.tag = req_tag;
  assign req_ready = bank_ready[bank_sel];

  // -------------------------------------------------------------- Meta link
  logic [NUM_BANKS-1:0][NUM_THREADS-1:0][TMAPB_W-1:0] bank_counts;
  logic                                               bcast_load;
  logic [TPSR_W-1:0]                                  bcast_word;

  meta_mem_ctrl #(
    .SQ(SQ), .WARMUP(WARMUP), .TMAPB_W(TMAPB_W), .TMA_W(TMA_W)
  ) u_meta (
    .clk, .rst_n, .bank_counts, .flush,
    .q_end, .fcfs_mode, .bcast_load, .bcast_word, .tma_total, .meta_tpsr
  );

  // ------------------------------------------------------ bank controllers
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    bank_mem_ctrl #(
      .QDEPTH(QDEPTH), .T_HIT(T_HIT), .T_CLOSED(T_CLOSED),
      .T_CONFLICT(T_CONFLICT), .FRT(FRT), .TMAPB_W(TMAPB_W)
    ) u_bank (
      .clk, .rst_n,
      .req_valid(req_valid && bank_sel == BANK_W'(b)), .req(req_s),
      .req_ready(bank_ready[b]),
      .q_end, .fcfs_mode, .tpsr_load(bcast_load), .tpsr_word(bcast_word),
      .counts(bank_counts[b]),
      .iss_valid(iss_valid[b]), .iss_req(iss_req[b]), .iss_kind(iss_kind[b]),
      .iss_pick(iss_pick[b]), .done(done[b]), .done_req(done_req[b]),
      .q_count(q_count[b]), .tpsr_q(bank_tpsr[b])
    );
  end

endmodule
