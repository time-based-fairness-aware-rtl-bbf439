// bank_mem_ctrl: the memory controller of one DRAM bank under TB-LMI.
//
// Each bank acts as a separate memory with its own controller. Requests for
// the bank wait in its queue; whenever the bank is free and a request waits,
// the controller schedules one:
//   - during the warm-up quantum (fcfs_mode), the oldest request;
//   - otherwise level 1: the oldest row buffer hit;
//   - if there is none, level 2: the oldest request of the thread with the
//     highest priority in the bank's TPSR, i.e. the thread with the fewest
//     memory accesses so far.
// Level 1 may serve at most FRT row hits in a row (FRT = 1 in the evaluated
// design). After FRT successive level-1 picks, the next pick is made by
// level 2 among the requests that are not row hits, if any wait; the run
// counter then restarts. FRT = 0 turns level 1 off. The run counter counts
// up to FRT, so at FRT = 1 it is a single flip-flop.
//
// Every scheduled request increments its thread's TMAPB counter. At each
// quantum end (`q_end` from the Meta controller) the counters are reported
// through `counts` and cleared; the ranking that comes back is loaded into
// the TPSR on `tpsr_load`. The bank never waits for it: it keeps the previous
// ranking until the new one arrives.
//
// Interface: request in through req_valid/req/req_ready (req_ready low means
// the queue is full and the requester must stall). `iss_*` report each
// scheduled request in the cycle it is taken from the queue, with the row
// buffer class of its access and the rule that picked it. `done`/`done_req`
// report the end of the access LAT cycles later (LAT from the class). The
// read data path belongs to the DRAM device and is not modelled.
// Timing: a request pushed at edge t can be scheduled in the cycle after t;
// scheduling takes no extra cycle beyond the bank's access latency, so back-
// to-back accesses follow each other every LAT cycles.
module bank_mem_ctrl
  import tblmi_pkg::*;
#(
  parameter int unsigned QDEPTH     = QDEPTH_DEF,
  parameter int unsigned T_HIT      = T_HIT_DEF,
  parameter int unsigned T_CLOSED   = T_CLOSED_DEF,
  parameter int unsigned T_CONFLICT = T_CONFLICT_DEF,
  parameter int unsigned FRT        = FRT_DEF,
  parameter int unsigned TMAPB_W    = TMAPB_W_DEF,
  localparam int unsigned IDX_W = (QDEPTH > 1) ? $clog2(QDEPTH) : 1,
  localparam int unsigned CNT_W = $clog2(QDEPTH + 1),
  localparam int unsigned FRC_W = (FRT > 0) ? $clog2(FRT + 1) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // requests from the L2 cache
  input  logic                                 req_valid,
  input  mem_req_t                             req,
  output logic                                 req_ready,
  // Meta memory controller
  input  logic                                 q_end,
  input  logic                                 fcfs_mode,
  input  logic                                 tpsr_load,
  input  logic [TPSR_W-1:0]                    tpsr_word,
  output logic [NUM_THREADS-1:0][TMAPB_W-1:0]  counts,
  // scheduled request (one-cycle event)
  output logic                                 iss_valid,
  output mem_req_t                             iss_req,
  output rb_kind_e                             iss_kind,
  output pick_e                                iss_pick,
  // end of the access
  output logic                                 done,
  output mem_req_t                             done_req,
  // observation
  output logic [CNT_W-1:0]                     q_count,
  output logic [TPSR_W-1:0]                    tpsr_q
);

  mem_req_t [QDEPTH-1:0] entries;
  logic     [QDEPTH-1:0] valid;
  logic                  full;
  logic                  row_open;
  row_t                  open_row;
  logic                  bank_ready;
  logic [NUM_THREADS-1:0][PRI_W-1:0] rank;

  logic                  sel_valid;
  logic [IDX_W-1:0]      sel_idx;
  pick_e                 sel_pick;
  logic                  sel_hit;
  logic [FRC_W-1:0]      run_q;     // successive level-1 picks
  logic                  l1_en;

  assign req_ready = !full;

  bank_queue #(.QDEPTH(QDEPTH)) u_queue (
    .clk, .rst_n,
    .push(req_valid), .push_req(req), .full,
    .pop(iss_valid), .pop_idx(sel_idx),
    .entries, .valid, .count(q_count)
  );

  tpsr u_tpsr (
    .clk, .rst_n, .load(tpsr_load), .load_word(tpsr_word),
    .word(tpsr_q), .rank
  );

  assign l1_en = (FRT != 0) && (int'(run_q) < FRT);

  tblmi_select #(.QDEPTH(QDEPTH)) u_sel (
    .entries, .valid, .row_open, .open_row, .rank,
    .fcfs(fcfs_mode), .l1_en, .prefer_miss(FRT != 0 && !l1_en),
    .sel_valid, .sel_idx, .sel_pick, .sel_hit, .fr_bits()
  );

  assign iss_valid = sel_valid && bank_ready;
  assign iss_req   = entries[sel_idx];
  assign iss_pick  = sel_pick;

  bank_timing #(.T_HIT(T_HIT), .T_CLOSED(T_CLOSED), .T_CONFLICT(T_CONFLICT)) u_bank (
    .clk, .rst_n, .start(iss_valid), .start_row(iss_req.row),
    .kind(iss_kind), .ready(bank_ready), .done, .row_open, .open_row
  );

  tmapb #(.W(TMAPB_W)) u_tmapb (
    .clk, .rst_n, .inc(iss_valid), .inc_tid(iss_req.tid), .clear(q_end),
    .count(counts)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q    <= '0;
      done_req <= '0;
    end else if (iss_valid) begin
      done_req <= iss_req;
      run_q    <= (sel_pick == PICK_LEVEL1) ? run_q + FRC_W'(1) : '0;
    end
  end

  // The FR bit of the chosen entry agrees with the class the bank reports.
  always_ff @(posedge clk)
    if (rst_n && iss_valid)
      a_hit_kind: assert (sel_hit == (iss_kind == RB_HIT))
        else $error("bank_mem_ctrl: FR bit and row buffer class disagree");

endmodule
