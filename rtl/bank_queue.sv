// bank_queue: the memory bank queue in front of one DRAM bank.
//
// Waiting requests are kept in arrival order: entry 0 is always the oldest and
// a new request is written behind the youngest valid entry. The scheduler may
// take any entry, not only the head; the entries behind it then move up by one
// place, so age order is kept without age stamps and "the oldest request that
// matches" is simply the lowest matching index.
//
// When every entry is taken, `full` is raised. The requester (the L2 cache)
// must then hold its miss; it is stalled until an entry frees. This matches
// the limited bank queue of the evaluated system, where a full bank queue
// stalls L2, which stalls L1 and the cores. Whether a push may enter in the
// same cycle as a pop from a full queue is not specified; here it may not, so
// `full` depends on state only.
//
// Interface: push/push_req write a request (ignored while full); pop/pop_idx
// remove one entry; both may happen in one cycle. All entries and their valid
// bits are visible to the scheduler. Timing: a pushed request is visible from
// the next cycle; pop and push take effect at the same clock edge.
module bank_queue
  import tblmi_pkg::*;
#(
  parameter int unsigned QDEPTH = QDEPTH_DEF,
  localparam int unsigned IDX_W = (QDEPTH > 1) ? $clog2(QDEPTH) : 1,
  localparam int unsigned CNT_W = $clog2(QDEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // enqueue side
  input  logic                  push,
  input  mem_req_t              push_req,
  output logic                  full,
  // dequeue side
  input  logic                  pop,
  input  logic [IDX_W-1:0]      pop_idx,
  // scheduler view
  output mem_req_t [QDEPTH-1:0] entries,
  output logic     [QDEPTH-1:0] valid,
  output logic     [CNT_W-1:0]  count
);

  mem_req_t [QDEPTH-1:0] q_d;
  logic     [CNT_W-1:0]  cnt_q, cnt_d;
  logic                  do_push;

  assign full    = (cnt_q == CNT_W'(QDEPTH));
  assign do_push = push && !full;
  assign count   = cnt_q;

  always_comb begin
    int unsigned n_after_pop;
    q_d         = entries;
    n_after_pop = int'(cnt_q);
    if (pop && (int'(pop_idx) < int'(cnt_q))) begin
      for (int unsigned i = 0; i < QDEPTH - 1; i++)
        if (i >= int'(pop_idx)) q_d[i] = entries[i+1];
      n_after_pop = int'(cnt_q) - 1;
    end
    if (do_push) q_d[n_after_pop] = push_req;
    cnt_d = CNT_W'(n_after_pop + (do_push ? 1 : 0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entries <= '0;
      cnt_q   <= '0;
    end else begin
      entries <= q_d;
      cnt_q   <= cnt_d;
    end
  end

  always_comb
    for (int unsigned i = 0; i < QDEPTH; i++) valid[i] = (i < int'(cnt_q));

  // A pop must name a waiting entry.
  always_ff @(posedge clk)
    if (rst_n && pop)
      a_pop_valid: assert (int'(pop_idx) < int'(cnt_q))
        else $error("bank_queue: pop of empty entry %0d", pop_idx);

endmodule
