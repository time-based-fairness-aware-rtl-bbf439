// tblmi_select: the TB-LMI request selection of one bank memory controller.
//
// Purely combinational. Given the waiting requests of a bank queue (entry 0
// is the oldest), the bank's open row and the per-thread ranks decoded from
// the bank's TPSR, it names the request to serve next:
//   warm-up (fcfs=1): the oldest request (FCFS), used while no thread
//                     profile exists yet;
//   level 1:          the oldest row buffer hit, if l1_en and one exists;
//   level 2:          among the requests of the highest-priority thread that
//                     has any request waiting, the oldest. Rank 0 is the
//                     highest priority. Taking the minimum rank over the
//                     waiting requests is the same as walking the TPSR from
//                     high to low until a thread with a waiting request is
//                     found.
// After a run of first-ready-threshold (FRT) row hits the bank controller
// drops l1_en and raises prefer_miss: level 2 is then applied to the requests
// that are not row hits, if any wait, so that a row conflict is served next.
// The first-ready (FR) bit of each entry, set when the entry's row is the
// open row, is computed here from the open row instead of being stored in the
// queue; both give the same bits.
//
// Interface: `sel_valid` is high when any request waits; `sel_idx` is its
// queue index, `sel_pick` the rule that chose it and `sel_hit` its FR bit.
module tblmi_select
  import tblmi_pkg::*;
#(
  parameter int unsigned QDEPTH = QDEPTH_DEF,
  localparam int unsigned IDX_W = (QDEPTH > 1) ? $clog2(QDEPTH) : 1
) (
  input  mem_req_t [QDEPTH-1:0]      entries,
  input  logic     [QDEPTH-1:0]      valid,
  input  logic                       row_open,
  input  row_t                       open_row,
  input  logic [NUM_THREADS-1:0][PRI_W-1:0] rank,   // per thread, 0 = highest
  input  logic                       fcfs,
  input  logic                       l1_en,
  input  logic                       prefer_miss,
  output logic                       sel_valid,
  output logic [IDX_W-1:0]           sel_idx,
  output pick_e                      sel_pick,
  output logic                       sel_hit,
  output logic [QDEPTH-1:0]          fr_bits
);

  logic [QDEPTH-1:0]        is_best;
  logic [QDEPTH-1:0]        cand;      // level-2 candidates
  logic [PRI_W-1:0]         best_rank;
  logic [QDEPTH-1:0][PRI_W-1:0] ent_rank;

  always_comb begin
    for (int unsigned i = 0; i < QDEPTH; i++) begin
      fr_bits[i]  = valid[i] && row_open && (entries[i].row == open_row);
      ent_rank[i] = rank[entries[i].tid];
    end
  end

  // Highest priority (lowest rank) among the level-2 candidates.
  always_comb begin
    cand = (prefer_miss && |(valid & ~fr_bits)) ? (valid & ~fr_bits) : valid;
    best_rank = '1;
    for (int unsigned i = 0; i < QDEPTH; i++)
      if (cand[i] && ent_rank[i] < best_rank) best_rank = ent_rank[i];
    for (int unsigned i = 0; i < QDEPTH; i++)
      is_best[i] = cand[i] && (ent_rank[i] == best_rank);
  end

  function automatic logic [IDX_W-1:0] first_set(input logic [QDEPTH-1:0] v);
    first_set = '0;
    for (int i = QDEPTH - 1; i >= 0; i--)
      if (v[i]) first_set = IDX_W'(i);
  endfunction

  always_comb begin
    sel_valid = |valid;
    if (fcfs) begin
      sel_idx  = '0;
      sel_pick = PICK_FCFS;
    end else if (l1_en && |fr_bits) begin
      sel_idx  = first_set(fr_bits);
      sel_pick = PICK_LEVEL1;
    end else begin
      sel_idx  = first_set(is_best);
      sel_pick = PICK_LEVEL2;
    end
    sel_hit = fr_bits[sel_idx];
  end

endmodule
