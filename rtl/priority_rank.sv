// priority_rank: builds the Meta-TPSR word from the threads' total accesses.
//
// Threads with fewer memory accesses get higher priority. Each thread's
// position is the number of threads that come ahead of it: those with a
// smaller total, and those with an equal total and a lower thread ID (the
// tie rule is this design's choice). Every pair is compared once, N*(N-1)/2
// comparators (the higher ID's total against the lower ID's), and each
// thread ID is then written into the TPSR field of its position, highest
// priority in the most significant field.
//
// Example with 4 threads: totals 12, 8, 31, 27 for threads 1..4 give the
// order 2, 1, 4, 3.
//
// Interface: purely combinational, `total` in, `word` (TPSR layout) and
// `rank` (position of each thread, 0 = highest) out.
module priority_rank
  import tblmi_pkg::*;
#(
  parameter int unsigned W = TMA_W_DEF
) (
  input  logic [NUM_THREADS-1:0][W-1:0]      total,
  output logic [TPSR_W-1:0]                  word,
  output logic [NUM_THREADS-1:0][PRI_W-1:0]  rank
);

  always_comb begin
    for (int unsigned i = 0; i < NUM_THREADS; i++) begin
      int unsigned n_ahead;
      n_ahead = 0;
      for (int unsigned j = 0; j < NUM_THREADS; j++)
        // one comparator per pair, total[higher ID] < total[lower ID]
        if (j < i ? !(total[i] < total[j]) : (j > i && total[j] < total[i]))
          n_ahead++;
      rank[i] = PRI_W'(n_ahead);
    end
  end

  always_comb begin
    word = '0;
    for (int unsigned i = 0; i < NUM_THREADS; i++)
      word[TPSR_W-1-int'(rank[i])*TID_W -: TID_W] = tid_t'(i);
  end

endmodule
