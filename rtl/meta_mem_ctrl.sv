// meta_mem_ctrl: the Meta memory controller of TB-LMI.
//
// It is the only place where the bank controllers' views meet. It times the
// quanta, gathers every bank's per-thread access counts at each quantum end,
// adds them to the running per-thread totals (TMA), orders the threads from
// fewest to most accesses into the Meta-TPSR word and broadcasts that word to
// the TPSR of every bank controller, which use it for the next quantum.
//
// Sequence at a quantum end (cycle 0 is the cycle `q_end` is high):
//   cycle 0: banks present their TMAPB counts and clear them at the edge;
//            the counts are added into TMA at the same edge.
//   cycle 1: the ranking of the new TMA totals is written to Meta-TPSR.
//   cycle 2: `bcast_load` is high with `bcast_word`; the banks load their
//            TPSR at the edge and use it from cycle 3 on.
// Until the first broadcast, `fcfs_mode` is high and the banks schedule FCFS
// (the warm-up quantum); it drops with the first `bcast_load`, so the banks
// switch to TB-LMI in the same cycle they receive their first ranking. The
// scheme leaves these cycle counts open, saying only that the ranking is not
// latency-critical because banks keep the previous one meanwhile; the
// two-stage timing is this design's choice.
//
// Interface: `bank_counts` from all banks; `flush` clears the profile
// history (every 100 million instructions, counted outside). Outputs go to
// all banks; `tma_total` and `meta_tpsr` are visible for observation.
module meta_mem_ctrl
  import tblmi_pkg::*;
#(
  parameter int unsigned SQ      = SQ_DEF,
  parameter int unsigned WARMUP  = WARMUP_DEF,
  parameter int unsigned TMAPB_W = TMAPB_W_DEF,
  parameter int unsigned TMA_W   = TMA_W_DEF
) (
  input  logic                                                clk,
  input  logic                                                rst_n,
  input  logic [NUM_BANKS-1:0][NUM_THREADS-1:0][TMAPB_W-1:0]  bank_counts,
  input  logic                                                flush,
  output logic                                                q_end,
  output logic                                                fcfs_mode,
  output logic                                                bcast_load,
  output logic [TPSR_W-1:0]                                   bcast_word,
  output logic [NUM_THREADS-1:0][TMA_W-1:0]                   tma_total,
  output logic [TPSR_W-1:0]                                   meta_tpsr
);

  logic [TPSR_W-1:0] ranked_word;
  logic             calc_q;  // cycle 1 of the sequence

  sq_timer #(.SQ(SQ), .WARMUP(WARMUP)) u_sq (
    .clk, .rst_n, .q_end, .warmup(), .count()
  );

  tma #(.W(TMA_W), .TMAPB_W(TMAPB_W)) u_tma (
    .clk, .rst_n, .acc(q_end), .flush, .bank_counts, .total(tma_total)
  );

  priority_rank #(.W(TMA_W)) u_rank (
    .total(tma_total), .word(ranked_word), .rank()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      calc_q     <= 1'b0;
      meta_tpsr  <= '0;
      bcast_load <= 1'b0;
      fcfs_mode  <= 1'b1;
    end else begin
      calc_q     <= q_end;
      bcast_load <= calc_q;
      if (calc_q)     meta_tpsr <= ranked_word;
      if (bcast_load) fcfs_mode <= 1'b0;
    end
  end

  assign bcast_word = meta_tpsr;

endmodule
