// tma: Total Memory Access registers of the Meta memory controller.
//
// One register per thread holds the thread's memory accesses summed over all
// banks and over every quantum since the last flush: at each quantum end the
// TMAPB counts reported by all bank controllers are added to it. This running
// history is what the thread ranking is built from.
//
// Width: sized for the worst case over the profile's lifetime of 100 million
// instructions, W = ceil(log2(T_HIT * 1e8)) = 34 bits. The registers also
// saturate, an addition of this design.
//
// The profile is flushed every 100 million instructions. Instructions are
// counted in the cores, so the flush arrives here as the `flush` input. A
// flush coinciding with a quantum end keeps only the ending quantum's counts;
// that ordering is this design's choice.
//
// Interface: `acc` (the quantum-end strobe) adds `bank_counts` at the clock
// edge; `total` shows the registers from the next cycle on.
module tma
  import tblmi_pkg::*;
#(
  parameter int unsigned W       = TMA_W_DEF,
  parameter int unsigned TMAPB_W = TMAPB_W_DEF
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        acc,
  input  logic                                        flush,
  input  logic [NUM_BANKS-1:0][NUM_THREADS-1:0][TMAPB_W-1:0] bank_counts,
  output logic [NUM_THREADS-1:0][W-1:0]               total
);

  localparam int unsigned SW = TMAPB_W + $clog2(NUM_BANKS + 1);

  logic [NUM_THREADS-1:0][W-1:0] sum_now;

  always_comb begin
    for (int unsigned t = 0; t < NUM_THREADS; t++) begin
      logic [SW-1:0]  qsum;
      logic [W:0]     full_sum;
      qsum = '0;
      for (int unsigned b = 0; b < NUM_BANKS; b++)
        qsum += SW'(bank_counts[b][t]);
      full_sum   = (flush ? '0 : {1'b0, total[t]}) + (W+1)'(qsum);
      sum_now[t] = full_sum[W] ? '1 : full_sum[W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      total <= '0;
    else if (acc)    total <= sum_now;
    else if (flush)  total <= '0;
  end

endmodule
