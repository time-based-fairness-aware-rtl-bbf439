// tmapb: Thread Memory Access Per Bank counters of one bank memory controller.
//
// One counter per thread counts the requests of that thread this bank has
// scheduled in the current quantum. At the end of the warm-up quantum and of
// every schedule quantum (SQ) the counters are reported to the Meta memory
// controller and cleared.
//
// Width: the worst case is a single thread that hits the open row on every
// access of one bank for a whole quantum, SQ / T_HIT accesses, so W =
// ceil(log2(SQ / T_HIT)) (14 bits for 1M cycles and 108-cycle hits). The
// counters also saturate, which this design adds so a shorter hit latency
// than planned cannot wrap them.
//
// Interface: `inc`/`inc_tid` count one scheduled request. `clear` is the
// quantum-end strobe. `count` always shows the registers, so in the cycle of
// `clear` it holds the complete profile of the ending quantum. An `inc` in the
// `clear` cycle is counted toward the new quantum.
module tmapb
  import tblmi_pkg::*;
#(
  parameter int unsigned W = TMAPB_W_DEF
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               inc,
  input  tid_t                               inc_tid,
  input  logic                               clear,
  output logic [NUM_THREADS-1:0][W-1:0]      count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else begin
      for (int unsigned t = 0; t < NUM_THREADS; t++) begin
        if (clear)
          count[t] <= (inc && inc_tid == tid_t'(t)) ? W'(1) : '0;
        else if (inc && inc_tid == tid_t'(t) && count[t] != '1)
          count[t] <= count[t] + W'(1);
      end
    end
  end

endmodule
