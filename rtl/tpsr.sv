// tpsr: Thread Priority Storage Register of one bank memory controller.
//
// Holds the thread ranking broadcast by the Meta memory controller: N fields
// of log2(N) bits (24 bits for 8 threads), each a thread ID, ordered from the
// highest priority in the most significant field to the lowest priority in
// the least significant field. The bank keeps using the stored ranking until
// a new one arrives, so it never waits for the Meta controller.
//
// For the request selector the register is also decoded the other way round,
// into a rank per thread (0 = highest). If a word names a thread twice, which
// a correct Meta controller never sends, the lower-priority field wins.
// The reset value, thread 0 highest down to thread N-1 lowest, is this
// design's choice; it is not used for scheduling, since the warm-up quantum
// runs FCFS until the first ranking arrives.
//
// Interface: `load`/`load_word` write the register at the clock edge; `word`
// and `rank` reflect the stored value.
module tpsr
  import tblmi_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               load,
  input  logic [TPSR_W-1:0]                  load_word,
  output logic [TPSR_W-1:0]                  word,
  output logic [NUM_THREADS-1:0][PRI_W-1:0]  rank
);

  function automatic logic [TPSR_W-1:0] identity_word();
    logic [TPSR_W-1:0] w;
    for (int unsigned s = 0; s < NUM_THREADS; s++)
      w[TPSR_W-1-s*TID_W -: TID_W] = tid_t'(s);
    return w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    word <= identity_word();
    else if (load) word <= load_word;
  end

  always_comb begin
    rank = '0;
    for (int unsigned s = 0; s < NUM_THREADS; s++)
      rank[tpsr_slot(word, s)] = PRI_W'(s);
  end

endmodule
