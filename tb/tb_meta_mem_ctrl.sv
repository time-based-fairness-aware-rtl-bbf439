// tb_meta_mem_ctrl: self-checking test of the Meta memory controller.
//
// Short quanta (warm-up 80 cycles, SQ 50). The first two quantum ends carry
// the worked example's bank profiles (cores 1..4 = threads 0..3; threads
// 4..7 given larger counts so they rank last):
//   warm-up end: bank 0 = 10, 2, 21, 15; bank 1 = 2, 6, 10, 12
//                -> totals 12, 8, 31, 27, order 2, 1, 4, 3
//   next end:    bank 0 = 5, 17, 3, 2;   bank 1 = 7, 10, 11, 1
//                -> totals 24, 35, 45, 30, order 1, 4, 2, 3
// after which the counts are random and a profile flush is applied. The
// reference checks quantum-end spacing, the TMA totals, that the broadcast
// comes exactly two cycles after each quantum end with the ranking of the
// new totals, and that FCFS mode ends with the first broadcast.
module tb_meta_mem_ctrl;
  import tblmi_pkg::*;

  localparam int unsigned PW = TMAPB_W_DEF;
  localparam int unsigned TW = TMA_W_DEF;
  localparam int unsigned SQ = 50, WU = 80;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_BANKS-1:0][NUM_THREADS-1:0][PW-1:0] bank_counts;
  logic flush, q_end, fcfs_mode, bcast_load;
  logic [TPSR_W-1:0] bcast_word, meta_tpsr;
  logic [NUM_THREADS-1:0][TW-1:0] tma_total;

  int checks = 0, failures = 0;
  longint model[NUM_THREADS];
  int n_qend = 0, n_bcast = 0;
  longint cyc = 0;

  meta_mem_ctrl #(.SQ(SQ), .WARMUP(WU)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic logic [TPSR_W-1:0] ranking();
    int ord[NUM_THREADS];
    logic [TPSR_W-1:0] w;
    for (int i = 0; i < NUM_THREADS; i++) ord[i] = i;
    for (int i = 0; i < NUM_THREADS; i++)
      for (int j = i + 1; j < NUM_THREADS; j++)
        if (model[ord[j]] < model[ord[i]] || (model[ord[j]] == model[ord[i]] && ord[j] < ord[i])) begin
          int k; k = ord[i]; ord[i] = ord[j]; ord[j] = k;
        end
    w = '0;
    for (int s = 0; s < NUM_THREADS; s++) w = (w << TID_W) | TPSR_W'(ord[s]);
    return w;
  endfunction

  task automatic set_example(input int q);
    bank_counts = '0;
    if (q == 0) begin
      bank_counts[0][0] = 10; bank_counts[0][1] = 2; bank_counts[0][2] = 21; bank_counts[0][3] = 15;
      bank_counts[1][0] = 2;  bank_counts[1][1] = 6; bank_counts[1][2] = 10; bank_counts[1][3] = 12;
      for (int t = 4; t < NUM_THREADS; t++) bank_counts[2][t] = PW'(100 + t);
    end else begin
      bank_counts[0][0] = 5; bank_counts[0][1] = 17; bank_counts[0][2] = 3;  bank_counts[0][3] = 2;
      bank_counts[1][0] = 7; bank_counts[1][1] = 10; bank_counts[1][2] = 11; bank_counts[1][3] = 1;
    end
  endtask

  longint last_qend = -1;
  logic [TPSR_W-1:0] exp_word[$];
  longint exp_at[$];

  initial begin
    flush = 0;
    foreach (model[t]) model[t] = 0;
    set_example(0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n_qend < 25) begin
      // checks in the middle of cycle `cyc`
      check(q_end == (cyc == WU || (cyc > WU && (cyc - WU) % SQ == 0)), "quantum end position");
      check(fcfs_mode == (n_bcast == 0), "FCFS mode until the first broadcast");
      for (int t = 0; t < NUM_THREADS; t++) check(longint'(tma_total[t]) == model[t], "TMA total");
      if (exp_at.size() > 0 && exp_at[0] == cyc) begin
        check(bcast_load, "broadcast two cycles after quantum end");
        check(bcast_word == exp_word[0], $sformatf("broadcast word %h expected %h", bcast_word, exp_word[0]));
        void'(exp_at.pop_front());
        void'(exp_word.pop_front());
      end else check(!bcast_load, "no stray broadcast");
      if (bcast_load) n_bcast++;
      if (n_qend == 2) flush = 1; else flush = 0;
      if (q_end) begin
        n_qend++;
        for (int t = 0; t < NUM_THREADS; t++) begin
          longint s; s = 0;
          for (int b = 0; b < NUM_BANKS; b++) s += longint'(bank_counts[b][t]);
          model[t] = (flush ? 0 : model[t]) + s;
        end
        exp_word.push_back(ranking());
        exp_at.push_back(cyc + 2);
        if (n_qend == 1) check(ranking()[TPSR_W-1 -: 12] == {3'd1, 3'd0, 3'd3, 3'd2}, "example order 2,1,4,3");
        if (n_qend == 2) check(ranking()[TPSR_W-1 -: 12] == {3'd0, 3'd3, 3'd1, 3'd2}, "example order 1,4,2,3");
      end else if (flush) foreach (model[t]) model[t] = 0;
      @(negedge clk);
      cyc++;
      // counts for the next quantum end
      if (n_qend == 1) set_example(1);
      else if (n_qend >= 2)
        for (int b = 0; b < NUM_BANKS; b++)
          for (int t = 0; t < NUM_THREADS; t++) bank_counts[b][t] = PW'($urandom % 40);
    end
    $display("quantum ends=%0d broadcasts=%0d", n_qend, n_bcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
