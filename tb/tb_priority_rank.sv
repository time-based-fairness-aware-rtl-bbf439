// tb_priority_rank: self-checking test of the thread ranking.
//
// The reference sorts the thread IDs by (total, thread ID) with a plain
// insertion sort and packs them highest priority first. Random totals drawn
// from a small range (many ties) and from the full range are applied, plus
// the two profiles of the worked example: totals 12, 8, 31, 27 must give
// cores 2, 1, 4, 3 and totals 24, 35, 45, 30 cores 1, 4, 2, 3.
module tb_priority_rank;
  import tblmi_pkg::*;

  localparam int unsigned W = TMA_W_DEF;

  logic [NUM_THREADS-1:0][W-1:0]     total;
  logic [TPSR_W-1:0]                 word;
  logic [NUM_THREADS-1:0][PRI_W-1:0] rank;

  int checks = 0, failures = 0;

  priority_rank #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (check %0d)", what, checks);
    end
  endtask

  task automatic evaluate();
    int ord[NUM_THREADS];
    logic [TPSR_W-1:0] w;
    for (int i = 0; i < NUM_THREADS; i++) ord[i] = i;
    for (int i = 1; i < NUM_THREADS; i++) begin
      int j, k;
      k = ord[i];
      j = i - 1;
      while (j >= 0 && (total[ord[j]] > total[k] || (total[ord[j]] == total[k] && ord[j] > k))) begin
        ord[j+1] = ord[j];
        j--;
      end
      ord[j+1] = k;
    end
    w = '0;
    for (int s = 0; s < NUM_THREADS; s++) w = (w << TID_W) | TPSR_W'(ord[s]);
    #1;
    check(word == w, $sformatf("word %h expected %h", word, w));
    for (int s = 0; s < NUM_THREADS; s++) check(int'(rank[ord[s]]) == s, "rank");
  endtask

  initial begin
    // worked example, cores 1..4 = threads 0..3; threads 4..7 busier
    total = '0;
    total[0] = 12; total[1] = 8; total[2] = 31; total[3] = 27;
    for (int t = 4; t < NUM_THREADS; t++) total[t] = W'(100 + t);
    evaluate();
    check(word[TPSR_W-1 -: 4*TID_W] == {3'd1, 3'd0, 3'd3, 3'd2}, "example: cores 2,1,4,3");
    total[0] = 24; total[1] = 35; total[2] = 45; total[3] = 30;
    evaluate();
    check(word[TPSR_W-1 -: 4*TID_W] == {3'd0, 3'd3, 3'd1, 3'd2}, "example: cores 1,4,2,3");
    for (int c = 0; c < 20000; c++) begin
      for (int t = 0; t < NUM_THREADS; t++)
        total[t] = (c % 2) ? W'($urandom % 5) : W'({$urandom, $urandom});
      evaluate();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
