// tb_tpsr: self-checking test of the Thread Priority Storage Register.
//
// After reset the register must hold thread 0 in the highest field down to
// thread 7 in the lowest. Random permutations are then loaded (and random
// cycles without load must keep the value); the per-thread rank decode must
// give each thread the index of the field that names it, counted from the
// most significant field. The worked example's ranking 2, 1, 4, 3 is included.
module tb_tpsr;
  import tblmi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load;
  logic [TPSR_W-1:0] load_word, word;
  logic [NUM_THREADS-1:0][PRI_W-1:0] rank;

  int checks = 0, failures = 0;
  int order[NUM_THREADS], held[NUM_THREADS];

  tpsr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [TPSR_W-1:0] pack(input int o[NUM_THREADS]);
    logic [TPSR_W-1:0] w;
    w = '0;
    for (int s = 0; s < NUM_THREADS; s++) w = (w << TID_W) | TPSR_W'(o[s]);
    return w;
  endfunction

  task automatic check_held();
    check(word == pack(held), "stored word");
    for (int s = 0; s < NUM_THREADS; s++)
      check(int'(rank[held[s]]) == s, "rank decode");
  endtask

  initial begin
    load = 0; load_word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < NUM_THREADS; s++) held[s] = s;
    check_held();
    // example ranking of cores 2, 1, 4, 3 (threads 1, 0, 3, 2), then 4..7
    order = '{1, 0, 3, 2, 4, 5, 6, 7};
    load = 1; load_word = pack(order);
    @(negedge clk);
    held = order;
    check_held();
    check(rank[1] == 0 && rank[0] == 1 && rank[3] == 2 && rank[2] == 3, "example ranks");
    for (int c = 0; c < 5000; c++) begin
      for (int s = 0; s < NUM_THREADS; s++) order[s] = s;
      order.shuffle();
      load = ($urandom % 3) == 0;
      load_word = pack(order);
      @(negedge clk);
      if (load) held = order;
      check_held();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
