// tb_tmapb: self-checking test of the per-bank thread access counters.
//
// Random scheduled-request events and quantum-end strobes are applied. A
// reference array counts per thread; at a strobe the counts must show the
// whole ending quantum, and an event in the strobe cycle must be counted in
// the new quantum. A small-width instance is driven into saturation.
module tb_tmapb;
  import tblmi_pkg::*;

  localparam int unsigned W = TMAPB_W_DEF;

  logic clk = 1'b0, rst_n = 1'b0;
  logic inc, clear;
  tid_t inc_tid;
  logic [NUM_THREADS-1:0][W-1:0] count;
  logic [NUM_THREADS-1:0][2:0] count_s;   // 3-bit instance

  int checks = 0, failures = 0;
  int model[NUM_THREADS], model_s[NUM_THREADS];
  int n_clear = 0, n_sat = 0;

  tmapb #(.W(W)) dut (.*);
  tmapb #(.W(3)) dut_s (.clk, .rst_n, .inc, .inc_tid, .clear(1'b0), .count(count_s));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    inc = 0; clear = 0; inc_tid = '0;
    foreach (model[t]) begin model[t] = 0; model_s[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      inc     = ($urandom % 100) < 60;
      inc_tid = tid_t'(($urandom % 3 == 0) ? 0 : $urandom % NUM_THREADS);
      clear   = ($urandom % 500) == 0;
      for (int t = 0; t < NUM_THREADS; t++) begin
        check(int'(count[t]) == model[t], "count");
        check(int'(count_s[t]) == model_s[t], "saturating count");
      end
      if (clear) begin
        n_clear++;
        foreach (model[t]) model[t] = 0;
      end
      if (inc) begin
        model[inc_tid]++;
        if (model_s[inc_tid] < 7) model_s[inc_tid]++;
        else n_sat++;
      end
    end
    check(n_clear > 10 && n_sat > 0, "clears and saturation exercised");
    $display("clears=%0d saturated=%0d", n_clear, n_sat);
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
