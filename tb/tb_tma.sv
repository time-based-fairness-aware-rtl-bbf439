// tb_tma: self-checking test of the Meta controller's Total Memory Access
// registers.
//
// Random per-bank, per-thread quantum counts are presented with random
// quantum-end (`acc`) and `flush` strobes. A 64-bit reference adds the four
// banks' counts to each thread's running total at every strobe, clears it on
// a flush (keeping the ending quantum when both coincide) and saturates at
// the register width. A narrow instance is driven into saturation.
module tb_tma;
  import tblmi_pkg::*;

  localparam int unsigned W  = TMA_W_DEF;
  localparam int unsigned PW = TMAPB_W_DEF;

  logic clk = 1'b0, rst_n = 1'b0;
  logic acc, flush;
  logic [NUM_BANKS-1:0][NUM_THREADS-1:0][PW-1:0] bank_counts;
  logic [NUM_THREADS-1:0][W-1:0]  total;
  logic [NUM_THREADS-1:0][15:0]   total_s;

  int checks = 0, failures = 0;
  longint model[NUM_THREADS], model_s[NUM_THREADS];
  int n_acc = 0, n_flush = 0, n_sat = 0;

  tma #(.W(W), .TMAPB_W(PW)) dut (.*);
  tma #(.W(16), .TMAPB_W(PW)) dut_s (.clk, .rst_n, .acc, .flush(1'b0), .bank_counts, .total(total_s));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    acc = 0; flush = 0; bank_counts = '0;
    foreach (model[t]) begin model[t] = 0; model_s[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int t = 0; t < NUM_THREADS; t++) begin
        check(longint'(total[t]) == model[t], "total");
        check(longint'(total_s[t]) == model_s[t], "saturating total");
      end
      for (int b = 0; b < NUM_BANKS; b++)
        for (int t = 0; t < NUM_THREADS; t++)
          bank_counts[b][t] = PW'(($urandom % 4 == 0) ? (1 << PW) - 1 : $urandom);
      acc   = ($urandom % 3) == 0;
      flush = ($urandom % 40) == 0;
      if (acc) n_acc++;
      if (flush) n_flush++;
      for (int t = 0; t < NUM_THREADS; t++) begin
        longint s;
        s = 0;
        for (int b = 0; b < NUM_BANKS; b++) s += longint'(bank_counts[b][t]);
        if (acc) begin
          model[t] = (flush ? 0 : model[t]) + s;
          if (model[t] > (64'd1 << W) - 1) model[t] = (64'd1 << W) - 1;
          model_s[t] = model_s[t] + s;
          if (model_s[t] > 65535) begin model_s[t] = 65535; n_sat++; end
        end else if (flush) model[t] = 0;
      end
    end
    check(n_acc > 0 && n_flush > 0 && n_sat > 0, "strobes and saturation exercised");
    $display("acc=%0d flush=%0d saturated=%0d", n_acc, n_flush, n_sat);
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
