// tb_sq_timer: self-checking test of the SQ register.
//
// Two instances run side by side. A short one (warm-up 37 cycles, SQ 23)
// is checked cycle by cycle against a reference counter: `q_end` exactly
// when the register reads zero after a wrap, `warmup` until the first
// quantum end. A full-size one (1M-cycle warm-up and SQ, 20-bit register)
// must raise its first three quantum ends exactly 1M, 2M and 3M cycles
// after reset.
module tb_sq_timer;
  import tblmi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic q_end_s, warmup_s, q_end_f, warmup_f;
  logic [5:0]  count_s;
  logic [19:0] count_f;

  int checks = 0, failures = 0;

  sq_timer #(.SQ(23), .WARMUP(37)) dut_s (.clk, .rst_n, .q_end(q_end_s), .warmup(warmup_s), .count(count_s));
  sq_timer dut_f (.clk, .rst_n, .q_end(q_end_f), .warmup(warmup_f), .count(count_f));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint cyc = 0;      // cycles since reset release
  int ends_f = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    forever begin
      longint exp_cnt;
      bit exp_end, exp_warm;
      // short instance reference
      if (cyc < 37) begin exp_cnt = cyc; exp_end = (cyc == 0) ? 0 : 0; exp_warm = 1; end
      else begin exp_cnt = (cyc - 37) % 23; exp_end = (exp_cnt == 0); exp_warm = (cyc == 37); end
      check(longint'(count_s) == exp_cnt, "short count");
      check(q_end_s == exp_end, "short q_end");
      check(warmup_s == exp_warm, "short warmup");
      // full-size instance
      check(q_end_f == (cyc > 0 && cyc % 1_000_000 == 0), "full q_end position");
      if (q_end_f) begin
        ends_f++;
        check(warmup_f == (ends_f == 1), "full warmup flag");
        if (ends_f == 3) begin
          check(cyc == 3_000_000, "third quantum end at 3M cycles");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
      @(negedge clk);
      cyc++;
    end
  end

  initial begin
    repeat (3_100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
