// tb_bank_mem_ctrl: self-checking test of the bank memory controller.
//
// Three controllers run under random traffic, each with its own reference
// model (bank_ctrl_checker): the evaluated first-ready threshold FRT = 1,
// FRT = 2, and FRT = 0 (level 1 off). Traffic alternates between light and
// heavy phases so that the queue both drains and fills; the first 3000
// cycles are the FCFS warm-up. Every rule and row buffer class must occur.
module tb_bank_mem_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  int c[3], f[3], l1[3], l2[3], fc[3], lim[3], st[3];
  logic fin[3];
  int checks, failures;

  always #5 clk = ~clk;

  bank_ctrl_checker #(.FRT(1), .SEED(11)) u1 (.clk, .rst_n, .checks(c[0]), .failures(f[0]),
    .finished(fin[0]), .n_level1(l1[0]), .n_level2(l2[0]), .n_fcfs(fc[0]), .n_frt_limit(lim[0]),
    .n_stall(st[0]));
  bank_ctrl_checker #(.FRT(2), .SEED(22)) u2 (.clk, .rst_n, .checks(c[1]), .failures(f[1]),
    .finished(fin[1]), .n_level1(l1[1]), .n_level2(l2[1]), .n_fcfs(fc[1]), .n_frt_limit(lim[1]),
    .n_stall(st[1]));
  bank_ctrl_checker #(.FRT(0), .SEED(33)) u0 (.clk, .rst_n, .checks(c[2]), .failures(f[2]),
    .finished(fin[2]), .n_level1(l1[2]), .n_level2(l2[2]), .n_fcfs(fc[2]), .n_frt_limit(lim[2]),
    .n_stall(st[2]));

  task automatic report(input int extra);
    checks = c[0] + c[1] + c[2] + 6;
    failures = f[0] + f[1] + f[2] + extra;
    for (int i = 0; i < 3; i++)
      $display("inst %0d: fcfs=%0d level1=%0d level2=%0d frt-limit=%0d stalls=%0d",
               i, fc[i], l1[i], l2[i], lim[i], st[i]);
    if (!(l1[0] > 0 && l2[0] > 0 && fc[0] > 0)) failures++;
    if (!(lim[0] > 0 && lim[1] > 0)) failures++;
    if (!(l1[2] == 0)) failures++;
    if (!(st[0] > 0)) failures++;
    if (!(u1.n_kind[0] > 0 && u1.n_kind[1] > 0 && u1.n_kind[2] > 0)) failures++;
    if (!(fin[0] && fin[1] && fin[2])) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    report(0);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end
endmodule
