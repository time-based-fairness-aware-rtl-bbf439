// tb_tblmi_workloads: the evaluated workload classes on the TB-LMI memory
// system, one tblmi_workload_run per workload and queue size, all in
// parallel on one clock.
//
// The evaluation ran 8-core workloads with all eight threads memory
// intensive ("mem") or half of them ("mix"), and 4-core workloads of the same
// two kinds, with 8-, 16-, 24- and 32-entry bank queues. Here every kind runs
// with the 8-entry queue of the main configuration and with a 32-entry queue,
// and the 4-core mix also with 16 entries. Real benchmark traces are not
// available to a testbench, so each thread is a synthetic miss stream of the
// intensity its class stands for (see tblmi_workload_run). The schedule
// quantum and warm-up are shortened to 50k cycles, and each run covers the
// warm-up and four quanta. The test passes when every run's reference checks
// and workload-level checks pass.
module tb_tblmi_workloads;
  import tblmi_pkg::*;

  localparam int NRUN = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NRUN-1:0] fin;
  int ch[NRUN], fl[NRUN];

  tblmi_workload_run #(.NAME("8mem/q8"),  .NCORES(8), .NMEM(8), .QD(8),  .SEED(11)) r0 (.clk, .finished(fin[0]), .checks_o(ch[0]), .failures_o(fl[0]));
  tblmi_workload_run #(.NAME("8mix/q8"),  .NCORES(8), .NMEM(4), .QD(8),  .SEED(12)) r1 (.clk, .finished(fin[1]), .checks_o(ch[1]), .failures_o(fl[1]));
  tblmi_workload_run #(.NAME("8mem/q32"), .NCORES(8), .NMEM(8), .QD(32), .SEED(13)) r2 (.clk, .finished(fin[2]), .checks_o(ch[2]), .failures_o(fl[2]));
  tblmi_workload_run #(.NAME("8mix/q32"), .NCORES(8), .NMEM(4), .QD(32), .SEED(14)) r3 (.clk, .finished(fin[3]), .checks_o(ch[3]), .failures_o(fl[3]));
  tblmi_workload_run #(.NAME("4mem/q8"),  .NCORES(4), .NMEM(4), .QD(8),  .SEED(15)) r4 (.clk, .finished(fin[4]), .checks_o(ch[4]), .failures_o(fl[4]));
  tblmi_workload_run #(.NAME("4mix/q8"),  .NCORES(4), .NMEM(2), .QD(8),  .SEED(16)) r5 (.clk, .finished(fin[5]), .checks_o(ch[5]), .failures_o(fl[5]));
  tblmi_workload_run #(.NAME("4mix/q16"), .NCORES(4), .NMEM(2), .QD(16), .SEED(17)) r6 (.clk, .finished(fin[6]), .checks_o(ch[6]), .failures_o(fl[6]));

  function automatic void report(input int extra);
    int c, f;
    c = 0; f = extra;
    for (int i = 0; i < NRUN; i++) begin
      c += ch[i];
      f += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin
    wait (&fin);
    report(0);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end
endmodule
