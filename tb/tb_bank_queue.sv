// tb_bank_queue: self-checking test of the memory bank queue.
//
// Random pushes and pops (at random waiting positions) are applied to the
// queue and to a reference list kept in arrival order. After every clock the
// queue's entries, valid bits, count and full flag must equal the reference:
// entry 0 the oldest, a pop closing the gap, a push while full refused.
module tb_bank_queue;
  import tblmi_pkg::*;

  localparam int unsigned QD = QDEPTH_DEF;
  localparam int unsigned IW = $clog2(QD);

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full;
  mem_req_t push_req;
  logic [IW-1:0] pop_idx;
  mem_req_t [QD-1:0] entries;
  logic [QD-1:0] valid;
  logic [$clog2(QD+1)-1:0] count;

  int checks = 0, failures = 0;
  mem_req_t model[$];
  int n_full_refused = 0, n_both = 0;

  bank_queue #(.QDEPTH(QD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic mem_req_t rand_req();
    mem_req_t r;
    r = mem_req_t'({$urandom, $urandom});
    return r;
  endfunction

  initial begin
    push = 0; pop = 0; pop_idx = '0; push_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // drive on the falling edge
      @(negedge clk);
      push     = ($urandom % 100) < ((cyc / 2000) % 2 ? 70 : 40);
      push_req = rand_req();
      pop      = (model.size() > 0) && (($urandom % 100) < 55);
      pop_idx  = pop ? IW'($urandom % model.size()) : '0;
      check(full == (model.size() == QD), "full flag");
      @(posedge clk);
      #1;
      // reference update: pop first, then push behind the youngest
      begin
        int sz0;
        sz0 = model.size();
        if (pop) model.delete(int'(pop_idx));
        if (push && sz0 < QD) model.push_back(push_req);
        else if (push) n_full_refused++;
      end
      if (push && pop) n_both++;
      check(int'(count) == model.size(), "count");
      for (int i = 0; i < QD; i++) begin
        check(valid[i] == (i < model.size()), "valid");
        if (i < model.size()) check(entries[i] == model[i], "entry order");
      end
    end
    check(n_full_refused > 0, "full queue refused a push at least once");
    $display("full-refused=%0d push+pop=%0d", n_full_refused, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
