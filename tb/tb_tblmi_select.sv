// tb_tblmi_select: self-checking test of the TB-LMI request selection.
//
// Random queue contents (random occupancy, threads and rows drawn from small
// sets so that hits and shared threads are common), a random open row and a
// random thread ranking are applied. The reference walks the ranking from the
// highest-priority thread down, as the scheme describes it: warm-up takes
// entry 0; level 1 the first (oldest) row hit; otherwise the oldest request
// of the first thread in the ranking that has one waiting (restricted to
// non-hits when prefer_miss is set and a non-hit waits). Three fixed cases
// are added: a row hit waits; no hit and the top thread waits; no hit and
// the top thread has nothing queued, so the second thread is served.
module tb_tblmi_select;
  import tblmi_pkg::*;

  localparam int unsigned QD = QDEPTH_DEF;
  localparam int unsigned IW = $clog2(QD);

  mem_req_t [QD-1:0] entries;
  logic [QD-1:0] valid;
  logic row_open, fcfs, l1_en, prefer_miss;
  row_t open_row;
  logic [NUM_THREADS-1:0][PRI_W-1:0] rank;
  logic sel_valid, sel_hit;
  logic [IW-1:0] sel_idx;
  pick_e sel_pick;
  logic [QD-1:0] fr_bits;

  int checks = 0, failures = 0;
  int order[NUM_THREADS];     // order[s] = thread in slot s (0 = highest)
  int n_pick[3] = '{0, 0, 0};

  tblmi_select #(.QDEPTH(QD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (case %0d)", what, checks);
    end
  endtask

  task automatic set_order();
    for (int s = 0; s < NUM_THREADS; s++) rank[order[s]] = PRI_W'(s);
  endtask

  task automatic evaluate();
    int n, exp_idx;
    pick_e exp_pick;
    bit any_hit, any_miss, hit;
    #1;
    n = 0;
    for (int i = 0; i < QD; i++) if (valid[i]) n++;
    any_hit = 0; any_miss = 0;
    for (int i = 0; i < n; i++) begin
      hit = row_open && entries[i].row == open_row;
      check(fr_bits[i] == hit, "FR bit");
      if (hit) any_hit = 1; else any_miss = 1;
    end
    check(sel_valid == (n > 0), "sel_valid");
    if (n == 0) return;
    exp_idx = -1;
    if (fcfs) begin
      exp_idx = 0; exp_pick = PICK_FCFS;
    end else if (l1_en && any_hit) begin
      exp_pick = PICK_LEVEL1;
      for (int i = n - 1; i >= 0; i--)
        if (row_open && entries[i].row == open_row) exp_idx = i;
    end else begin
      exp_pick = PICK_LEVEL2;
      for (int s = 0; s < NUM_THREADS && exp_idx < 0; s++)
        for (int i = 0; i < n && exp_idx < 0; i++) begin
          hit = row_open && entries[i].row == open_row;
          if (int'(entries[i].tid) == order[s] && !(prefer_miss && any_miss && hit))
            exp_idx = i;
        end
    end
    check(int'(sel_idx) == exp_idx, $sformatf("index %0d expected %0d", sel_idx, exp_idx));
    check(sel_pick == exp_pick, "rule");
    check(sel_hit == (row_open && entries[exp_idx].row == open_row), "sel_hit");
    n_pick[int'(exp_pick)]++;
  endtask

  // A queue entry for a fixed case: thread (1-based core number) and row.
  function automatic mem_req_t ent(input int core, input int row);
    mem_req_t r;
    r = '0;
    r.tid = tid_t'(core - 1);
    r.row = row_t'(row);
    return r;
  endfunction

  initial begin
    // ---- fixed cases: 4 cores, ranking 2, 1, 4, 3 (then threads 5..8)
    order = '{1, 0, 3, 2, 4, 5, 6, 7};
    set_order();
    fcfs = 0; l1_en = 1; prefer_miss = 0; row_open = 1; open_row = row_t'(9);
    valid = '0; entries = '0;
    // (a) the oldest row hit (core 4) is served first
    entries[0] = ent(3, 1); entries[1] = ent(4, 9); entries[2] = ent(2, 5);
    entries[3] = ent(4, 9); valid[3:0] = '1;
    evaluate();
    check(sel_idx == IW'(1) && sel_pick == PICK_LEVEL1, "scenario a");
    // (b) no hit: oldest request of core 2
    entries[1] = ent(4, 2); entries[3] = ent(2, 7);
    evaluate();
    check(sel_idx == IW'(2) && sel_pick == PICK_LEVEL2, "scenario b");
    // (c) no hit and nothing from core 2: oldest request of core 1
    entries[2] = ent(1, 4); entries[3] = ent(1, 3);
    evaluate();
    check(sel_idx == IW'(2), "scenario c");

    // ---- random cases
    for (int c = 0; c < 20000; c++) begin
      int n;
      for (int s = 0; s < NUM_THREADS; s++) order[s] = s;
      order.shuffle();
      set_order();
      n = $urandom % (QD + 1);
      valid = '0;
      for (int i = 0; i < QD; i++) begin
        entries[i] = mem_req_t'({$urandom, $urandom});
        entries[i].tid = tid_t'($urandom % NUM_THREADS);
        entries[i].row = row_t'($urandom % 4);
        valid[i] = (i < n);
      end
      row_open    = ($urandom % 8) != 0;
      open_row    = row_t'($urandom % 4);
      fcfs        = ($urandom % 6) == 0;
      l1_en       = ($urandom % 3) != 0;
      prefer_miss = !l1_en && ($urandom % 2 == 1);
      evaluate();
    end
    check(n_pick[0] > 0 && n_pick[1] > 0 && n_pick[2] > 0, "all rules used");
    $display("fcfs=%0d level1=%0d level2=%0d", n_pick[0], n_pick[1], n_pick[2]);
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
