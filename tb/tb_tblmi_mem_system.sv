// tb_tblmi_mem_system: end-to-end test of the TB-LMI memory system at its
// full-size default parameters (8 threads, 4 banks, 8-entry bank queues,
// 108/140/216-cycle accesses, FRT = 1, 1M-cycle warm-up and SQ).
//
// An L2-side traffic generator issues misses for 8 threads: threads 0..3 are
// memory intensive (frequent misses, most of them to one row per thread, so
// row hits are common) and threads 4..7 are not (rare misses to random rows).
// Together they ask for more than the four banks can serve, so bank queues
// fill and the L2 port is stalled; a stalled miss is held until accepted.
//
// A reference model keeps a copy of every bank queue, open row, busy time and
// first-ready run, and of the Meta controller: per-thread counts per quantum,
// running totals, the ranking and the cycle it reaches the banks. Every
// cycle it predicts which request each bank schedules, by which rule and in
// which row buffer class, when the access ends, and whether the L2 is
// stalled; at each quantum it checks the quantum-end cycle, the TMA totals,
// the Meta-TPSR and every bank's TPSR. A profile flush is applied once.
// The run covers the warm-up and two schedule quanta (3M cycles) and counts
// how often each mechanism happened; one that never happened is a failure.
module tb_tblmi_mem_system;
  import tblmi_pkg::*;

  localparam int unsigned QD = QDEPTH_DEF;
  localparam int unsigned SQ = SQ_DEF;
  localparam int unsigned WU = WARMUP_DEF;
  localparam longint      RUN_CYCLES = longint'(WU) + 2 * longint'(SQ) + 20;
  localparam longint      FLUSH_AT   = longint'(WU) + longint'(SQ) + longint'(SQ) / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_we, req_ready, flush;
  tid_t req_tid;
  logic [ADDR_W-1:0] req_addr;
  tag_t req_tag;
  logic     [NUM_BANKS-1:0] iss_valid, done;
  mem_req_t [NUM_BANKS-1:0] iss_req, done_req;
  rb_kind_e [NUM_BANKS-1:0] iss_kind;
  pick_e    [NUM_BANKS-1:0] iss_pick;
  logic [NUM_BANKS-1:0][$clog2(QD+1)-1:0] q_count;
  logic [NUM_BANKS-1:0][TPSR_W-1:0] bank_tpsr;
  logic [TPSR_W-1:0] meta_tpsr;
  logic [NUM_THREADS-1:0][TMA_W_DEF-1:0] tma_total;
  logic q_end, fcfs_mode;

  tblmi_mem_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ------------------------------------------------------------ reference
  mem_req_t m_q[NUM_BANKS][$];
  bit       m_open[NUM_BANKS];
  row_t     m_row[NUM_BANKS];
  bit       m_busy[NUM_BANKS];
  int       m_left[NUM_BANKS];
  int       m_run[NUM_BANKS];
  mem_req_t m_cur[NUM_BANKS];
  int       m_order[NUM_THREADS], m_pend[NUM_THREADS];
  longint   m_cnt[NUM_THREADS], m_tot[NUM_THREADS];
  bit       m_fcfs = 1;
  longint   cyc = 0;
  longint   bcast_at = -1;

  // mechanism counters
  int n_fcfs = 0, n_l1 = 0, n_l2 = 0, n_frt = 0, n_stall = 0, n_qend = 0;
  int n_bcast = 0, n_rank_change = 0, n_flush = 0, n_done = 0;
  int n_kind[3] = '{0, 0, 0};
  longint n_served[NUM_THREADS];

  function automatic logic [TPSR_W-1:0] pack(input int o[NUM_THREADS]);
    logic [TPSR_W-1:0] w;
    w = '0;
    for (int s = 0; s < NUM_THREADS; s++) w = (w << TID_W) | TPSR_W'(o[s]);
    return w;
  endfunction

  task automatic rank_totals(output int o[NUM_THREADS]);
    for (int i = 0; i < NUM_THREADS; i++) o[i] = i;
    for (int i = 0; i < NUM_THREADS; i++)
      for (int j = i + 1; j < NUM_THREADS; j++)
        if (m_tot[o[j]] < m_tot[o[i]] || (m_tot[o[j]] == m_tot[o[i]] && o[j] < o[i])) begin
          int k; k = o[i]; o[i] = o[j]; o[j] = k;
        end
  endtask

  // ------------------------------------------------------- traffic source
  bit       have_req = 0;
  mem_req_t pend;
  logic [BANK_W-1:0] pend_bank;
  int       tagc = 0;
  row_t     stream_row[NUM_THREADS];

  task automatic new_request();
    int t;
    // intensive threads 0..3 miss every ~60 cycles, the others every ~1500
    t = $urandom % NUM_THREADS;
    if (t < 4 ? ($urandom % 15 != 0) : ($urandom % 375 != 0)) return;
    have_req = 1;
    pend = '0;
    pend.tid = tid_t'(t);
    pend.we  = ($urandom % 4 == 0);
    pend.tag = tag_t'(tagc++);
    pend.col = col_t'($urandom);
    if (t < 4 && $urandom % 8 != 0) begin
      if ($urandom % 64 == 0) stream_row[t] = row_t'($urandom);
      pend.row = stream_row[t];
      pend_bank = BANK_W'(t + ($urandom % 2));
    end else begin
      pend.row = row_t'($urandom);
      pend_bank = BANK_W'($urandom);
    end
  endtask

  initial begin
    for (int t = 0; t < NUM_THREADS; t++) begin
      m_order[t] = t; m_cnt[t] = 0; m_tot[t] = 0; n_served[t] = 0;
      stream_row[t] = row_t'(t * 17);
    end
    for (int b = 0; b < NUM_BANKS; b++) begin
      m_open[b] = 0; m_row[b] = '0; m_busy[b] = 0; m_left[b] = 0; m_run[b] = 0;
    end
    req_valid = 0; req_tid = '0; req_addr = '0; req_we = 0; req_tag = '0; flush = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (cyc < RUN_CYCLES) begin
      bit exp_iss[NUM_BANKS];
      int exp_idx[NUM_BANKS], lat[NUM_BANKS];
      pick_e exp_pick;
      // ------------- stimulus
      if (!have_req) new_request();
      req_valid = have_req;
      req_tid   = pend.tid;
      req_addr  = {pend.row, pend_bank, pend.col};
      req_we    = pend.we;
      req_tag   = pend.tag;
      flush     = (cyc == FLUSH_AT);
      #1;
      // ------------- Meta checks
      check(q_end == (cyc == longint'(WU) || (cyc > longint'(WU) && (cyc - longint'(WU)) % longint'(SQ) == 0)), "quantum end cycle");
      check(fcfs_mode == m_fcfs, "warm-up FCFS mode");
      if (cyc == bcast_at + 1) begin
        check(meta_tpsr == pack(m_pend), "Meta-TPSR ranking");
        for (int b = 0; b < NUM_BANKS; b++) check(bank_tpsr[b] == pack(m_order), "bank TPSR before load");
      end
      if (cyc == bcast_at + 2)
        for (int b = 0; b < NUM_BANKS; b++) check(bank_tpsr[b] == pack(m_order), "bank TPSR after broadcast");
      if (q_end || cyc % 100_000 == 7)
        for (int t = 0; t < NUM_THREADS; t++) check(longint'(tma_total[t]) == m_tot[t], "TMA total");
      // ------------- L2 port
      check(req_ready == (m_q[pend_bank].size() < QD), "L2 stall when the bank queue is full");
      if (req_valid && !req_ready) n_stall++;
      // ------------- banks
      for (int b = 0; b < NUM_BANKS; b++) begin
        bit any_hit, any_miss, l1;
        check(int'(q_count[b]) == m_q[b].size(), "queue occupancy");
        check(done[b] == (m_busy[b] && m_left[b] == 1), "access end cycle");
        if (done[b]) begin
          check(done_req[b] == m_cur[b], "finished request");
          n_done++;
        end
        exp_iss[b] = (m_q[b].size() > 0) && (!m_busy[b] || m_left[b] == 1);
        check(iss_valid[b] == exp_iss[b], "bank schedules when free and a request waits");
        exp_idx[b] = -1;
        if (exp_iss[b]) begin
          any_hit = 0; any_miss = 0;
          foreach (m_q[b][i]) if (m_open[b] && m_q[b][i].row == m_row[b]) any_hit = 1; else any_miss = 1;
          l1 = (FRT_DEF != 0) && (m_run[b] < FRT_DEF);
          if (m_fcfs) begin
            exp_idx[b] = 0; exp_pick = PICK_FCFS; n_fcfs++;
          end else if (l1 && any_hit) begin
            exp_pick = PICK_LEVEL1; n_l1++;
            foreach (m_q[b][i]) if (exp_idx[b] < 0 && m_open[b] && m_q[b][i].row == m_row[b]) exp_idx[b] = i;
          end else begin
            exp_pick = PICK_LEVEL2; n_l2++;
            if (!l1 && any_hit) n_frt++;
            for (int s = 0; s < NUM_THREADS && exp_idx[b] < 0; s++)
              foreach (m_q[b][i])
                if (exp_idx[b] < 0 && int'(m_q[b][i].tid) == m_order[s] &&
                    !(!l1 && any_miss && m_open[b] && m_q[b][i].row == m_row[b]))
                  exp_idx[b] = i;
          end
          check(iss_req[b] == m_q[b][exp_idx[b]], "scheduled request");
          check(iss_pick[b] == exp_pick, "picking rule");
          if (!m_open[b]) begin
            check(iss_kind[b] == RB_CLOSED, "closed-row class"); lat[b] = T_CLOSED_DEF;
          end else if (m_q[b][exp_idx[b]].row == m_row[b]) begin
            check(iss_kind[b] == RB_HIT, "row-hit class"); lat[b] = T_HIT_DEF;
          end else begin
            check(iss_kind[b] == RB_CONFLICT, "row-conflict class"); lat[b] = T_CONFLICT_DEF;
          end
          n_kind[int'(iss_kind[b])]++;
          m_run[b] = (exp_pick == PICK_LEVEL1) ? m_run[b] + 1 : 0;
        end
      end
      // ------------- reference update for the coming edge
      if (q_end) begin
        int o[NUM_THREADS];
        n_qend++;
        for (int t = 0; t < NUM_THREADS; t++) begin
          m_tot[t] += m_cnt[t];
          m_cnt[t] = 0;
        end
        rank_totals(o);
        if (n_qend > 1 && pack(o) != pack(m_pend)) n_rank_change++;
        m_pend = o;
        bcast_at = cyc + 2;
      end else if (flush) begin
        n_flush++;
        foreach (m_tot[t]) m_tot[t] = 0;
      end
      if (cyc == bcast_at) begin
        m_order = m_pend;
        m_fcfs = 0;
        n_bcast++;
      end
      for (int b = 0; b < NUM_BANKS; b++) begin
        int sz0;
        sz0 = m_q[b].size();
        if (exp_iss[b]) begin
          m_cur[b] = m_q[b][exp_idx[b]];
          m_cnt[m_cur[b].tid]++;
          n_served[m_cur[b].tid]++;
          m_open[b] = 1; m_row[b] = m_cur[b].row;
          m_busy[b] = 1; m_left[b] = lat[b];
          m_q[b].delete(exp_idx[b]);
        end else if (m_busy[b]) begin
          m_left[b]--;
          if (m_left[b] == 0) m_busy[b] = 0;
        end
        if (req_valid && int'(pend_bank) == b && sz0 < QD) begin
          m_q[b].push_back(pend);
          have_req = 0;
        end
      end
      @(negedge clk);
      cyc++;
    end
    // ------------- mechanism coverage
    $display("fcfs=%0d level1=%0d level2=%0d frt-limit=%0d stalls=%0d", n_fcfs, n_l1, n_l2, n_frt, n_stall);
    $display("hit=%0d closed=%0d conflict=%0d done=%0d", n_kind[0], n_kind[1], n_kind[2], n_done);
    $display("quantum ends=%0d broadcasts=%0d ranking changes=%0d flushes=%0d", n_qend, n_bcast, n_rank_change, n_flush);
    for (int t = 0; t < NUM_THREADS; t++) $display("thread %0d served %0d", t, n_served[t]);
    $display("final ranking %h", meta_tpsr);
    check(n_fcfs > 0, "warm-up FCFS scheduling happened");
    check(n_l1 > 0, "level-1 row-hit scheduling happened");
    check(n_l2 > 0, "level-2 priority scheduling happened");
    check(n_frt > 0, "first-ready threshold limit happened");
    check(n_stall > 0, "bank queue full stall happened");
    check(n_kind[0] > 0 && n_kind[1] > 0 && n_kind[2] > 0, "hit, closed and conflict accesses happened");
    check(n_qend == 3 && n_bcast == 3, "three quantum ends and broadcasts");
    check(n_rank_change > 0, "ranking changed between quanta");
    check(n_flush == 1, "profile flush happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
