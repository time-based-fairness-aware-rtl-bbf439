// tblmi_workload_run: one multiprogrammed workload run on the TB-LMI memory
// system, with a reference model that checks every cycle.
//
// The run has NCORES cores with one thread each. Threads 0..NMEM-1 are memory
// intensive (frequent misses, most of them streaming through one row of one
// of two banks, so row hits are common); threads NMEM..NCORES-1 are memory
// non-intensive (rare misses to random rows); thread IDs from NCORES up are
// unused, as in a 4-core system on 8 thread IDs. "mem" workloads have all
// threads intensive, "mix" workloads half of them.
//
// The reference model is the one of the full-size test: copies of the bank
// queues, row buffers, busy times, first-ready runs and of the Meta
// controller, predicting every scheduled request, its rule and row buffer
// class, every access end, the L2 stall, the quantum ends, TMA totals and
// TPSR words. On top of that the run checks what the scheduler is for:
//   - every core's thread is served (no thread starves);
//   - after warm-up, every non-intensive or idle thread ranks ahead of every
//     intensive thread in the Meta-TPSR;
//   - in mix workloads, non-intensive threads wait less in the bank queues,
//     on average, than intensive threads once the ranking is in use;
//   - in mem workloads, intensive threads with the same traffic receive
//     service within a factor of two of each other.
// Queue depth, quantum lengths and FRT are parameters so that workloads that
// differ only in those sizes share this module; quanta are shortened so the
// run stays short.
//
// Interface: clk in; finished goes high when the run ends, with its check
// and failure counts on checks_o/failures_o.
module tblmi_workload_run
  import tblmi_pkg::*;
#(
  parameter string       NAME   = "8mix",
  parameter int unsigned NCORES = 8,
  parameter int unsigned NMEM   = 4,
  parameter int unsigned QD     = QDEPTH_DEF,
  parameter int unsigned SQ     = 50_000,
  parameter int unsigned WU     = 50_000,
  parameter int unsigned FRT    = FRT_DEF,
  parameter int unsigned NQ     = 4,
  parameter int unsigned SEED   = 1
) (
  input  logic clk,
  output logic finished,
  output int   checks_o,
  output int   failures_o
);

  localparam longint RUN_CYCLES = longint'(WU) + longint'(NQ) * longint'(SQ) + 20;
  localparam longint RANKED_AT  = longint'(WU) + 2;   // first ranking in the banks

  logic rst_n = 1'b0;
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

  tblmi_mem_system #(.QDEPTH(QD), .SQ(SQ), .WARMUP(WU), .FRT(FRT)) dut (.*);

  int checks = 0, failures = 0;
  assign checks_o   = checks;
  assign failures_o = failures;
  initial finished = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %s at cycle %0d", NAME, what, cyc);
    end
  endtask

  // ------------------------------------------------------------ reference
  mem_req_t m_q[NUM_BANKS][$];
  longint   m_t[NUM_BANKS][$];      // push cycle of each queued request
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
  longint n_served[NUM_THREADS], n_late[NUM_THREADS], w_late[NUM_THREADS];

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
    bit intensive;
    // an intensive thread misses about once every 16*NCORES cycles,
    // a non-intensive one about 25 times less often
    t = $urandom % NCORES;
    intensive = (t < NMEM);
    if (intensive ? ($urandom % 16 == 0) : ($urandom % 200 != 0)) return;
    have_req = 1;
    pend = '0;
    pend.tid = tid_t'(t);
    pend.we  = ($urandom % 4 == 0);
    pend.tag = tag_t'(tagc++);
    pend.col = col_t'($urandom);
    if (intensive && $urandom % 8 != 0) begin
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
      m_order[t] = t; m_cnt[t] = 0; m_tot[t] = 0; n_served[t] = 0; n_late[t] = 0; w_late[t] = 0;
      stream_row[t] = row_t'(t * 17);
    end
    for (int b = 0; b < NUM_BANKS; b++) begin
      m_open[b] = 0; m_row[b] = '0; m_busy[b] = 0; m_left[b] = 0; m_run[b] = 0;
    end
    void'($urandom(SEED));
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
      flush     = 1'b0;
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
      if (q_end || cyc % 10_000 == 7)
        for (int t = 0; t < NUM_THREADS; t++) check(longint'(tma_total[t]) == m_tot[t], "TMA total");
      // ------------- L2 port
      check(req_ready == (m_q[pend_bank].size() < int'(QD)), "L2 stall when the bank queue is full");
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
          l1 = (FRT != 0) && (m_run[b] < FRT);
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
          if (cyc > RANKED_AT) begin
            n_late[m_cur[b].tid]++;
            w_late[m_cur[b].tid] += cyc - m_t[b][exp_idx[b]];
          end
          m_q[b].delete(exp_idx[b]);
          m_t[b].delete(exp_idx[b]);
        end else if (m_busy[b]) begin
          m_left[b]--;
          if (m_left[b] == 0) m_busy[b] = 0;
        end
        if (req_valid && int'(pend_bank) == b && sz0 < int'(QD)) begin
          m_q[b].push_back(pend);
          m_t[b].push_back(cyc + 1);
          have_req = 0;
        end
      end
      @(negedge clk);
      cyc++;
    end
    // ------------- workload-level checks
    begin
      real w_mem, w_low;
      longint n_mem, n_low, s_min, s_max;
      int pos[NUM_THREADS];
      w_mem = 0; w_low = 0; n_mem = 0; n_low = 0; s_min = -1; s_max = 0;
      for (int s = 0; s < NUM_THREADS; s++) pos[int'(tpsr_slot(meta_tpsr, s))] = s;
      for (int t = 0; t < int'(NCORES); t++) begin
        check(n_served[t] > 0, "every core's thread is served");
        if (t < int'(NMEM)) begin
          n_mem += n_late[t]; w_mem += real'(w_late[t]);
          if (s_min < 0 || n_served[t] < s_min) s_min = n_served[t];
          if (n_served[t] > s_max) s_max = n_served[t];
        end else begin
          n_low += n_late[t]; w_low += real'(w_late[t]);
        end
      end
      for (int a = 0; a < NUM_THREADS; a++)
        for (int m = 0; m < int'(NMEM); m++)
          if (a >= int'(NMEM)) check(pos[a] < pos[m], "light or idle threads rank ahead of intensive ones");
      if (NMEM < NCORES && n_low > 0 && n_mem > 0) begin
        $display("%s: average queue wait intensive %0.1f, non-intensive %0.1f cycles",
                 NAME, w_mem / real'(n_mem), w_low / real'(n_low));
        check(w_low / real'(n_low) < w_mem / real'(n_mem), "non-intensive threads wait less");
      end
      if (NMEM == NCORES) begin
        $display("%s: intensive threads served between %0d and %0d", NAME, s_min, s_max);
        check(2 * s_min >= s_max, "intensive threads served within a factor of two");
      end
    end
    $display("%s: fcfs=%0d level1=%0d level2=%0d frt-limit=%0d stalls=%0d hit=%0d closed=%0d conflict=%0d quanta=%0d ranking changes=%0d",
             NAME, n_fcfs, n_l1, n_l2, n_frt, n_stall, n_kind[0], n_kind[1], n_kind[2], n_qend, n_rank_change);
    check(n_fcfs > 0 && n_l2 > 0 && n_stall > 0, "warm-up, level 2 and stalls happened");
    check(FRT == 0 || (n_l1 > 0 && n_frt > 0), "level 1 and its threshold happened");
    check(n_qend == int'(NQ) + 1 && n_bcast == int'(NQ) + 1, "quantum ends and broadcasts");
    finished = 1'b1;
  end
endmodule
