// bank_ctrl_checker: drives one bank memory controller with random traffic
// and checks it against a reference model; used by tb_bank_mem_ctrl.
//
// The reference keeps its own copy of the bank queue in arrival order, of
// the open row, of the bank's busy time, of the TPSR ranking and of the run
// of successive level-1 picks. Every cycle it predicts whether a request is
// scheduled, which one and by which rule, the row buffer class, the cycle
// the access ends, the queue-full stall, and at every quantum end the
// per-thread access counts. FCFS mode, quantum ends and TPSR loads are
// driven here in place of the Meta controller.
module bank_ctrl_checker
  import tblmi_pkg::*;
#(
  parameter int unsigned FRT    = FRT_DEF,
  parameter int unsigned CYCLES = 60000,
  parameter int unsigned SEED   = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished,
  output int   n_level1,
  output int   n_level2,
  output int   n_fcfs,
  output int   n_frt_limit,
  output int   n_stall
);

  int n_kind[3];   // accesses per row buffer class, read hierarchically

  localparam int unsigned QD = QDEPTH_DEF;
  localparam int unsigned PW = TMAPB_W_DEF;

  logic req_valid, req_ready, q_end, fcfs_mode, tpsr_load;
  mem_req_t req;
  logic [TPSR_W-1:0] tpsr_word, tpsr_q;
  logic [NUM_THREADS-1:0][PW-1:0] counts;
  logic iss_valid, done;
  mem_req_t iss_req, done_req;
  rb_kind_e iss_kind;
  pick_e iss_pick;
  logic [$clog2(QD+1)-1:0] q_count;

  bank_mem_ctrl #(.FRT(FRT)) dut (
    .clk, .rst_n, .req_valid, .req, .req_ready, .q_end, .fcfs_mode,
    .tpsr_load, .tpsr_word, .counts, .iss_valid, .iss_req, .iss_kind,
    .iss_pick, .done, .done_req, .q_count, .tpsr_q
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL[FRT=%0d] %s at %0t", FRT, what, $time);
    end
  endtask

  mem_req_t m_q[$];
  bit       m_open = 0;
  row_t     m_row = '0;
  bit       m_busy = 0;
  int       m_left = 0;
  int       m_run = 0;
  int       m_order[NUM_THREADS];
  int       m_cnt[NUM_THREADS];
  mem_req_t m_cur;
  int       tagc = 0;

  function automatic logic [TPSR_W-1:0] pack(input int o[NUM_THREADS]);
    logic [TPSR_W-1:0] w;
    w = '0;
    for (int s = 0; s < NUM_THREADS; s++) w = (w << TID_W) | TPSR_W'(o[s]);
    return w;
  endfunction

  function automatic bit is_hit(input mem_req_t r);
    return m_open && r.row == m_row;
  endfunction

  initial begin
    int new_order[NUM_THREADS];
    void'($urandom(SEED));
    checks = 0; failures = 0; finished = 0;
    n_level1 = 0; n_level2 = 0; n_fcfs = 0; n_frt_limit = 0; n_stall = 0;
    n_kind = '{0, 0, 0};
    req_valid = 0; req = '0; q_end = 0; fcfs_mode = 1; tpsr_load = 0; tpsr_word = '0;
    for (int s = 0; s < NUM_THREADS; s++) begin m_order[s] = s; m_cnt[s] = 0; end
    @(posedge rst_n);
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      int exp_idx, lat;
      pick_e exp_pick;
      bit exp_iss, any_hit, any_miss, l1;
      @(negedge clk);
      // ---------------- stimulus for this cycle
      req_valid = ($urandom % 100) < (((cyc / 5000) % 2 == 1) ? 30 : 4);
      req       = mem_req_t'({$urandom, $urandom});
      req.tid   = tid_t'($urandom % NUM_THREADS);
      // threads 0..3 stream through one row each; 4..7 spread over rows
      req.row   = (req.tid < 4 && $urandom % 4 != 0) ? row_t'(req.tid) : row_t'($urandom % 16);
      req.tag   = tag_t'(tagc++);
      fcfs_mode = (cyc < 3000);
      q_end     = (cyc % 1500) == 1499;
      tpsr_load = (cyc % 2000) == 1000;
      for (int s = 0; s < NUM_THREADS; s++) new_order[s] = s;
      new_order.shuffle();
      tpsr_word = pack(new_order);
      #1;
      // ---------------- predictions
      check(req_ready == (m_q.size() < QD), "queue full stall");
      check(int'(q_count) == m_q.size(), "queue occupancy");
      check(done == (m_busy && m_left == 1), "access end cycle");
      if (done) check(done_req == m_cur, "finished request");
      exp_iss = (m_q.size() > 0) && (!m_busy || m_left == 1);
      check(iss_valid == exp_iss, "schedule when bank ready and a request waits");
      if (req_valid && !req_ready) n_stall++;
      if (exp_iss) begin
        any_hit = 0; any_miss = 0;
        foreach (m_q[i]) if (is_hit(m_q[i])) any_hit = 1; else any_miss = 1;
        l1 = (FRT != 0) && (m_run < FRT);
        exp_idx = -1;
        if (fcfs_mode) begin
          exp_idx = 0; exp_pick = PICK_FCFS;
        end else if (l1 && any_hit) begin
          exp_pick = PICK_LEVEL1;
          foreach (m_q[i]) if (exp_idx < 0 && is_hit(m_q[i])) exp_idx = i;
        end else begin
          exp_pick = PICK_LEVEL2;
          for (int s = 0; s < NUM_THREADS && exp_idx < 0; s++)
            foreach (m_q[i])
              if (exp_idx < 0 && int'(m_q[i].tid) == m_order[s] &&
                  !(FRT != 0 && !l1 && any_miss && is_hit(m_q[i])))
                exp_idx = i;
          if (FRT != 0 && !l1 && any_hit) n_frt_limit++;
        end
        check(iss_req == m_q[exp_idx], $sformatf("scheduled request (expected entry %0d)", exp_idx));
        check(iss_pick == exp_pick, "picking rule");
        if (!m_open)                 begin check(iss_kind == RB_CLOSED, "closed class");   lat = T_CLOSED_DEF; end
        else if (is_hit(m_q[exp_idx])) begin check(iss_kind == RB_HIT, "hit class");      lat = T_HIT_DEF; end
        else                         begin check(iss_kind == RB_CONFLICT, "conflict class"); lat = T_CONFLICT_DEF; end
        n_kind[int'(iss_kind)]++;
        case (exp_pick)
          PICK_FCFS:   n_fcfs++;
          PICK_LEVEL1: n_level1++;
          default:     n_level2++;
        endcase
      end
      if (q_end)
        for (int t = 0; t < NUM_THREADS; t++)
          check(int'(counts[t]) == m_cnt[t], "TMAPB count at quantum end");
      if (tpsr_load) check(1, "");
      // ---------------- reference update for the coming edge
      begin
        int sz0;
        sz0 = m_q.size();
        if (q_end) foreach (m_cnt[t]) m_cnt[t] = 0;
        if (exp_iss) begin
          m_cur = m_q[exp_idx];
          m_cnt[m_cur.tid]++;
          m_open = 1; m_row = m_cur.row;
          m_busy = 1; m_left = lat;
          m_run  = (exp_pick == PICK_LEVEL1) ? m_run + 1 : 0;
          m_q.delete(exp_idx);
        end else if (m_busy) begin
          m_left--;
          if (m_left == 0) m_busy = 0;
        end
        if (req_valid && sz0 < QD) m_q.push_back(req);
        if (tpsr_load) m_order = new_order;
      end
    end
    finished = 1;
  end

endmodule
