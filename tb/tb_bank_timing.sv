// tb_bank_timing: self-checking test of the bank row buffer state and
// access timing.
//
// Accesses to a few rows are started at random moments, sometimes exactly in
// the cycle `ready` returns. The reference tracks the open row: the first
// access after reset must be a closed-row access, a repeat of the open row a
// hit, any other row a conflict. The number of cycles from the start edge to
// the `done` cycle must be 108 / 140 / 216 for hit / closed / conflict, and
// `ready` must be low in between.
module tb_bank_timing;
  import tblmi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, ready, done, row_open;
  row_t start_row, open_row;
  rb_kind_e kind;

  int checks = 0, failures = 0;
  int n_kind[3] = '{0, 0, 0};
  int n_b2b = 0;

  bank_timing dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit   m_open = 0;
  row_t m_row  = '0;

  initial begin
    start = 0; start_row = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int exp_lat, lat;
      rb_kind_e exp_kind;
      bit b2b;
      b2b = (n > 0) && ($urandom % 3 == 0);
      if (n == 0) @(negedge clk);
      else if (!b2b) repeat (1 + $urandom % 4) @(negedge clk);
      else n_b2b++;
      check(ready, "ready while idle / in done cycle");
      start_row = row_t'($urandom % 3);
      #1;
      if (!m_open)               begin exp_kind = RB_CLOSED;   exp_lat = 140; end
      else if (m_row == start_row) begin exp_kind = RB_HIT;    exp_lat = 108; end
      else                       begin exp_kind = RB_CONFLICT; exp_lat = 216; end
      check(kind == exp_kind, "row buffer class");
      n_kind[int'(exp_kind)]++;
      start = 1;
      @(posedge clk);
      m_open = 1; m_row = start_row;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 1000) begin
        check(!ready, "not ready while busy");
        @(negedge clk);
        lat++;
      end
      check(lat == exp_lat, $sformatf("latency %0d expected %0d", lat, exp_lat));
      check(row_open && open_row == m_row, "open row");
    end
    check(n_b2b > 0, "back-to-back start in a done cycle");
    check(n_kind[0] > 0 && n_kind[1] > 0 && n_kind[2] > 0, "all three classes seen");
    $display("hit=%0d closed=%0d conflict=%0d", n_kind[0], n_kind[1], n_kind[2]);
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
