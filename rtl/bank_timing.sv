// bank_timing: row buffer state and access timing of one DRAM bank, as the
// bank memory controller sees it.
//
// The bank has two stable states. In IDLE it is precharged and no row is in
// the row buffer; in ACTIVE one row is held in the row buffer and any number
// of column accesses to it may follow. An access therefore falls in one of
// three classes, each with its own latency:
//   hit      - the requested row is already in the row buffer   (T_HIT)
//   closed   - the bank is IDLE, the row must be activated      (T_CLOSED)
//   conflict - another row is open: precharge, then activate    (T_CONFLICT)
// The bank is unpipelined: it takes a new access only when the previous one
// has finished. Rows are left open after an access (open-page), so the bank
// returns to IDLE only through reset; the closing policy is this design's
// choice, as is leaving the DRAM command sequence to the device model.
//
// Interface: `start`/`start_row` begin an access and are taken only while
// `ready` is high. `kind` classifies the access being started in that same
// cycle (combinational from `start_row`). `done` pulses in the last cycle of
// an access. Timing: an access started at clock edge t holds the bank for the
// next LAT cycles and `done` is high in the last of them; `ready` is high in
// that cycle too, so accesses can follow back to back every LAT cycles.
module bank_timing
  import tblmi_pkg::*;
#(
  parameter int unsigned T_HIT      = T_HIT_DEF,
  parameter int unsigned T_CLOSED   = T_CLOSED_DEF,
  parameter int unsigned T_CONFLICT = T_CONFLICT_DEF,
  localparam int unsigned CW = $clog2(T_CONFLICT + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  row_t     start_row,
  output rb_kind_e kind,       // class of the access `start_row` would be
  output logic     ready,
  output logic     done,
  output logic     row_open,   // ACTIVE state
  output row_t     open_row
);

  typedef enum logic {S_IDLE = 1'b0, S_ACTIVE = 1'b1} bank_state_e;
  bank_state_e     state_q;
  logic            busy_q;
  logic [CW-1:0]   left_q;   // cycles left of the current access

  assign row_open = (state_q == S_ACTIVE);

  always_comb begin
    if (!row_open)                  kind = RB_CLOSED;
    else if (open_row == start_row) kind = RB_HIT;
    else                            kind = RB_CONFLICT;
  end

  assign done  = busy_q && (left_q == CW'(1));
  assign ready = !busy_q || done;

  logic [CW-1:0] lat;
  always_comb begin
    unique case (kind)
      RB_HIT:    lat = CW'(T_HIT);
      RB_CLOSED: lat = CW'(T_CLOSED);
      default:   lat = CW'(T_CONFLICT);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      open_row <= '0;
      busy_q   <= 1'b0;
      left_q   <= '0;
    end else begin
      if (start && ready) begin
        state_q  <= S_ACTIVE;
        open_row <= start_row;
        busy_q   <= 1'b1;
        left_q   <= lat;
      end else if (busy_q) begin
        left_q <= left_q - CW'(1);
        if (done) busy_q <= 1'b0;
      end
    end
  end

endmodule
