// sq_timer: the SQ (schedule quantum) register of the Meta memory controller.
//
// A cycle counter that is incremented every clock and goes back to zero when
// it reaches the quantum length. A quantum has ended whenever the register
// reads zero again; that test is the NOR of all its bits. The first quantum
// after reset is the warm-up quantum (length WARMUP), during which the banks
// schedule FCFS while the first thread profile is gathered; every later
// quantum is SQ cycles long. With SQ = 1M cycles the register is 20 bits.
// The warm-up length is not fixed by the scheme; making it equal to SQ is
// this design's choice.
//
// Interface: `q_end` is high for one cycle at the start of each new quantum
// (the cycle the register reads zero after a wrap): WARMUP cycles after
// reset, then every SQ cycles. `warmup` is high from reset until that first
// `q_end` cycle included. `count` is the register.
module sq_timer
  import tblmi_pkg::*;
#(
  parameter int unsigned SQ     = SQ_DEF,
  parameter int unsigned WARMUP = WARMUP_DEF,
  localparam int unsigned MAXLEN = (SQ > WARMUP) ? SQ : WARMUP,
  localparam int unsigned CW     = (MAXLEN > 2) ? $clog2(MAXLEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          q_end,
  output logic          warmup,
  output logic [CW-1:0] count
);

  logic started_q;   // the register has left zero once since reset
  logic [CW-1:0] last;

  assign last  = warmup ? CW'(WARMUP - 1) : CW'(SQ - 1);
  assign q_end = started_q && !(|count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      started_q <= 1'b0;
      warmup    <= 1'b1;
    end else begin
      started_q <= 1'b1;
      count     <= (count == last) ? '0 : count + CW'(1);
      if (q_end) warmup <= 1'b0;
    end
  end

endmodule
