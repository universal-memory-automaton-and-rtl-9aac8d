// uma_queue: first-in first-out memory (queue) for a Universal Memory
// Automaton.
//
// DEPTH entries of WIDTH bits in a circular buffer with internal read and
// write pointers, so no address is needed. Operations:
//   PUSH(Q, d)  push=1: d is appended at the end of the queue at the edge.
//   TOP(Q)      rd=1, pop=0: rd_data returns the oldest entry, which is kept.
//   POP(Q)      rd=1, pop=1: rd_data returns the oldest entry, which is
//               removed at the clock edge.
// POP or TOP on an empty queue returns zero and raises err; PUSH on a full
// queue stores nothing and raises err. err is combinational and belongs to
// the operation of the current cycle.
//
// A POP and a PUSH may be issued in the same cycle; on a full queue the PUSH
// is then accepted because the POP frees a place. This, the empty/full/count
// status outputs and the asynchronous active-low reset to empty are this
// design's choices; the operations and error rule are those of the UMA queue
// definition. The assertions at the end are disabled during reset, which
// lint reports as a synchronous use of the asynchronous reset.
module uma_queue #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             res_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             rd,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             err,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    head_q, tail_q;
  logic [AW:0]      cnt_q;
  logic             pop_ok, push_ok;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (cnt_q == '0);
  assign full    = (cnt_q == (AW+1)'(DEPTH));
  assign count   = cnt_q;
  assign pop_ok  = rd && pop && !empty;
  assign push_ok = push && (!full || pop_ok);
  assign err     = (rd && empty) || (push && !push_ok);
  assign rd_data = (rd && !empty) ? mem[head_q] : '0;

  always_ff @(posedge clk or negedge res_n) begin
    if (!res_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (push_ok) begin
        mem[tail_q] <= push_data;
        tail_q      <= next_ptr(tail_q);
      end
      if (pop_ok) head_q <= next_ptr(head_q);
      cnt_q <= cnt_q + (AW+1)'(push_ok) - (AW+1)'(pop_ok);
    end
  end

  // the fill level never exceeds the depth, and an accepted PUSH or POP
  // moves it by exactly one unless both happen together
  a_count_range : assert property (@(posedge clk) disable iff (!res_n)
    cnt_q <= (AW+1)'(DEPTH));
  a_count_step : assert property (@(posedge clk) disable iff (!res_n)
    (push_ok != pop_ok) |=> (cnt_q != $past(cnt_q)));

endmodule
