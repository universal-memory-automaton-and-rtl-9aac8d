// uma_stack: last-in first-out memory (stack) for a Universal Memory Automaton.
//
// DEPTH entries of WIDTH bits, organised by an internal fill counter, so no
// address is needed. Operations:
//   PUSH(A, d)  push=1: d is placed on top of the stack at the clock edge.
//   TOP(A)      rd=1, pop=0: rd_data returns the top entry, which is kept.
//   POP(A)      rd=1, pop=1: rd_data returns the top entry, which is removed
//               at the clock edge.
// POP or TOP on an empty stack returns zero and raises err; PUSH on a full
// stack stores nothing and raises err (rd_data is zero then too unless a read
// of a non-empty stack is issued in the same cycle). err is combinational and
// belongs to the operation of the current cycle.
//
// A POP and a PUSH may be issued together: the old top is returned and
// replaced by the pushed word, the fill level stays the same, and a PUSH on a
// full stack is then accepted because the POP frees a place. This combined
// behaviour, the empty/full/count status outputs and the asynchronous
// active-low reset to empty are this design's choices; the operations and
// error rule are those of the UMA stack definition. The assertions at the
// end are disabled during reset, which lint reports as a synchronous use of
// the asynchronous reset.
module uma_stack #(
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
  logic [AW:0]      cnt_q;
  logic             pop_ok, push_ok;
  logic [AW:0]      wr_slot;

  assign empty   = (cnt_q == '0);
  assign full    = (cnt_q == (AW+1)'(DEPTH));
  assign count   = cnt_q;
  assign pop_ok  = rd && pop && !empty;
  assign push_ok = push && (!full || pop_ok);
  assign err     = (rd && empty) || (push && !push_ok);
  assign rd_data = (rd && !empty) ? mem[AW'(cnt_q - 1'b1)] : '0;
  assign wr_slot = pop_ok ? cnt_q - 1'b1 : cnt_q;

  always_ff @(posedge clk or negedge res_n) begin
    if (!res_n) begin
      cnt_q <= '0;
    end else begin
      if (push_ok) mem[AW'(wr_slot)] <= push_data;
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
