// uma_cam: content-addressable memory for a Universal Memory Automaton.
//
// DEPTH entries of WIDTH bits, written by address and searched by content in
// one cycle:
//   PUSH(C, a, d)  wr=1: entry a takes d (and becomes valid) at the edge.
//   TOP(C, k)      rd=1, pop=0: every valid entry is compared with k in
//                  parallel; match_addr returns the lowest address whose
//                  content equals k and found is raised. The entry is kept.
//   POP(C, k)      rd=1, pop=1: as TOP, and the matching entry is deleted at
//                  the clock edge.
// The memory starts all zero with every entry valid, so directly after reset
// TOP(C, 0) finds address 0. How deleted and missing entries are handled is
// left open by the UMA definition; here a deleted entry is marked not valid
// (and cleared) so it is never found again until it is written, a search
// that finds nothing returns found=0 with match_addr=0, and a PUSH to the
// address a POP deletes in the same cycle wins. The content itself is not
// returned since it equals the search key. The search is combinational; the
// reset is asynchronous and active low.
module uma_cam #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             res_n,
  // write port (PUSH)
  input  logic             wr,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // search port (TOP, or POP with pop=1)
  input  logic             rd,
  input  logic             pop,
  input  logic [WIDTH-1:0] rd_key,
  output logic [AW-1:0]    match_addr,
  output logic             found
);

  logic [WIDTH-1:0] mem   [DEPTH];
  logic [DEPTH-1:0] valid_q;
  logic [DEPTH-1:0] hits;

  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++) hits[i] = valid_q[i] && (mem[i] == rd_key);
  end

  // lowest matching address
  always_comb begin
    match_addr = '0;
    found      = 1'b0;
    if (rd) begin
      for (int i = int'(DEPTH) - 1; i >= 0; i--) begin
        if (hits[i]) begin
          match_addr = AW'(i);
          found      = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge res_n) begin
    if (!res_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      valid_q <= '1;
    end else begin
      if (found && pop) begin
        mem[match_addr]     <= '0;
        valid_q[match_addr] <= 1'b0;
      end
      if (wr) begin
        mem[wr_addr]     <= wr_data;
        valid_q[wr_addr] <= 1'b1;
      end
    end
  end

endmodule
