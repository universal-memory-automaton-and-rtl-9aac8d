// uma_ram: random-access memory for a Universal Memory Automaton.
//
// DEPTH entries of WIDTH bits, addressed by $clog2(DEPTH) bits. It offers the
// three UMA memory operations:
//   TOP(R, a)     rd=1, pop=0: rd_data returns entry a, the entry is kept.
//   POP(R, a)     rd=1, pop=1: rd_data returns entry a, and the entry is
//                 cleared to zero at the next clock edge (so a second POP of
//                 the same address returns zero).
//   PUSH(R, a, d) wr=1: entry a takes d at the next clock edge.
// One read and one write can be issued in the same cycle (one read port, one
// write port). Reads are combinational, so an automaton can test the value in
// the cycle it is addressed and decide its transition; writes take effect at
// the rising clock edge, giving the one-cycle read/write latency the automaton
// expects. When a POP and a PUSH hit the same address in one cycle the PUSH
// wins. rd_data is zero while rd is low.
//
// Reset (res_n low, asynchronous) clears every entry, matching the all-zero
// initial memory of the protocol engine. The clearing reset, the gating of
// rd_data by rd and the write-over-pop priority are this design's choices.
module uma_ram #(
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
  // read port (TOP, or POP with pop=1)
  input  logic             rd,
  input  logic             pop,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  assign rd_data = rd ? mem[rd_addr] : '0;

  always_ff @(posedge clk or negedge res_n) begin
    if (!res_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (rd && pop) mem[rd_addr] <= '0;
      if (wr)        mem[wr_addr] <= wr_data;
    end
  end

endmodule
