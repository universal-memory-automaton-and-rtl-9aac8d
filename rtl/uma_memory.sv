// uma_memory: one memory instance of a Universal Memory Automaton, of a type
// chosen at elaboration time by KIND: RAM, queue, stack or CAM.
//
// An automaton drives every memory through the same port set, whatever its
// type, so the type of each of its memories is a configuration choice:
//   write side (PUSH):  push, push_addr, push_data
//   read side (TOP/POP): rd, pop (0 = TOP keeps the entry, 1 = POP removes
//                       it), rd_addr (RAM), rd_key (CAM search content)
//   results:            rd_data (RAM, queue, stack; CAM: the key when found),
//                       rd_index (CAM: lowest matching address), found (the
//                       read returned an entry), err (queue/stack: pop or
//                       top on empty, push on full)
// Inputs a type does not use (addresses for queue and stack, rd_addr for the
// CAM, rd_key for the others) are left unconnected on purpose; lint reports
// them as unused. Reads are combinational and writes take effect at the
// rising clock edge, the one-cycle read/write latency the automaton relies
// on. res_n is the asynchronous active-low reset. The common port set and
// the found/err conventions are this design's choices.
module uma_memory
  import uma_pkg::*;
#(
  parameter mem_kind_e   KIND  = MEM_RAM,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             res_n,
  input  logic             push,
  input  logic [AW-1:0]    push_addr,
  input  logic [WIDTH-1:0] push_data,
  input  logic             rd,
  input  logic             pop,
  input  logic [AW-1:0]    rd_addr,
  input  logic [WIDTH-1:0] rd_key,
  output logic [WIDTH-1:0] rd_data,
  output logic [AW-1:0]    rd_index,
  output logic             found,
  output logic             err
);

  if (KIND == MEM_RAM) begin : g_ram
    uma_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_ram (
      .clk, .res_n,
      .wr(push), .wr_addr(push_addr), .wr_data(push_data),
      .rd, .pop, .rd_addr, .rd_data
    );
    assign rd_index = rd_addr;
    assign found    = rd;
    assign err      = 1'b0;
  end else if (KIND == MEM_QUEUE) begin : g_queue
    logic [AW:0] count;
    logic        empty, full;
    uma_queue #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_queue (
      .clk, .res_n, .push, .push_data, .rd, .pop,
      .rd_data, .err, .empty, .full, .count
    );
    assign rd_index = '0;
    assign found    = rd && !empty;
  end else if (KIND == MEM_STACK) begin : g_stack
    logic [AW:0] count;
    logic        empty, full;
    uma_stack #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_stack (
      .clk, .res_n, .push, .push_data, .rd, .pop,
      .rd_data, .err, .empty, .full, .count
    );
    assign rd_index = '0;
    assign found    = rd && !empty;
  end else begin : g_cam
    uma_cam #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_cam (
      .clk, .res_n,
      .wr(push), .wr_addr(push_addr), .wr_data(push_data),
      .rd, .pop, .rd_key, .match_addr(rd_index), .found
    );
    assign rd_data = found ? rd_key : '0;
    assign err     = 1'b0;
  end

endmodule
