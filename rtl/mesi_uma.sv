// mesi_uma: MESI snooping cache-coherency protocol engine, written as a
// Universal Memory Automaton (UMA): a Mealy state machine whose transitions
// may read and write memories in the same cycle they are taken.
//
// One engine belongs to one processor core and its dedicated cache. It
// watches the shared address bus (rd, wr, addr) and is told by cp whether the
// access comes from its own ("adjacent") core (cp=1) or from another
// ("remote") core (cp=0). For every cache line index it keeps two memories of
// UMA type RAM:
//   TAG   TAG_W (24) bits x 2**IDX_W (64) entries: the address tag
//   MESI  4 bits x 64 entries: the one-hot line status M=1000, E=0100,
//         S=0010, I=0001
// The 32-bit address is split as tag = addr[31:8], idx = addr[7:2], with
// addr[1:0] selecting a byte in a 32-bit line (one-way associative).
//
// States (manual encoding): ID=100 idle, RD=000 own read, WR=001 own write,
// rRD=010 remote read, rWR=011 remote write. The status rules are: an own
// write marks a line Modified, an own read marks it Exclusive, a remote read
// marks it Shared and a remote write marks it Invalid; remote accesses only
// touch lines whose tag matches. An own read that misses also stores the new
// tag. An own write that hits a line already Invalid changes nothing and
// raises the Mealy output I for that cycle (a coherency miss, countable by a
// performance counter). With no access on the bus (or in reset) the engine
// returns to ID.
//
// Timing: the TAG and MESI entries of the addressed index are read
// combinationally, the transition, I and the memory writes are decided in
// the same cycle, and the new state and memory contents appear at the next
// rising edge of clk. res_n is an asynchronous active-low reset to ID with
// both memories cleared.
//
// The state set, encodings, memories, address split and the transition table
// (arcs 1-19 and A-F) follow the protocol as published, with these readings
// that are this design's own: the remote-write arc from WR to rWR (arc B) is
// taken on a remote write hit; an access that no arc covers (an own write
// that misses, a remote access that misses, an own read miss in WR, a remote
// read hit in rWR on a line that is not Modified) keeps the state and
// changes no memory; when rd and wr are both high the read arcs win.
// TAG_WRITE_ALWAYS=1 selects the variant that stores the tag on every own
// read, hit or miss, instead of only on a miss (more write activity, same
// memory contents).
//
// res_n appears both as the asynchronous reset and inside the access
// conditions (an access only counts while res_n is high, and reset forces
// the return to ID), as the protocol's expressions define them; lint
// therefore reports it as used both synchronously and asynchronously.
module mesi_uma
  import uma_pkg::*;
#(
  parameter int unsigned ADDR_W           = 32,
  parameter int unsigned IDX_W            = 6,
  parameter int unsigned OFFSET_W         = 2,
  parameter bit          TAG_WRITE_ALWAYS = 1'b0,
  localparam int unsigned TAG_W = ADDR_W - IDX_W - OFFSET_W,
  localparam int unsigned LINES = 2 ** IDX_W
) (
  input  logic              clk,
  input  logic              res_n,
  input  logic              rd,
  input  logic              wr,
  input  logic              cp,
  input  logic [ADDR_W-1:0] addr,
  output logic              I
);

  // ---------------------------------------------------------------------
  // Address fields
  // ---------------------------------------------------------------------
  logic [TAG_W-1:0] tag;
  logic [IDX_W-1:0] idx;

  assign tag = addr[ADDR_W-1 -: TAG_W];
  assign idx = addr[OFFSET_W +: IDX_W];

  // ---------------------------------------------------------------------
  // Memories: TAG and MESI, both UMA RAMs read with TOP at idx
  // ---------------------------------------------------------------------
  logic             tag_push;
  logic [TAG_W-1:0] tag_rd;
  logic             mesi_push;
  mesi_t            mesi_push_data;
  mesi_t            mesi_rd;

  uma_memory #(.KIND(MEM_RAM), .WIDTH(TAG_W), .DEPTH(LINES)) u_tag_mem (
    .clk, .res_n,
    .push(tag_push), .push_addr(idx), .push_data(tag),
    .rd(1'b1), .pop(1'b0), .rd_addr(idx), .rd_key('0),
    .rd_data(tag_rd), .rd_index(), .found(), .err()
  );

  uma_memory #(.KIND(MEM_RAM), .WIDTH(MESI_W), .DEPTH(LINES)) u_mesi_mem (
    .clk, .res_n,
    .push(mesi_push), .push_addr(idx), .push_data(mesi_push_data),
    .rd(1'b1), .pop(1'b0), .rd_addr(idx), .rd_key('0),
    .rd_data(mesi_rd), .rd_index(), .found(), .err()
  );

  // ---------------------------------------------------------------------
  // Expression constants
  // ---------------------------------------------------------------------
  logic read, write, r_read, r_write, nop;
  logic tag_match, is_modified, is_invalid;

  assign read        = res_n &&  cp && rd;
  assign write       = res_n &&  cp && wr;
  assign r_read      = res_n && !cp && rd;
  assign r_write     = res_n && !cp && wr;
  assign nop         = !res_n || (!rd && !wr);
  assign tag_match   = (tag_rd == tag);
  assign is_modified = (mesi_rd == MESI_MODIFIED);
  assign is_invalid  = (mesi_rd == MESI_INVALID);

  // ---------------------------------------------------------------------
  // State transfer and output function
  // ---------------------------------------------------------------------
  state_e state_q, state_d;

  always_comb begin
    state_d        = state_q;
    I              = 1'b0;
    tag_push       = 1'b0;
    mesi_push      = 1'b0;
    mesi_push_data = MESI_INVALID;

    if (nop) begin
      // arcs start, 2, 4, 6, 8, 15
      state_d = ST_ID;
    end else begin
      unique case (state_q)
        ST_ID, ST_RD, ST_RRD, ST_RWR, ST_WR: begin
          // own read: arcs 1, 16, F, 12 (hit .1, miss .2) and A (hit only)
          if (read && (tag_match || state_q != ST_WR)) begin
            state_d        = ST_RD;
            tag_push       = !tag_match || TAG_WRITE_ALWAYS;
            mesi_push      = 1'b1;
            mesi_push_data = MESI_EXCLUSIVE;
          end
          // own write hit: arcs 3, 9, 17, 14, C (RD has no invalid split)
          else if (write && tag_match) begin
            state_d = ST_WR;
            if (is_invalid && state_q != ST_RD) begin
              I = 1'b1;
            end else begin
              mesi_push      = 1'b1;
              mesi_push_data = MESI_MODIFIED;
            end
          end
          // remote read hit: arcs 5, 10, 13, 18 and D (Modified lines only)
          else if (r_read && tag_match && (is_modified || state_q != ST_RWR)) begin
            state_d        = ST_RRD;
            mesi_push      = 1'b1;
            mesi_push_data = MESI_SHARED;
          end
          // remote write hit: arcs 7, 11, B, E, 19
          else if (r_write && tag_match) begin
            state_d        = ST_RWR;
            mesi_push      = 1'b1;
            mesi_push_data = MESI_INVALID;
          end
        end
        default: state_d = ST_ID;
      endcase
    end
  end

  always_ff @(posedge clk or negedge res_n) begin
    if (!res_n) state_q <= ST_ID;
    else        state_q <= state_d;
  end

  // ---------------------------------------------------------------------
  // Rules of the protocol
  // ---------------------------------------------------------------------
  // I is raised only on an own write that enters WR without a memory write
  a_inv_only_on_write : assert property (@(posedge clk) disable iff (!res_n)
    I |-> (state_d == ST_WR && !mesi_push && !tag_push));
  // the stored status is always one-hot, or zero for a never-touched line
  a_mesi_onehot : assert property (@(posedge clk) disable iff (!res_n)
    $onehot0(mesi_rd));
  // the tag is only written together with the Exclusive status
  a_tag_with_excl : assert property (@(posedge clk) disable iff (!res_n)
    tag_push |-> (mesi_push && mesi_push_data == MESI_EXCLUSIVE));

endmodule
