// uma_pkg: types and constants shared by the Universal Memory Automaton (UMA)
// memories and by the MESI snooping protocol engine built from them.
//
// - mem_kind_e selects the type of one UMA memory instance: random access
//   (RAM), first-in first-out (queue), last-in first-out (stack) or content
//   addressable (CAM).
// - state_e is the protocol engine's state register with the manual state
//   encoding of the protocol's configuration header: ID=100, RD=000, WR=001,
//   rRD=010, rWR=011.
// - MESI_* are the one-hot coherency codes stored per cache line:
//   Modified=1000, Exclusive=0100, Shared=0010, Invalid=0001.
package uma_pkg;

  typedef enum logic [1:0] {
    MEM_RAM   = 2'd0,
    MEM_QUEUE = 2'd1,
    MEM_STACK = 2'd2,
    MEM_CAM   = 2'd3
  } mem_kind_e;

  typedef enum logic [2:0] {
    ST_ID  = 3'b100,  // idle: no load/store on the address bus
    ST_RD  = 3'b000,  // adjacent core reads
    ST_WR  = 3'b001,  // adjacent core writes
    ST_RRD = 3'b010,  // remote core reads
    ST_RWR = 3'b011   // remote core writes
  } state_e;

  localparam int unsigned MESI_W = 4;
  typedef logic [MESI_W-1:0] mesi_t;

  localparam mesi_t MESI_MODIFIED  = 4'b1000;
  localparam mesi_t MESI_EXCLUSIVE = 4'b0100;
  localparam mesi_t MESI_SHARED    = 4'b0010;
  localparam mesi_t MESI_INVALID   = 4'b0001;

endpackage
