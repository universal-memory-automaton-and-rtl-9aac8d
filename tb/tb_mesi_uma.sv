// tb_mesi_uma: end-to-end, self-checking testbench for the MESI snooping
// protocol engine mesi_uma at its full default size (32-bit addresses,
// 64-line TAG and MESI memories).
//
// The reference is a table-driven model held in the testbench: one row per
// arc of the protocol's transition table (source state, access class, tag
// hit or miss, status condition, target state, output I, tag write, status
// write), matched in order read, write, remote read, remote write. Every
// cycle the engine's next state, its I output, its tag and status write
// activity, the stored tag and status of the addressed line and, after the
// edge, its state register are compared with the model.
//
// Phases:
//   1. The single own-read cycle of the published waveform: cp=rd=1,
//      addr=DEADBEEF. Index 59 must take tag DEADBE and status 0100 one
//      clock edge later, with the state going from ID to RD, and back to ID
//      when the bus goes quiet.
//   2. Directed walks that take each arc at least once.
//   3. 40000 cycles of random bus traffic over a few tags and indices, with
//      occasional asynchronous resets.
//   4. A sweep of all 64 lines comparing both memories with the model.
// Each arc (and the NOP return to idle, reset and the no-arc hold case) is
// counted; an arc that never fires counts as a failure.
module tb_mesi_uma;
  localparam bit ALWAYS_TAG = 1'b0;   // engine built with TAG_WRITE_ALWAYS = 0

  // state encodings and status codes as published
  localparam logic [2:0] S_ID = 3'b100, S_RD = 3'b000, S_WR = 3'b001,
                         S_RRD = 3'b010, S_RWR = 3'b011;
  localparam logic [3:0] M = 4'b1000, E = 4'b0100, S = 4'b0010, INV = 4'b0001;

  typedef enum int {C_READ, C_WRITE, C_RREAD, C_RWRITE} cls_e;
  typedef enum int {X_NONE, X_NOT_INV, X_INV, X_MOD} extra_e;
  typedef struct {
    string      arc;
    logic [2:0] src;
    cls_e       cls;
    bit         tm;      // required TAG_MATCH value
    extra_e     extra;
    logic [2:0] dst;
    bit         inv;     // output I
    bit         set_tag;
    logic [3:0] set_mesi; // 0: no status write
  } row_t;

  localparam int NROWS = 28;
  row_t rows [NROWS];

  logic clk = 1'b0, res_n = 1'b0;
  logic rd = 1'b0, wr = 1'b0, cp = 1'b0;
  logic [31:0] addr = '0;
  logic I;

  mesi_uma dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int arc_hits [string];
  int tag_writes = 0;

  logic [23:0] m_tag  [64];
  logic [3:0]  m_mesi [64];
  logic [2:0]  m_state;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic void add(input int i, input string a, input logic [2:0] s, input cls_e c,
                              input bit tm, input extra_e x, input logic [2:0] d,
                              input bit iv, input bit st, input logic [3:0] sm);
    rows[i] = '{a, s, c, tm, x, d, iv, st, sm};
    arc_hits[a] = 0;
  endfunction

  initial begin
    add( 0, "1.1",  S_ID,  C_READ,   1, X_NONE,    S_RD,  0, 0, E);
    add( 1, "1.2",  S_ID,  C_READ,   0, X_NONE,    S_RD,  0, 1, E);
    add( 2, "3.1",  S_ID,  C_WRITE,  1, X_NOT_INV, S_WR,  0, 0, M);
    add( 3, "3.2",  S_ID,  C_WRITE,  1, X_INV,     S_WR,  1, 0, 0);
    add( 4, "5",    S_ID,  C_RREAD,  1, X_NONE,    S_RRD, 0, 0, S);
    add( 5, "7",    S_ID,  C_RWRITE, 1, X_NONE,    S_RWR, 0, 0, INV);
    add( 6, "9",    S_RD,  C_WRITE,  1, X_NONE,    S_WR,  0, 0, M);
    add( 7, "A",    S_WR,  C_READ,   1, X_NONE,    S_RD,  0, 0, E);
    add( 8, "B",    S_WR,  C_RWRITE, 1, X_NONE,    S_RWR, 0, 0, INV);
    add( 9, "C.1",  S_RWR, C_WRITE,  1, X_NOT_INV, S_WR,  0, 0, M);
    add(10, "C.2",  S_RWR, C_WRITE,  1, X_INV,     S_WR,  1, 0, 0);
    add(11, "D",    S_RWR, C_RREAD,  1, X_MOD,     S_RRD, 0, 0, S);
    add(12, "E",    S_RRD, C_RWRITE, 1, X_NONE,    S_RWR, 0, 0, INV);
    add(13, "F.1",  S_RRD, C_READ,   1, X_NONE,    S_RD,  0, 0, E);
    add(14, "F.2",  S_RRD, C_READ,   0, X_NONE,    S_RD,  0, 1, E);
    add(15, "10",   S_RD,  C_RREAD,  1, X_NONE,    S_RRD, 0, 0, S);
    add(16, "11",   S_RD,  C_RWRITE, 1, X_NONE,    S_RWR, 0, 0, INV);
    add(17, "12.1", S_RWR, C_READ,   1, X_NONE,    S_RD,  0, 0, E);
    add(18, "12.2", S_RWR, C_READ,   0, X_NONE,    S_RD,  0, 1, E);
    add(19, "13",   S_WR,  C_RREAD,  1, X_NONE,    S_RRD, 0, 0, S);
    add(20, "14.1", S_RRD, C_WRITE,  1, X_NOT_INV, S_WR,  0, 0, M);
    add(21, "14.2", S_RRD, C_WRITE,  1, X_INV,     S_WR,  1, 0, 0);
    add(22, "16.1", S_RD,  C_READ,   1, X_NONE,    S_RD,  0, 0, E);
    add(23, "16.2", S_RD,  C_READ,   0, X_NONE,    S_RD,  0, 1, E);
    add(24, "17.1", S_WR,  C_WRITE,  1, X_NOT_INV, S_WR,  0, 0, M);
    add(25, "17.2", S_WR,  C_WRITE,  1, X_INV,     S_WR,  1, 0, 0);
    add(26, "18",   S_RRD, C_RREAD,  1, X_NONE,    S_RRD, 0, 0, S);
    add(27, "19",   S_RWR, C_RWRITE, 1, X_NONE,    S_RWR, 0, 0, INV);
    arc_hits["2"] = 0;  arc_hits["4"] = 0;  arc_hits["6"] = 0;
    arc_hits["8"] = 0;  arc_hits["15"] = 0; arc_hits["start"] = 0;
    arc_hits["hold"] = 0;
  end

  function automatic bit cls_true(input cls_e c);
    case (c)
      C_READ:   return  cp && rd;
      C_WRITE:  return  cp && wr;
      C_RREAD:  return !cp && rd;
      default:  return !cp && wr;
    endcase
  endfunction

  function automatic bit extra_true(input extra_e x, input logic [3:0] st);
    case (x)
      X_NOT_INV: return st != INV;
      X_INV:     return st == INV;
      X_MOD:     return st == M;
      default:   return 1'b1;
    endcase
  endfunction

  // model of one clock cycle: compare combinational outputs, then advance
  task automatic step();
    logic [23:0] tg;
    logic [5:0]  ix;
    bit tm, matched, exp_tag_push;
    logic [2:0] nxt;
    bit exp_i;
    logic [3:0] exp_mesi_wr;
    string arc;
    #1;
    tg = addr[31:8];
    ix = addr[7:2];
    tm = (m_tag[ix] == tg);
    nxt = m_state; exp_i = 0; exp_tag_push = 0; exp_mesi_wr = '0; arc = "hold";
    matched = 0;
    if (!rd && !wr) begin
      nxt = S_ID;
      case (m_state)
        S_RD: arc = "2"; S_WR: arc = "4"; S_RRD: arc = "6"; S_RWR: arc = "8";
        default: arc = "15";
      endcase
    end else begin
      for (int c = 0; c < 4 && !matched; c++)
        for (int r = 0; r < NROWS && !matched; r++)
          if (rows[r].cls == cls_e'(c) && rows[r].src == m_state && cls_true(rows[r].cls) &&
              rows[r].tm == tm && extra_true(rows[r].extra, m_mesi[ix])) begin
            matched      = 1;
            arc          = rows[r].arc;
            nxt          = rows[r].dst;
            exp_i        = rows[r].inv;
            exp_tag_push = rows[r].set_tag || (ALWAYS_TAG && rows[r].cls == C_READ);
            exp_mesi_wr  = rows[r].set_mesi;
          end
    end
    arc_hits[arc]++;
    check(longint'(dut.tag_rd), longint'(m_tag[ix]), "stored tag");
    check(longint'(dut.mesi_rd), longint'(m_mesi[ix]), "stored status");
    check(longint'(I), longint'(exp_i), {"I on arc ", arc});
    check(longint'(dut.state_d), longint'(nxt), {"next state on arc ", arc});
    check(longint'(dut.tag_push), longint'(exp_tag_push), {"tag write on arc ", arc});
    check(longint'(dut.mesi_push), longint'(exp_mesi_wr != 0), {"status write on arc ", arc});
    if (exp_mesi_wr != 0)
      check(longint'(dut.mesi_push_data), longint'(exp_mesi_wr), {"status value on arc ", arc});
    if (dut.tag_push) tag_writes++;
    @(posedge clk);
    if (exp_tag_push) m_tag[ix] = tg;
    if (exp_mesi_wr != 0) m_mesi[ix] = exp_mesi_wr;
    m_state = nxt;
    #1 check(longint'(dut.state_q), longint'(m_state), "state register");
  endtask

  task automatic bus(input logic r, input logic w, input logic c, input logic [31:0] a);
    rd = r; wr = w; cp = c; addr = a;
    step();
  endtask

  task automatic do_reset();
    #2 res_n = 1'b0;
    #1;
    for (int i = 0; i < 64; i++) begin m_tag[i] = '0; m_mesi[i] = '0; end
    m_state = S_ID;
    arc_hits["start"]++;
    check(longint'(dut.state_q), longint'(S_ID), "asynchronous reset to ID");
    check(longint'(I), 0, "I low in reset");
    @(posedge clk); #1;
    res_n = 1'b1;
  endtask

  function automatic logic [31:0] mk(input logic [23:0] t, input logic [5:0] i);
    return {t, i, 2'b00};
  endfunction

  // directed sequence that passes through every arc
  task automatic directed();
    logic [31:0] a = mk(24'h00ABCD, 6'd5);
    logic [31:0] b = mk(24'h001234, 6'd5);   // same line, other tag
    bus(1, 0, 1, a);   // 1.2  ID->RD miss
    bus(1, 0, 1, a);   // 16.1
    bus(1, 0, 1, b);   // 16.2
    bus(1, 0, 1, a);   // 16.2
    bus(0, 1, 1, a);   // 9    RD->WR
    bus(0, 1, 1, a);   // 17.1
    bus(1, 0, 1, a);   // A    WR->RD
    bus(1, 0, 0, a);   // 10   RD->rRD
    bus(1, 0, 0, a);   // 18
    bus(0, 1, 0, a);   // E    rRD->rWR
    bus(0, 1, 0, a);   // 19
    bus(0, 1, 1, a);   // C.2  I=1
    bus(0, 1, 1, a);   // 17.2 I=1
    bus(0, 1, 0, a);   // B    WR->rWR
    bus(1, 0, 1, a);   // 12.1
    bus(0, 1, 0, a);   // 11   RD->rWR
    bus(1, 0, 1, b);   // 12.2
    bus(0, 1, 1, b);   // 9
    bus(1, 0, 0, b);   // 13   WR->rRD
    bus(1, 0, 1, a);   // F.2
    bus(1, 0, 0, a);   // 10
    bus(1, 0, 1, a);   // F.1
    bus(0, 0, 0, a);   // 2
    bus(0, 0, 0, a);   // 15
    bus(1, 0, 1, a);   // 1.1
    bus(0, 1, 1, a);   // 9
    bus(0, 0, 0, a);   // 4
    bus(0, 1, 1, a);   // 3.1
    bus(0, 1, 0, a);   // B
    bus(0, 0, 0, a);   // 8
    bus(0, 1, 1, a);   // 3.2  I=1
    bus(1, 0, 0, a);   // 13
    bus(0, 0, 0, a);   // 6
    bus(0, 1, 0, a);   // 7
    bus(0, 1, 1, a);   // C.2
    bus(0, 1, 0, a);   // B
    bus(0, 0, 0, a);   // 8
    bus(1, 0, 0, a);   // 5    ID->rRD
    bus(0, 1, 1, a);   // 14.1
    bus(1, 0, 0, a);   // 13
    bus(0, 1, 0, a);   // E
    bus(0, 0, 0, a);   // 8
    bus(1, 0, 1, a);   // 1.1
    bus(0, 1, 1, a);   // 9  line now Modified
    bus(0, 1, 0, b);   // miss on a remote write: hold in WR
    bus(0, 1, 0, mk(24'h00ABCD, 6'd9)); // WR: remote write hit on an untouched line? tag differs: hold
    bus(0, 1, 0, mk(24'h000000, 6'd9)); // B: tag 0 matches a reset line
    bus(1, 0, 0, a);   // D   rWR->rRD on a Modified line
    bus(0, 1, 0, a);   // E
    bus(1, 0, 0, a);   // hold: line is Invalid, not Modified
    bus(0, 1, 1, a);   // C.2
    bus(1, 0, 0, a);   // 13
    bus(0, 1, 1, a);   // 14.2 I=1
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin m_tag[i] = '0; m_mesi[i] = '0; end
    m_state = S_ID;
    arc_hits["start"]++;
    repeat (3) @(posedge clk);
    #1 res_n = 1'b1;
    @(posedge clk); #1;

    // ---- 1. the published single-read waveform ----
    rd = 1; cp = 1; addr = 32'hDEADBEEF; #1;
    check(longint'(dut.state_q), longint'(S_ID), "waveform: idle before the read");
    check(longint'(dut.state_d), longint'(S_RD), "waveform: next state RD");
    check(longint'(dut.tag_push), 1, "waveform: tag write requested");
    check(longint'(dut.u_tag_mem.g_ram.u_ram.mem[59]), 0, "waveform: tag not yet written");
    step();
    check(longint'(dut.u_tag_mem.g_ram.u_ram.mem[59]), 'hDEADBE, "waveform: TAG[59]");
    check(longint'(dut.u_mesi_mem.g_ram.u_ram.mem[59]), 'b0100, "waveform: MESI[59]");
    check(longint'(dut.state_q), longint'(S_RD), "waveform: state RD after one edge");
    bus(0, 0, 0, 32'h0);
    check(longint'(dut.state_q), longint'(S_ID), "waveform: back to idle");

    // ---- 2. directed arcs ----
    directed();

    // ---- 3. random traffic ----
    for (int n = 0; n < 40000; n++) begin
      logic [23:0] t;
      logic [5:0] ix;
      int k;
      if ($urandom_range(0, 9999) == 0) begin
        do_reset();
        continue;
      end
      t  = 24'($urandom_range(0, 2));
      ix = 6'($urandom_range(0, 3));
      k  = $urandom_range(0, 99);
      if (k < 15)      bus(0, 0, 1'($urandom), mk(t, ix));
      else if (k < 18) bus(1, 1, 1'($urandom), mk(t, ix));
      else             bus(1'(k % 2), 1'(~k % 2), 1'($urandom), mk(t, ix));
    end

    // ---- 4. sweep of all lines ----
    for (int i = 0; i < 64; i++) bus(0, 0, 0, mk(24'h0, 6'(i)));

    // every arc must have fired
    foreach (arc_hits[a]) begin
      $display("arc %-5s taken %0d times", a, arc_hits[a]);
      checks++;
      if (arc_hits[a] == 0) begin
        failures++;
        $display("FAIL arc %s never taken", a);
      end
    end
    $display("tag writes: %0d", tag_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
