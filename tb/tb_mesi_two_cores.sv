// tb_mesi_two_cores: two protocol engines on one shared address bus, as in a
// two-core system with dedicated caches. Engine k sees cp = 1 when core k
// drives the bus and cp = 0 when the other core does. The sequence walks one
// address through the sharing scenario the protocol is built for and checks
// each engine's stored status against the status rules (own read -> E, own
// write -> M, remote read of a held line -> S, remote write of a held line
// -> I) and the I output on an own write to an invalidated line:
//   core 0 reads X   engine 0: E (tag stored)        engine 1: untouched
//   core 1 reads X   engine 1: E (tag stored)        engine 0: S
//   core 0 writes X  engine 0: M                     engine 1: I
//   core 1 writes X  engine 1: stays I, raises I     engine 0: I
//   core 0 reads X   engine 0: E                     engine 1: S
// It also checks that an access to another line leaves X alone, and that a
// remote access to a line an engine never loaded changes nothing there.
module tb_mesi_two_cores;
  logic clk = 1'b0, res_n = 1'b0;
  logic rd = 1'b0, wr = 1'b0;
  logic owner = 1'b0;             // which core drives the bus
  logic [31:0] addr = '0;
  logic i0, i1;
  int checks = 0, failures = 0;

  localparam logic [3:0] M = 4'b1000, E = 4'b0100, S = 4'b0010, INV = 4'b0001;
  localparam logic [31:0] X = 32'h1234_5678;   // index 30, tag 123456
  localparam logic [31:0] Y = 32'hCAFE_0010;   // index 4, tag CAFE00

  mesi_uma u_eng0 (.clk, .res_n, .rd, .wr, .cp(owner == 1'b0), .addr, .I(i0));
  mesi_uma u_eng1 (.clk, .res_n, .rd, .wr, .cp(owner == 1'b1), .addr, .I(i1));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one bus cycle; returns the I outputs seen during it
  task automatic access(input logic core, input logic r, input logic w, input logic [31:0] a,
                        output logic o0, output logic o1);
    owner = core; rd = r; wr = w; addr = a;
    #1 o0 = i0; o1 = i1;
    @(posedge clk); #1;
    rd = 1'b0; wr = 1'b0;
    @(posedge clk); #1;   // one idle cycle between accesses
  endtask

  // stored status and tag of address a in engine k, read through the
  // engines' TAG and MESI memories
  function automatic logic [3:0] st(input int k, input logic [31:0] a);
    return (k == 0) ? u_eng0.u_mesi_mem.g_ram.u_ram.mem[a[7:2]]
                    : u_eng1.u_mesi_mem.g_ram.u_ram.mem[a[7:2]];
  endfunction
  function automatic logic [23:0] tg(input int k, input logic [31:0] a);
    return (k == 0) ? u_eng0.u_tag_mem.g_ram.u_ram.mem[a[7:2]]
                    : u_eng1.u_tag_mem.g_ram.u_ram.mem[a[7:2]];
  endfunction

  initial begin
    logic o0, o1;
    repeat (2) @(posedge clk);
    #1 res_n = 1'b1;
    @(posedge clk); #1;

    access(0, 1, 0, X, o0, o1);
    check(tg(0, X), X[31:8], "core 0 read: tag stored in engine 0");
    check(st(0, X), E, "core 0 read: engine 0 Exclusive");
    check(st(1, X), 0, "core 0 read: engine 1 untouched (line not held)");
    check(tg(1, X), 0, "core 0 read: engine 1 tag untouched");

    access(1, 1, 0, X, o0, o1);
    check(st(1, X), E, "core 1 read: engine 1 Exclusive");
    check(st(0, X), S, "core 1 read: engine 0 Shared");

    access(0, 0, 1, X, o0, o1);
    check(o0, 0, "core 0 write: no invalid indication");
    check(st(0, X), M, "core 0 write: engine 0 Modified");
    check(st(1, X), INV, "core 0 write: engine 1 Invalid");

    access(1, 0, 1, X, o0, o1);
    check(o1, 1, "core 1 write to an invalidated line: I raised");
    check(o0, 0, "core 1 write: engine 0 does not raise I");
    check(st(1, X), INV, "core 1 write: engine 1 stays Invalid");
    check(st(0, X), INV, "core 1 write: engine 0 Invalid");

    access(0, 1, 0, X, o0, o1);
    check(st(0, X), E, "core 0 re-read: engine 0 Exclusive");
    check(st(1, X), S, "core 0 re-read: engine 1 Shared");

    access(1, 1, 0, Y, o0, o1);
    check(st(1, Y), E, "core 1 reads Y: engine 1 Exclusive");
    check(tg(0, Y), 0, "core 1 reads Y: engine 0 holds no tag for Y");
    check(st(0, Y), 0, "core 1 reads Y: engine 0 status for Y untouched");
    check(st(0, X), E, "access to Y leaves X in engine 0");
    check(st(1, X), S, "access to Y leaves X in engine 1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
