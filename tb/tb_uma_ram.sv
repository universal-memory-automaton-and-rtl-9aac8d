// tb_uma_ram: self-checking testbench for uma_ram (8 x 8-bit default size).
// First replays the RAM example of the UMA definition: PUSH(R, 0, FF), then
// two POPs of address 0 return FF and then 00, and two TOPs return the same
// value twice. Then 2000 cycles of random PUSH/TOP/POP traffic are compared
// with a reference array held in the testbench, including a PUSH and a POP on
// the same address in one cycle (the PUSH wins) and the clearing reset.
module tb_uma_ram;
  localparam int unsigned W = 8, D = 8, AW = 3;
  logic clk = 1'b0, res_n = 1'b0;
  logic wr = 1'b0, rd = 1'b0, pop = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0]  wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model [D];

  uma_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one cycle with the given operation; rd_data is sampled before the edge
  task automatic op(input logic w, input logic [AW-1:0] wa, input logic [W-1:0] wd,
                    input logic r, input logic p, input logic [AW-1:0] ra,
                    output logic [W-1:0] q);
    wr = w; wr_addr = wa; wr_data = wd; rd = r; pop = p; rd_addr = ra;
    #1 q = rd_data;
    @(posedge clk); #1;
    wr = 1'b0; rd = 1'b0; pop = 1'b0;
  endtask

  initial begin
    logic [W-1:0] q;
    for (int i = 0; i < int'(D); i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 res_n = 1'b1;
    // reset contents are zero
    for (int i = 0; i < int'(D); i++) begin
      op(0, 0, 0, 1, 0, AW'(i), q); check(q, 8'h00, "reset content");
    end
    // example of the UMA definition
    op(1, 3'b000, 8'hFF, 0, 0, 0, q);
    op(0, 0, 0, 1, 0, 3'b000, q); check(q, 8'hFF, "TOP 1");
    op(0, 0, 0, 1, 0, 3'b000, q); check(q, 8'hFF, "TOP 2");
    op(0, 0, 0, 1, 1, 3'b000, q); check(q, 8'hFF, "POP 1");
    op(0, 0, 0, 1, 1, 3'b000, q); check(q, 8'h00, "POP 2");
    // rd low gives zero
    op(1, 3'd5, 8'hA5, 0, 0, 0, q);
    op(0, 0, 0, 0, 0, 3'd5, q); check(q, 8'h00, "rd low");
    model[5] = 8'hA5;
    // PUSH and POP on the same address: PUSH wins
    op(1, 3'd5, 8'h3C, 1, 1, 3'd5, q); check(q, 8'hA5, "pop old value");
    model[5] = 8'h3C;
    op(0, 0, 0, 1, 0, 3'd5, q); check(q, 8'h3C, "push wins over pop");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      logic w, r, p;
      logic [AW-1:0] wa, ra;
      logic [W-1:0] wd;
      w = 1'($urandom); r = 1'($urandom); p = 1'($urandom);
      wa = AW'($urandom); ra = AW'($urandom); wd = W'($urandom);
      op(w, wa, wd, r, p, ra, q);
      check(q, r ? model[ra] : '0, "random read");
      if (r && p) model[ra] = '0;
      if (w) model[wa] = wd;
    end
    // asynchronous reset clears everything
    res_n = 1'b0; #2; res_n = 1'b1;
    for (int i = 0; i < int'(D); i++) begin
      op(0, 0, 0, 1, 0, AW'(i), q); check(q, 8'h00, "cleared by reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
