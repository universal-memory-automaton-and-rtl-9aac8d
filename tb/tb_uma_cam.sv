// tb_uma_cam: self-checking testbench for uma_cam (8 x 8-bit default).
// Replays the CAM example of the UMA definition on a zero-initialised CAM
// (PUSH(C,0,00), PUSH(C,7,FF); TOP(C,00) returns 0; POP(C,FF) returns 7 and
// deletes it, so a second POP(C,FF) finds nothing), then runs 3000 cycles of
// random PUSH/TOP/POP traffic against a reference array with valid bits,
// checking the returned lowest matching address and the found flag.
module tb_uma_cam;
  localparam int unsigned W = 8, D = 8, AW = 3;
  logic clk = 1'b0, res_n = 1'b0;
  logic wr = 1'b0, rd = 1'b0, pop = 1'b0;
  logic [AW-1:0] wr_addr = '0, match_addr;
  logic [W-1:0]  wr_data = '0, rd_key = '0;
  logic found;
  int checks = 0, failures = 0, hits_seen = 0, misses_seen = 0;
  logic [W-1:0] mdata [D];
  logic         mvalid [D];

  uma_cam dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic op(input logic w, input logic [AW-1:0] wa, input logic [W-1:0] wd,
                    input logic r, input logic p, input logic [W-1:0] key);
    int exp_addr;
    logic exp_found;
    wr = w; wr_addr = wa; wr_data = wd; rd = r; pop = p; rd_key = key;
    #1;
    exp_addr = 0; exp_found = 1'b0;
    if (r)
      for (int i = int'(D) - 1; i >= 0; i--)
        if (mvalid[i] && mdata[i] == key) begin exp_addr = i; exp_found = 1'b1; end
    check(int'(found), int'(exp_found), "found");
    check(int'(match_addr), exp_addr, "match_addr");
    if (exp_found) hits_seen++; else if (r) misses_seen++;
    @(posedge clk); #1;
    wr = 1'b0; rd = 1'b0; pop = 1'b0;
    if (exp_found && p) begin mvalid[exp_addr] = 1'b0; mdata[exp_addr] = '0; end
    if (w) begin mvalid[wa] = 1'b1; mdata[wa] = wd; end
  endtask

  initial begin
    for (int i = 0; i < int'(D); i++) begin mdata[i] = '0; mvalid[i] = 1'b1; end
    repeat (2) @(posedge clk);
    #1 res_n = 1'b1;
    // example of the UMA definition
    op(1, 3'b000, 8'h00, 0, 0, 0);
    op(1, 3'b111, 8'hFF, 0, 0, 0);
    op(0, 0, 0, 1, 0, 8'h00); // TOP(C,00) -> 0
    op(0, 0, 0, 1, 1, 8'hFF); // POP(C,FF) -> 7
    op(0, 0, 0, 1, 1, 8'hFF); // deleted: not found
    op(0, 0, 0, 1, 0, 8'h00); // TOP keeps entry 0
    // random traffic over a small content set so that searches hit
    for (int n = 0; n < 3000; n++)
      op(1'($urandom), AW'($urandom), W'($urandom_range(0, 5)),
         1'($urandom), 1'($urandom_range(0, 3) == 0), W'($urandom_range(0, 6)));
    if (hits_seen == 0 || misses_seen == 0) begin
      failures++;
      $display("FAIL hit or miss never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
