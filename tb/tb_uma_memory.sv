// tb_uma_memory: self-checking testbench for uma_memory. Four instances, one
// of each memory type (RAM, queue, stack, CAM, 8 x 8 bits), are driven
// through the common port set with the same short sequence: PUSH 11, 22, 33
// (at addresses 1, 2, 3 where an address is used), then reads. Expected
// results: the RAM returns the word at the read address, the queue returns
// 11 first, the stack returns 33 first, the CAM returns the address holding
// the searched content; errors on an empty queue/stack are flagged.
module tb_uma_memory;
  import uma_pkg::*;
  localparam int unsigned W = 8, D = 8, AW = 3;
  logic clk = 1'b0, res_n = 1'b0;
  logic push = 1'b0, rd = 1'b0, pop = 1'b0;
  logic [AW-1:0] push_addr = '0, rd_addr = '0;
  logic [W-1:0]  push_data = '0, rd_key = '0;
  logic [W-1:0]  rd_data [4];
  logic [AW-1:0] rd_index [4];
  logic          found [4], err [4];
  int checks = 0, failures = 0;

  uma_memory #(.KIND(MEM_RAM),   .WIDTH(W), .DEPTH(D)) u_ram (
    .clk, .res_n, .push, .push_addr, .push_data, .rd, .pop, .rd_addr, .rd_key,
    .rd_data(rd_data[0]), .rd_index(rd_index[0]), .found(found[0]), .err(err[0]));
  uma_memory #(.KIND(MEM_QUEUE), .WIDTH(W), .DEPTH(D)) u_queue (
    .clk, .res_n, .push, .push_addr, .push_data, .rd, .pop, .rd_addr, .rd_key,
    .rd_data(rd_data[1]), .rd_index(rd_index[1]), .found(found[1]), .err(err[1]));
  uma_memory #(.KIND(MEM_STACK), .WIDTH(W), .DEPTH(D)) u_stack (
    .clk, .res_n, .push, .push_addr, .push_data, .rd, .pop, .rd_addr, .rd_key,
    .rd_data(rd_data[2]), .rd_index(rd_index[2]), .found(found[2]), .err(err[2]));
  uma_memory #(.KIND(MEM_CAM),   .WIDTH(W), .DEPTH(D)) u_cam (
    .clk, .res_n, .push, .push_addr, .push_data, .rd, .pop, .rd_addr, .rd_key,
    .rd_data(rd_data[3]), .rd_index(rd_index[3]), .found(found[3]), .err(err[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic cycle();
    @(posedge clk); #1;
    push = 1'b0; rd = 1'b0; pop = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 res_n = 1'b1;
    // empty queue and stack: TOP gives zero with an error
    rd = 1'b1; #1;
    check(int'(err[1]), 1, "queue empty err");
    check(int'(err[2]), 1, "stack empty err");
    check(int'(rd_data[1]), 0, "queue empty data");
    check(int'(found[2]), 0, "stack empty found");
    cycle();
    for (int i = 1; i <= 3; i++) begin
      push = 1'b1; push_addr = AW'(i); push_data = W'(8'h11 * i);
      cycle();
    end
    // TOP: RAM address 2, CAM key 33
    rd = 1'b1; rd_addr = 3'd2; rd_key = 8'h33; #1;
    check(int'(rd_data[0]), 'h22, "RAM TOP");
    check(int'(rd_data[1]), 'h11, "queue TOP");
    check(int'(rd_data[2]), 'h33, "stack TOP");
    check(int'(rd_index[3]), 3, "CAM TOP address");
    check(int'(found[3]), 1, "CAM found");
    check(int'(err[1]) + int'(err[2]), 0, "no errors");
    cycle();
    // POP twice
    rd = 1'b1; pop = 1'b1; rd_addr = 3'd2; rd_key = 8'h33; #1;
    check(int'(rd_data[1]), 'h11, "queue POP 1");
    check(int'(rd_data[2]), 'h33, "stack POP 1");
    cycle();
    rd = 1'b1; pop = 1'b1; rd_addr = 3'd2; rd_key = 8'h33; #1;
    check(int'(rd_data[0]), 0, "RAM cleared by POP");
    check(int'(rd_data[1]), 'h22, "queue POP 2");
    check(int'(rd_data[2]), 'h22, "stack POP 2");
    check(int'(found[3]), 0, "CAM entry deleted by POP");
    cycle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
