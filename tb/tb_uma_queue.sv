// tb_uma_queue: self-checking testbench for uma_queue (8 x 8-bit default).
// Replays the queue example of the UMA definition (PUSH 00, PUSH FF; two TOPs
// return 00 twice; POP returns 00 then FF, after which the queue is empty),
// the error cases (POP/TOP on an empty queue return zero with err, PUSH on a
// full queue is refused with err) and then 3000 cycles of random
// PUSH/TOP/POP traffic against a reference queue held in the testbench.
module tb_uma_queue;
  localparam int unsigned W = 8, D = 8, AW = 3;
  logic clk = 1'b0, res_n = 1'b0;
  logic push = 1'b0, rd = 1'b0, pop = 1'b0;
  logic [W-1:0] push_data = '0, rd_data;
  logic err, empty, full;
  logic [AW:0] count;
  int checks = 0, failures = 0;
  int errs_seen = 0, fulls_seen = 0;
  logic [W-1:0] model [$];

  uma_queue dut (.*);

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

  // one cycle: drive, compare with the model, let the edge happen, update model
  task automatic op(input logic pu, input logic [W-1:0] d, input logic r, input logic p);
    logic exp_err, pop_ok, push_ok;
    logic [W-1:0] exp_q;
    push = pu; push_data = d; rd = r; pop = p;
    #1;
    pop_ok  = r && p && model.size() > 0;
    push_ok = pu && (model.size() < int'(D) || pop_ok);
    exp_err = (r && model.size() == 0) || (pu && !push_ok);
    exp_q   = (r && model.size() > 0) ? model[0] : '0;
    check(rd_data, exp_q, "rd_data");
    check(W'(err), W'(exp_err), "err");
    check(W'(count), W'(model.size()), "count");
    check(W'(empty), W'(model.size() == 0), "empty");
    check(W'(full), W'(model.size() == int'(D)), "full");
    if (err) errs_seen++;
    if (full) fulls_seen++;
    @(posedge clk); #1;
    push = 1'b0; rd = 1'b0; pop = 1'b0;
    if (pop_ok) void'(model.pop_front());
    if (push_ok) model.push_back(d);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 res_n = 1'b1;
    // example of the UMA definition
    op(1, 8'h00, 0, 0);
    op(1, 8'hFF, 0, 0);
    op(0, 0, 1, 0); check(model[0], 8'h00, "TOP returns 00");
    op(0, 0, 1, 0);
    op(0, 0, 1, 1);
    op(0, 0, 1, 1);
    // now empty: POP and TOP give zero and err
    op(0, 0, 1, 1);
    op(0, 0, 1, 0);
    // fill up and overflow
    for (int i = 0; i < int'(D) + 2; i++) op(1, W'(8'h10 + i), 0, 0);
    // push and pop together on a full queue
    op(1, 8'hEE, 1, 1);
    // drain
    for (int i = 0; i < int'(D) + 1; i++) op(0, 0, 1, 1);
    // random traffic
    for (int n = 0; n < 3000; n++)
      op(1'($urandom_range(0, 99) < 55), W'($urandom), 1'($urandom), 1'($urandom));
    if (errs_seen == 0 || fulls_seen == 0) begin
      failures++;
      $display("FAIL error or full case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
