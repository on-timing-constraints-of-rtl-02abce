// tb_rfq: random push/pop traffic against a queue model; checks order,
// empty/full/count, that a push into a full queue is refused and that pushes
// and pops in the same cycle both happen.
module tb_rfq;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] push_data, head;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, cycles = 0;
  int fulls = 0, simult = 0;
  logic [W-1:0] model [$];

  rfq #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(head == model[0], "head order");
      // bias towards filling in the first half, draining in the second
      push = ($urandom % 100) < ((i % 400) < 200 ? 70 : 30) && !full;
      pop  = ($urandom % 100) < ((i % 400) < 200 ? 30 : 70) && !empty;
      push_data = W'($urandom);
      if (full) fulls++;
      if (push && pop) simult++;
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_data);
      cycles++;
    end
    check(fulls > 0, "queue became full");
    check(simult > 0, "simultaneous push and pop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
