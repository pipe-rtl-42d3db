// Testbench for pipe_bq: random pushes and pops of branch outcomes against a
// reference queue, with full and empty status, including simultaneous push
// and pop on a full queue.
module tb_pipe_bq;
  logic clk = 0, rst_n = 0;
  logic push, push_bit, pop, head, empty, full;
  int checks = 0, failures = 0, fulls = 0;
  bit q[$];

  pipe_bq #(.DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; push_bit = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      pop = (q.size() > 0) && ($urandom % 3 == 0);
      push = (q.size() < 4 || pop) && 1'($urandom);
      push_bit = 1'($urandom);
      #1;
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == 4), "full");
      if (q.size() > 0) chk(head == q[0], "head");
      if (full) fulls++;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(push_bit);
    end
    chk(fulls > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
