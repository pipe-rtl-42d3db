// Testbench for pipe_ldq: random pushes and pops against a reference queue,
// never popping an unavailable element or overfilling. Checks the head,
// full/empty status, count, the removal of two elements at once (head and
// head2, as for an instruction naming R7 twice) and the bypass of arriving
// data into an empty queue (used in the cycle it arrives, not stored).
module tb_pipe_ldq;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, pop, pop2, head_valid, empty, full;
  word_t push_data, head, head2;
  logic [1:0] count;
  int checks = 0, failures = 0, bypasses = 0, fulls = 0, doubles = 0;
  word_t q[$];

  pipe_ldq #(.DEPTH(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; pop2 = 0; push_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      push = 1'($urandom) && (q.size() < 3 || 1'($urandom));
      push_data = 16'($urandom);
      #1;
      // pop only when something is there (stored or arriving)
      pop = 1'($urandom) && (q.size() > 0 || push);
      if (push && q.size() == 3) pop = 1;
      pop2 = pop && q.size() >= 2 && ($urandom_range(0, 2) == 0);
      #1;
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == 3), "full");
      chk(count == 2'(q.size()), "count");
      chk(head_valid == (q.size() > 0 || push), "head valid");
      if (q.size() > 1) chk(head2 == q[1], "second element");
      if (pop2) doubles++;
      if (q.size() > 0) chk(head == q[0], "head");
      else if (push) begin chk(head == push_data, "bypass data"); if (pop) bypasses++; end
      if (full) fulls++;
      @(posedge clk);
      if (q.size() == 0 && push && pop) ;              // bypassed
      else begin
        if (pop) void'(q.pop_front());
        if (pop2) void'(q.pop_front());
        if (push) q.push_back(push_data);
      end
    end
    chk(bypasses > 0, "bypass exercised");
    chk(fulls > 0, "full exercised");
    chk(doubles > 0, "two-element removal exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
