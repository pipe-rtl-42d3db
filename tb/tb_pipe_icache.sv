// Testbench for pipe_icache: random fetch addresses in a region larger than
// the cache (so lines conflict and are replaced), a memory model that answers
// a block fetch after a random delay with the four words in word order.
// Checks every returned word, that a hit answers in the cycle of the
// request, that a miss refills the line with exactly one block fetch of the
// line's first address and passes the requested word through as the last
// word arrives, and that lines stay valid afterwards.
module tb_pipe_icache;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t pc, rdata, maddr, fill_data;
  logic req, rvalid, hit, mreq, mack, fill_valid, miss_start;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  pipe_icache dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h", what, pc); end
  endtask

  function automatic word_t memw(input word_t a);
    return a ^ 16'h5A3C ^ {a[7:0], a[15:8]};
  endfunction

  // memory model: accept a request, wait, send four words
  word_t line_a; int delay; int sending;
  initial begin
    mack = 0; fill_valid = 0; fill_data = 0; sending = 0;
    forever begin
      @(negedge clk);
      mack = 0; fill_valid = 0;
      if (sending > 0) begin
        if (delay > 0) delay--;
        else begin
          fill_valid = 1; fill_data = memw(line_a + word_t'(4 - sending));
          sending--;
        end
      end else if (mreq && rst_n) begin
        mack = 1; line_a = maddr; delay = $urandom % 4; sending = 4;
        chk(maddr[1:0] == 2'b00 && maddr[15:2] == pc[15:2], "block fetch address");
      end
    end
  end

  initial begin
    pc = 0; req = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // region of 2 tags x 16 lines x 4 words, plus a far address now and then
      pc = ($urandom % 16 == 0) ? 16'($urandom) : {9'b0, 1'($urandom), 6'($urandom)};
      req = 1;
      #2;
      if (hit) begin
        chk(rvalid && rdata == memw(pc), "hit data in the same cycle");
        hits++;
      end else begin
        int wait_c;
        wait_c = 0;
        misses++;
        while (!rvalid && wait_c < 50) begin @(negedge clk); #2; wait_c++; end
        chk(rvalid && rdata == memw(pc), "miss data passed through");
        chk(fill_valid, "pass-through with last word");
        @(negedge clk); #2;
        chk(hit && rdata == memw(pc), "line valid after refill");
      end
      req = 0;
    end
    chk(hits > 100 && misses > 20, "both hits and misses seen");
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
