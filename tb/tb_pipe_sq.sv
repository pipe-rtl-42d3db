// Testbench for pipe_sq: writes and takes of the single store queue entry,
// checking data, tag and the full status bit.
module tb_pipe_sq;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr, take, full;
  word_t wr_data, data;
  otag_e wr_tag, tag;
  int checks = 0, failures = 0;
  logic rfull; word_t rdata; otag_e rtag;
  otag_e tags [3] = '{OT_SDATA, OT_SADDR, OT_ALT_SADDR};

  pipe_sq dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wr = 0; take = 0; wr_data = 0; wr_tag = OT_SDATA;
    repeat (2) @(posedge clk); rst_n = 1;
    rfull = 0;
    @(negedge clk);
    chk(!full, "empty after reset");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      take = rfull && 1'($urandom);
      wr = (!rfull || take) && 1'($urandom);
      wr_data = 16'($urandom); wr_tag = tags[$urandom % 3];
      #1;
      chk(full == rfull, "full");
      if (rfull) begin chk(data == rdata, "data"); chk(tag == rtag, "tag"); end
      @(posedge clk);
      if (wr) begin rfull = 1; rdata = wr_data; rtag = wr_tag; end
      else if (take) rfull = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
