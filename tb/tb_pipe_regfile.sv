// Testbench for pipe_regfile: random writes and reads against a reference
// array, bank flag toggled by swap, reset values, both read ports.
module tb_pipe_regfile;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] a_addr, b_addr, c_addr;
  word_t a_data, b_data, c_data;
  logic c_en, swap, fg;
  int checks = 0, failures = 0;
  word_t ref_r [16];
  logic ref_fg;

  pipe_regfile dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    c_en = 0; swap = 0; a_addr = 0; b_addr = 0; c_addr = 0; c_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (ref_r[i]) ref_r[i] = 0;
    ref_fg = 0;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin a_addr = 4'(i); #1 chk(a_data == 0, "reset value"); end
    chk(fg == 0, "reset bank");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      c_en = 1'($urandom); c_addr = 4'($urandom); c_data = 16'($urandom);
      swap = ($urandom % 8) == 0;
      a_addr = 4'($urandom); b_addr = 4'($urandom);
      #1;
      chk(a_data == ref_r[a_addr], "port A");
      chk(b_data == ref_r[b_addr], "port B");
      chk(fg == ref_fg, "bank flag");
      @(posedge clk);
      if (c_en) ref_r[c_addr] = c_data;
      if (swap) ref_fg = ~ref_fg;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
