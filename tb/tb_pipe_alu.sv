// Testbench for pipe_alu: random operands through both stages. Checks the
// stage-1 logic functions and flags in the first cycle and the stage-2 sum,
// carry and overflow one cycle later, with back-to-back operations, against
// reference arithmetic.
module tb_pipe_alu;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t a, b, logic_out, sum;
  logic sub, s1_load, zero, sign, cout, ovf;
  logic [3:0] tt;
  int checks = 0, failures = 0;

  pipe_alu dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t pa, pb; logic psub, have;
  initial begin
    a = 0; b = 0; sub = 0; tt = 0; s1_load = 0; have = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // stage-2 result of the previous cycle's operation
      if (have) begin
        logic [16:0] full;
        word_t bx;
        bx   = psub ? ~pb : pb;
        full = {1'b0, pa} + {1'b0, bx} + 17'(psub);
        chk(sum == full[15:0], "sum");
        chk(cout == full[16], "carry out");
        chk(ovf == ((pa[15] == bx[15]) && (full[15] != pa[15])), "overflow");
      end
      a = (n % 50 == 0) ? 16'h0 : (n % 7 == 0) ? 16'h7FFF : 16'($urandom);
      b = (n % 11 == 0) ? 16'h8000 : 16'($urandom);
      sub = 1'($urandom); tt = 4'($urandom);
      s1_load = 1'b1;
      #1;
      for (int i = 0; i < 16; i++) chk(logic_out[i] == tt[{a[i], b[i]}], "logic function");
      chk(zero == (a == 0), "zero flag");
      chk(sign == a[15], "sign flag");
      pa = a; pb = b; psub = sub; have = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
