// Testbench for pipe_shifter: every amount and operation on random operands,
// compared with the shift operators of the language.
module tb_pipe_shifter;
  import pipe_pkg::*;
  word_t a_bus, b_bus, result, expv;
  shop_e op;
  int checks = 0, failures = 0;

  pipe_shifter dut (.*);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < 16; k++) begin
        for (int o = 0; o < 4; o++) begin
          a_bus = (n == 0) ? 16'h8001 : 16'($urandom);
          b_bus = {12'($urandom), 4'(k)};
          op = shop_e'(o);
          #1;
          unique case (op)
            SH_SLL: expv = a_bus << k;
            SH_SRL: expv = a_bus >> k;
            SH_SRA: expv = word_t'($signed(a_bus) >>> k);
            default: expv = (a_bus >> k) | word_t'({a_bus, 16'h0} >> k);
          endcase
          checks++;
          if (result !== expv) begin
            failures++;
            $display("FAIL op=%0d a=%h k=%0d got %h want %h", o, a_bus, k, result, expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
