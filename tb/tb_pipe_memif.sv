// Testbench for pipe_memif: all combinations of pending requests and input
// tags; checks the output tag and value, the priority order (block fetch,
// load address, store queue), the busy inhibit and the routing of input data.
module tb_pipe_memif;
  import pipe_pkg::*;
  otag_e out_tag, lar_tag, sq_tag;
  word_t out_data, in_data, maddr, fill_data, lar_addr, sq_data, ldq_data;
  itag_e in_tag;
  logic mreq, mack, fill_valid, lar_full, lar_take, sq_full, sq_take, ldq_push, busy;
  int checks = 0, failures = 0;

  pipe_memif dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int m = 0; m < 32; m++) begin
        mreq = m[0]; lar_full = m[1]; sq_full = m[2];
        in_tag = itag_e'(m[4:3]);
        maddr = 16'($urandom); lar_addr = 16'($urandom); sq_data = 16'($urandom);
        in_data = 16'($urandom);
        lar_tag = 1'($urandom) ? OT_LADDR : OT_ALT_LADDR;
        sq_tag  = otag_e'(($urandom % 3 == 0) ? OT_SDATA : (1'($urandom) ? OT_SADDR : OT_ALT_SADDR));
        #1;
        if (in_tag == IT_BUSY) begin
          chk(out_tag == OT_NONE && !mack && !lar_take && !sq_take, "busy inhibits output");
        end else if (mreq) begin
          chk(out_tag == OT_BLOCK && out_data == maddr && mack && !lar_take && !sq_take, "block fetch first");
        end else if (lar_full) begin
          chk(out_tag == lar_tag && out_data == lar_addr && lar_take && !sq_take, "load address second");
        end else if (sq_full) begin
          chk(out_tag == sq_tag && out_data == sq_data && sq_take, "store queue third");
        end else begin
          chk(out_tag == OT_NONE && !mack && !lar_take && !sq_take, "idle");
        end
        chk(fill_valid == (in_tag == IT_INSTR) && fill_data == in_data, "instruction routing");
        chk(ldq_push == (in_tag == IT_DATA) && ldq_data == in_data, "load data routing");
        chk(busy == (in_tag == IT_BUSY), "busy");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
