// End-to-end testbench for pipe_machine at its default parameters, with the
// memory controller model. The access processor (A) walks two source arrays
// and a destination array, issuing alternate loads (data to the execute
// processor's LDQ) and alternate store addresses, and sends each loop
// decision through the branch queue. The execute processor (E) computes
// C[i] = (s << 1) ^ s with s = A[i] + B[i], taking both operands from its
// LDQ in one instruction (two elements at once), writes the results as
// store data, and branches on the outcomes it receives. E starts with a
// register-bank test and a delay loop, so that A runs ahead and the LDQ
// extension in the controller and the branch queue fill up.
// Checks every element of C and the bank-test result, that both processors
// end with empty queues, and that each mechanism occurred: alternate
// loads/stores, branch queue traffic and its full interlock, LDQ empty,
// two-element LDQ reads, LDQ-full holdback, result bus and SWAP interlocks, SQ full, forwarding,
// cache misses, branch transfers, memory busy, overflow.
module tb_pipe_machine;
  import pipe_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [2:0] a_out_tag, e_out_tag;
  logic [15:0] a_out_data, e_out_data, a_in_data, e_in_data;
  logic [1:0] a_in_tag, e_in_tag;
  logic a_ldq_full, e_ldq_full, a_interruptible, e_interruptible, a_overflow, e_overflow;
  int checks = 0, failures = 0;

  pipe_machine dut (.*);

  tb_pipe_mcu #(.LAT(3), .BUSY_PCT(5)) mcu (
    .clk, .a_out_tag, .a_out_data, .a_in_tag, .a_in_data, .a_ldq_full,
    .e_out_tag, .e_out_data, .e_in_tag, .e_in_data, .e_ldq_full
  );

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int pc [2] = '{0, 0};
  task automatic p1(input int u, input word_t w); mcu.imem[u][pc[u]] = w; pc[u]++; endtask
  task automatic p2(input int u, input logic [31:0] w); p1(u, w[31:16]); p1(u, w[15:0]); endtask

  localparam int N = 64;
  localparam word_t AB = 16'h1000, BB = 16'h2000, CB = 16'h3000, RES0 = 16'h0400, RES1 = 16'h0401, RES2 = 16'h0402, RES3 = 16'h0403, DONE = 16'h04FF;
  word_t av [N], bv [N];

  // mechanism counters
  int n_bqpush = 0, n_bqblk = 0, n_ldq = 0, n_cbus = 0, n_swap = 0, n_sq = 0, n_fwd = 0;
  int n_pop2 = 0;
  int n_miss = 0, n_redir = 0, n_busy = 0, n_ovf = 0, n_altld = 0, n_altst = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_a.bq_out_push) n_bqpush++;
    if (dut.u_a.blk_bq || dut.u_e.blk_bq) n_bqblk++;
    if (dut.u_e.blk_ldq) n_ldq++;
    if (dut.u_e.u_dp.ldq_pop2) n_pop2++;
    if (dut.u_a.blk_cbus || dut.u_e.blk_cbus) n_cbus++;
    if (dut.u_a.blk_swap || dut.u_e.blk_swap) n_swap++;
    if (dut.u_a.blk_sq || dut.u_e.blk_sq) n_sq++;
    if (dut.u_a.fwd_a || dut.u_a.fwd_b || dut.u_e.fwd_a || dut.u_e.fwd_b) n_fwd++;
    if (dut.u_a.miss_start || dut.u_e.miss_start) n_miss++;
    if (dut.u_a.redirect || dut.u_e.redirect) n_redir++;
    if (dut.u_a.mem_busy || dut.u_e.mem_busy) n_busy++;
    if (a_overflow || e_overflow) n_ovf++;
    if (a_out_tag == OT_ALT_LADDR) n_altld++;
    if (a_out_tag == OT_ALT_SADDR) n_altst++;
  end

  initial begin
    int cyc;
    rst_n = 0;  // falling edge so the asynchronous resets act at once
    #1;  // after the memory model has cleared its arrays
    for (int i = 0; i < N; i++) begin
      av[i] = 16'($urandom); bv[i] = 16'($urandom);
      mcu.dmem[AB + 16'(i)] = av[i]; mcu.dmem[BB + 16'(i)] = bv[i];
    end
    // ---------------- access processor ----------------
    p2(0, ls(OP_LDBR, 1, 16'd20));       // 0
    p2(0, ls(OP_LDI, 6, 16'd1));         // 2
    p2(0, ls(OP_LDI, 1, AB));            // 4
    p2(0, ls(OP_LDI, 2, BB));            // 6
    p2(0, ls(OP_LDI, 3, CB));            // 8
    p2(0, ls(OP_LDI, 4, 16'(N)));        // 10
    p2(0, ls(OP_STA, 0, RES0));          // 12: address for E's bank-test result
    p2(0, ls(OP_LDI, 5, 16'h7FFF));      // 14
    p1(0, rrr(OP_ADD, 5, 5, 6));         // 16: overflow
    p1(0, rrr(OP_NOP, 0, 0, 0));         // 17
    p1(0, rrr(OP_NOP, 0, 0, 0));         // 18
    p1(0, rrr(OP_NOP, 0, 0, 0));         // 19
    p2(0, ls(OP_LDPA, 1, 16'd1));        // 20: loop
    p2(0, ls(OP_LDPA, 2, 16'd1));
    p1(0, rrr(OP_SUB, 4, 4, 6));
    p1(0, pbr(BC_NE, 1'b1, 2, 1, 4));    // loop while r4 != 0, outcome to E
    p2(0, ls(OP_STPA, 3, 16'd1));        // delay slot: address of C[i]
    p2(0, ls(OP_ST, 0, RES1));  p2(0, ls(OP_LDI, 7, 16'h1234));   // own stores, back to back
    p2(0, ls(OP_ST, 0, RES2));  p2(0, ls(OP_LDI, 7, 16'h5678));
    p2(0, ls(OP_ST, 0, RES3));  p1(0, rrr(OP_ADD, 7, 5, 6));      // 0x8000 + 1
    p2(0, ls(OP_STA, 0, DONE));
    p2(0, ls(OP_LDBR, 2, 16'(pc[0] + 2)));
    p1(0, pbr(BC_ALWAYS, 1'b0, 0, 2, 0));
    // ---------------- execute processor ----------------
    p2(1, ls(OP_LDBR, 1, 16'd22));       // 0
    p2(1, ls(OP_LDBR, 2, 16'd20));       // 2
    p2(1, ls(OP_LDI, 2, 16'd5));         // 4
    p1(1, rrr(OP_SWAP, 0, 0, 0));        // 6
    p1(1, rrr(OP_ADD, 4, 4, 0));         // 7: waits for the SWAP
    p2(1, ls(OP_LDI, 2, 16'd7));         // 8
    p1(1, rrr(OP_MOV, 3, 2, 2));         // 10: r3 = background r2 = 5
    p1(1, rrr(OP_ADD, 7, 2, 3));         // 11: 12 -> RES0
    p2(1, ls(OP_LDI, 6, 16'd1));         // 12
    p2(1, ls(OP_LDI, 5, 16'd40));        // 14
    p1(1, rrr(OP_NOP, 0, 0, 0));         // 16
    p1(1, rrr(OP_NOP, 0, 0, 0));         // 17
    p1(1, rrr(OP_NOP, 0, 0, 0));         // 18
    p1(1, rrr(OP_NOP, 0, 0, 0));         // 19
    p1(1, rrr(OP_SUB, 5, 5, 6));         // 20: delay loop
    p1(1, pbr(BC_NE, 1'b0, 0, 2, 5));    // 21
    p1(1, rrr(OP_ADD, 2, 7, 7));         // 22: loop, r2 = A[i] + B[i], two LDQ elements
    p1(1, rrr(OP_SLL, 3, 2, 6));         // result bus wait, then forwarded r2
    p1(1, pbr(BC_BQ, 1'b0, 1, 1, 0));    // follow A's decision
    p1(1, rrr(OP_LOGIC | {3'b0, TT_XOR}, 7, 3, 2));
    p2(1, ls(OP_LDI, 7, 16'hD0E5));
    p2(1, ls(OP_LDBR, 3, 16'(pc[1] + 2)));
    p1(1, pbr(BC_ALWAYS, 1'b0, 0, 3, 0));

    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    while (mcu.dmem[DONE] != 16'hD0E5 && cyc < 40000) begin @(posedge clk); cyc++; end
    repeat (20) @(posedge clk);
    chk(cyc < 40000, "program finished");
    for (int i = 0; i < N; i++) begin
      word_t s;
      s = 16'(av[i] + bv[i]);
      chk(mcu.dmem[CB + 16'(i)] == (16'(s << 1) ^ s), $sformatf("C[%0d]", i));
    end
    chk(mcu.dmem[RES0] == 16'd12, "register bank test on E");
    chk(mcu.dmem[RES1] == 16'h1234 && mcu.dmem[RES2] == 16'h5678 && mcu.dmem[RES3] == 16'h8001, "A's own stores");
    chk(a_interruptible && e_interruptible, "queues drained at the end");
    chk(n_altld == 2 * N, "alternate loads");
    chk(n_altst == N + 2, "alternate store addresses");
    chk(n_bqpush == N, "branch queue pushes");
    chk(n_bqblk > 0, "branch queue interlock");
    chk(n_ldq > 0, "LDQ empty interlock");
    chk(n_pop2 == N, "two LDQ elements per add");
    chk(mcu.held_full > 0, "load data held back while the LDQ is full");
    chk(n_cbus > 0, "result bus interlock");
    chk(n_swap > 0, "SWAP interlock");
    chk(n_sq > 0, "SQ full interlock");
    chk(n_fwd > 0, "ALU forwarding");
    chk(n_miss > 0, "cache misses");
    chk(n_redir >= 2 * (N - 1), "branch transfers");
    chk(n_busy > 0, "memory busy");
    chk(n_ovf > 0, "overflow");
    $display("cycles=%0d bqpush=%0d bqblk=%0d ldq=%0d held=%0d cbus=%0d swap=%0d sq=%0d fwd=%0d miss=%0d redir=%0d busy=%0d ovf=%0d",
             cyc, n_bqpush, n_bqblk, n_ldq, mcu.held_full, n_cbus, n_swap, n_sq, n_fwd, n_miss, n_redir, n_busy, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
