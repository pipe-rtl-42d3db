// Testbench for pipe_processor: one processor with the memory controller
// model runs a program that sums and doubles an array in a loop with a
// delayed branch, then exercises the register banks (SWAP, background
// moves), the shifter, logic functions, forwarding, immediate and
// post-increment addressing and an overflow. Every result leaves through a
// store and is compared with values computed here. It also checks that the
// second run of the loop body hits in the instruction cache, and counts the
// interlocks (result bus, LDQ empty, SQ full, SWAP), forwarding, cache
// misses, branch transfers and memory-busy cycles; each must occur.
module tb_pipe_processor;
  import pipe_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [2:0] out_tag; logic [15:0] out_data, in_data;
  logic [1:0] in_tag;
  logic ldq_full, bq_out_push, bq_out_bit, bq_in_full, interruptible, overflow;
  logic [1:0] e_in_tag; logic [15:0] e_in_data;
  int checks = 0, failures = 0;

  pipe_processor dut (
    .clk, .rst_n, .mem_out_tag(out_tag), .mem_out_data(out_data),
    .mem_in_tag(in_tag), .mem_in_data(in_data), .ldq_full,
    .bq_in_push(1'b0), .bq_in_bit(1'b0), .bq_in_full,
    .bq_out_push, .bq_out_bit, .bq_out_full(1'b0),
    .interruptible, .overflow
  );

  tb_pipe_mcu #(.LAT(3), .BUSY_PCT(5)) mcu (
    .clk, .a_out_tag(out_tag), .a_out_data(out_data), .a_in_tag(in_tag), .a_in_data(in_data),
    .a_ldq_full(ldq_full), .e_out_tag(3'b000), .e_out_data(16'h0), .e_in_tag, .e_in_data,
    .e_ldq_full(1'b0)
  );

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int pc = 0;
  task automatic p1(input word_t w); mcu.imem[0][pc] = w; pc++; endtask
  task automatic p2(input logic [31:0] w); p1(w[31:16]); p1(w[15:0]); endtask

  localparam int N = 8;
  localparam word_t SRC = 16'h0100, DST = 16'h0200, RES = 16'h0300, DONE = 16'h03FF;
  int loop_pc, halt_pc;
  word_t srcv [N];

  // event counters
  int n_cbus = 0, n_ldq = 0, n_sq = 0, n_swap = 0, n_fwd = 0, n_miss = 0, n_redir = 0, n_busy = 0, n_ovf = 0;
  int loop_misses_2nd = 0, in_loop2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.blk_cbus) n_cbus++;
    if (dut.blk_ldq)  n_ldq++;
    if (dut.blk_sq)   n_sq++;
    if (dut.blk_swap) n_swap++;
    if (dut.fwd_a || dut.fwd_b) n_fwd++;
    if (dut.miss_start) begin
      n_miss++;
      if (in_loop2 > 0 && dut.fpc >= 16'(loop_pc) && dut.fpc < 16'(loop_pc + 10)) loop_misses_2nd++;
    end
    if (dut.redirect) begin n_redir++; in_loop2++; end
    if (dut.mem_busy) n_busy++;
    if (overflow) n_ovf++;
  end

  initial begin
    int cyc;
    word_t sum, x, a, b;
    rst_n = 0;  // falling edge so the asynchronous resets act at once
    #1;  // after the memory model has cleared its arrays
    // data
    for (int i = 0; i < N; i++) begin srcv[i] = 16'($urandom) & 16'h0FFF; mcu.dmem[SRC + 16'(i)] = srcv[i]; end
    // ---- program ----
    p2(ls(OP_LDBR, 1, 16'd14));          // 0: BR1 = loop (address 14)
    p2(ls(OP_LDI, 1, SRC));              // 2
    p2(ls(OP_LDI, 2, DST));              // 4
    p2(ls(OP_LDI, 3, 16'(N)));           // 6
    p2(ls(OP_LDI, 4, 16'd0));            // 8
    p2(ls(OP_LDI, 6, 16'd1));            // 10
    p1(rrr(OP_NOP, 0, 0, 0));            // 12
    p1(rrr(OP_NOP, 0, 0, 0));            // 13
    loop_pc = pc;                        // 14
    p2(ls(OP_LDP, 1, 16'd1));            // load [r1], r1 += 1
    p1(rrr(OP_SUB, 3, 3, 6));            // r3 -= 1
    p1(pbr(BC_NE, 1'b0, 5, 1, 3));       // branch to loop if r3 != 0, after 5 parcels
    p2(ls(OP_STP, 2, 16'd1));            // store address [r2], r2 += 1
    p1(rrr(OP_MOV, 5, 7, 0));            // r5 = LDQ
    p1(rrr(OP_ADD, 4, 4, 5));            // sum += r5
    p1(rrr(OP_ADD, 7, 5, 5));            // store data 2*r5
    // after the loop
    p2(ls(OP_ST, 0, RES + 0));  p1(rrr(OP_MOV, 7, 4, 0));            // RES+0 = sum
    p2(ls(OP_LDI, 1, 16'h1111));
    p1(rrr(OP_SWAP, 0, 0, 0));
    p2(ls(OP_LDI, 1, 16'h2222));
    p2(ls(OP_ST, 0, RES + 1));  p1(rrr(OP_MOV, 7, 1, 0));            // RES+1 = 0x2222 (foreground)
    p2(ls(OP_ST, 0, RES + 2));  p1(rrr(OP_MOV, 7, 1, 2));            // RES+2 = 0x1111 (background)
    p1(rrr(OP_MOV, 3, 1, 1));                                        // background r3 = 0x2222
    p1(rrr(OP_SWAP, 0, 0, 0));
    p1(rrr(OP_ADD, 6, 6, 0));            // must wait for the SWAP (r6 stays 1)
    p2(ls(OP_ST, 0, RES + 3));  p1(rrr(OP_MOV, 7, 3, 0));            // RES+3 = 0x2222
    p2(ls(OP_LDI, 2, 16'h8421)); p2(ls(OP_LDI, 3, 16'd3));
    p2(ls(OP_ST, 0, RES + 4));  p1(rrr(OP_SRA, 7, 2, 3));
    p2(ls(OP_ST, 0, RES + 5));  p1(rrr(OP_SLL, 7, 2, 3));
    p2(ls(OP_ST, 0, RES + 6));  p1(rrr(OP_ROR, 7, 2, 3));
    p2(ls(OP_ST, 0, RES + 7));  p1(rrr(OP_SRL, 7, 2, 3));
    p2(ls(OP_ST, 0, RES + 8));  p1(rrr(OP_LOGIC | {3'b0, TT_XOR}, 7, 2, 3));
    p2(ls(OP_ST, 0, RES + 9));  p1(rrr(OP_LOGIC | {3'b0, TT_NAND}, 7, 2, 3));
    // forwarding chain and result bus conflict
    p1(rrr(OP_ADD, 4, 2, 3));            // r4 = 0x8424
    p1(rrr(OP_LOGIC | {3'b0, TT_AND}, 5, 2, 3));  // waits one cycle (C bus)
    p1(rrr(OP_ADD, 4, 4, 4));            // forwarded r4
    p2(ls(OP_ST, 0, RES + 10)); p1(rrr(OP_ADD, 7, 4, 5));            // RES+10
    p2(ls(OP_ADDI, 4, 16'h0100));
    p2(ls(OP_ST, 4, 16'h0010));          // address r4 + 0x10 (forwarded)
    p2(ls(OP_LDI, 7, 16'hBEEF));         // store immediate data
    p2(ls(OP_LDI, 5, 16'h7FFF)); p1(rrr(OP_ADD, 5, 5, 6));            // overflow
    p2(ls(OP_LD, 0, SRC + 3));           // load absolute
    p2(ls(OP_ST, 0, RES + 11)); p1(rrr(OP_SUB, 7, 7, 6));            // RES+11 = src[3] - 1
    p2(ls(OP_ST, 0, DONE)); p2(ls(OP_LDI, 7, 16'hD0E5));
    p2(ls(OP_LDBR, 2, 16'(pc + 2)));
    halt_pc = pc;
    p1(pbr(BC_ALWAYS, 1'b0, 0, 2, 0));

    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    while (mcu.dmem[DONE] != 16'hD0E5 && cyc < 20000) begin @(posedge clk); cyc++; end
    repeat (20) @(posedge clk);
    chk(cyc < 20000, "program finished");
    sum = 0;
    for (int i = 0; i < N; i++) begin
      sum += srcv[i];
      chk(mcu.dmem[DST + 16'(i)] == 16'(2 * srcv[i]), $sformatf("doubled element %0d", i));
    end
    chk(mcu.dmem[RES + 0] == sum, "loop sum");
    chk(mcu.dmem[RES + 1] == 16'h2222, "foreground after swap");
    chk(mcu.dmem[RES + 2] == 16'h1111, "background move");
    chk(mcu.dmem[RES + 3] == 16'h2222, "move into background, swap back");
    x = 16'h8421;
    chk(mcu.dmem[RES + 4] == word_t'($signed(x) >>> 3), "sra");
    chk(mcu.dmem[RES + 5] == 16'(x << 3), "sll");
    chk(mcu.dmem[RES + 6] == 16'((x >> 3) | (x << 13)), "ror");
    chk(mcu.dmem[RES + 7] == 16'(x >> 3), "srl");
    chk(mcu.dmem[RES + 8] == (x ^ 16'd3), "xor");
    chk(mcu.dmem[RES + 9] == ~(x & 16'd3), "nand");
    a = 16'(2 * (x + 16'd3)); b = x & 16'd3;
    chk(mcu.dmem[RES + 10] == 16'(a + b), "forwarded sum");
    chk(mcu.dmem[16'(a + 16'h0100 + 16'h0010)] == 16'hBEEF, "address from forwarded register");
    chk(mcu.dmem[RES + 11] == 16'(srcv[3] - 1), "absolute load");
    chk(interruptible, "queues drained at the end");
    // mechanisms
    chk(n_cbus > 0, "result bus interlock");
    chk(n_ldq > 0, "LDQ empty interlock");
    chk(n_sq > 0, "SQ full interlock");
    chk(n_swap > 0, "SWAP interlock");
    chk(n_fwd > 0, "ALU forwarding");
    chk(n_miss > 0, "cache misses");
    chk(n_redir >= N - 1, "branch transfers");
    chk(n_busy > 0, "memory busy");
    chk(n_ovf > 0, "overflow");
    chk(loop_misses_2nd == 0, "loop body hits in the cache after the first pass");
    $display("cycles=%0d cbus=%0d ldq=%0d sq=%0d swap=%0d fwd=%0d miss=%0d redirect=%0d busy=%0d ovf=%0d",
             cyc, n_cbus, n_ldq, n_sq, n_swap, n_fwd, n_miss, n_redir, n_busy, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
