// Testbench for pipe_decode. A random stream of one- and two-parcel
// instructions of every format is offered parcel by parcel with random gaps,
// and the issue side accepts with random back-pressure. Every decoded control
// word must come out once, in order, and match a reference decode of the
// fields that matter: kind, operand sources (register, LDQ, zero, immediate),
// destinations in stage 1 and stage 2 (register, SQ, LAR), memory tag,
// branch condition and register, and the immediate parcel.
module tb_pipe_decode;
  import pipe_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst_n = 1;
  logic p_valid, p_ready, iss_valid, iss_fire;
  word_t p_data;
  ctrl_t iss_ctrl;
  int checks = 0, failures = 0;

  pipe_decode dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int NI = 3000;
  logic [31:0] prog [NI];
  int np [NI];
  int kinds [10];

  // build one random instruction
  function automatic void gen(output logic [31:0] w, output int n);
    logic [6:0] lsops [10];
    int r;
    lsops = '{OP_LD, OP_LDA, OP_LDP, OP_LDPA, OP_ST, OP_STA, OP_STP, OP_STPA, OP_ADDI, OP_LDI};
    r = $urandom_range(0, 9);
    n = 1; w = {16'($urandom), 16'h0};
    unique case (r)
      0: w[31:16] = rrr(7'($urandom_range(0, 1)), $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7));
      1: w[31:16] = rrr(OP_LOGIC | 7'($urandom_range(0, 15)), $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7));
      2: w[31:16] = rrr(OP_SLL + 7'($urandom_range(0, 3)), $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7));
      3: w[31:16] = rrr(OP_MOV, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 3));
      4: w[31:16] = rrr(OP_SWAP, 0, 0, 0);
      5: w[31:16] = pbr(bcond_e'($urandom_range(0, 7)), 1'($urandom), $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7));
      6: w[31:16] = rrr(OP_NOP, 0, 0, 0);
      7, 8: begin w = ls(lsops[$urandom_range(0, 9)], $urandom_range(0, 7), 16'($urandom)); n = 2; end
      default: begin w = ls(OP_LDBR, $urandom_range(0, 7), 16'($urandom)); n = 2; end
    endcase
  endfunction

  // compare a decoded word with the reference for instruction w
  function automatic int check_one(input logic [31:0] w, input int n, input ctrl_t c);
    logic [6:0] op;
    logic [2:0] f1, f2, f3;
    dest_e dst;
    int bad;
    op = w[31:25]; f1 = w[24:22]; f2 = w[21:19]; f3 = w[18:16];
    dst = (f1 == 3'd7) ? D_SQ : D_RF;
    bad = 0;
    if (n == 2 && c.imm != w[15:0]) bad++;
    if (op == OP_ADD || op == OP_SUB) begin
      if (c.kind != K_ADD || c.sub != op[0] || c.d2 != dst || c.d1 != D_NONE) bad++;
      if (c.ra != f2 || c.rb != f3 || c.a_q != (f2 == 7) || c.b_q != (f3 == 7) || c.rd != f1) bad++;
    end else if (op[6:4] == 3'b001) begin
      if (c.kind != K_LOGIC || c.tt != op[3:0] || c.d1 != dst || c.d2 != D_NONE) bad++;
    end else if (op >= OP_SLL && op <= OP_ROR) begin
      if (c.kind != K_SHIFT || c.shop != shop_e'(op[1:0]) || c.d1 != dst) bad++;
    end else if (op == OP_MOV) begin
      if (c.kind != K_MOV || c.a_bg != f3[1] || c.rd_bg != f3[0]) bad++;
      if (c.a_q != (f2 == 7 && !f3[1])) bad++;
      if (c.d1 != ((f1 == 7 && !f3[0]) ? D_SQ : D_RF)) bad++;
    end else if (op == OP_SWAP) begin
      if (c.kind != K_SWAP || c.d1 != D_NONE || c.d2 != D_NONE) bad++;
    end else if (op[6:4] == 3'b011) begin
      if (c.kind != K_PBR || c.cond != bcond_e'(op[2:0]) || c.bq_push != op[3] || c.br != f2) bad++;
      if (c.use_a != (op[2:0] inside {3'd1, 3'd2, 3'd3, 3'd4})) bad++;
      if (c.use_a && c.ra != f3) bad++;
    end else if (op == OP_NOP) begin
      if (c.kind != K_NOP || c.d1 != D_NONE || c.d2 != D_NONE) bad++;
    end else if (op == OP_LDBR) begin
      if (c.kind != K_LDBR || c.br != f1) bad++;
    end else if (op == OP_LDI) begin
      if (c.kind != K_LOGIC || !c.b_imm || c.d1 != dst) bad++;
    end else if (op == OP_ADDI) begin
      if (c.kind != K_ADD || !c.b_imm || c.ra != f1 || c.d2 != dst) bad++;
    end else begin  // load / store
      if (c.kind != (op[2] ? K_STORE : K_LOAD)) bad++;
      if (c.a_zero != (f1 == 0) || c.a_q != (f1 == 7) || !c.b_imm || c.ra != f1) bad++;
      if (c.mtag != (op[2] ? (op[0] ? OT_ALT_SADDR : OT_SADDR) : (op[0] ? OT_ALT_LADDR : OT_LADDR))) bad++;
      if (op[1]) begin
        if (c.d1 != (op[2] ? D_SQ : D_LAR)) bad++;
        if (c.d2 != ((f1 == 0 || f1 == 7) ? D_NONE : D_RF)) bad++;
      end else if (c.d2 != (op[2] ? D_SQ : D_LAR) || c.d1 != D_NONE) bad++;
    end
    return bad;
  endfunction

  int outn = 0, stall_in = 0, stall_out = 0;
  int feed_i = 0, feed_p = 0;

  // parcel source and issue sink, both driven away from the clock edge
  always @(negedge clk) begin
    p_valid = rst_n && feed_i < NI && ($urandom_range(0, 99) < 70);
    p_data = (feed_p == 0) ? prog[(feed_i < NI) ? feed_i : 0][31:16] : prog[(feed_i < NI) ? feed_i : 0][15:0];
    iss_fire = iss_valid && ($urandom_range(0, 99) < 60);
  end

  always @(posedge clk) if (rst_n) begin
    if (p_valid && p_ready) begin
      if (feed_p + 1 == np[feed_i]) begin feed_i++; feed_p = 0; end else feed_p++;
    end
    if (p_valid && !p_ready) stall_in++;
    if (iss_valid && !iss_fire) stall_out++;
    if (iss_valid && iss_fire) begin
      chk(outn < NI, "no extra instruction");
      if (outn < NI) begin
        chk(check_one(prog[outn], np[outn], iss_ctrl) == 0, $sformatf("instr %0d %h", outn, prog[outn]));
        kinds[iss_ctrl.kind]++;
      end
      outn++;
    end
  end

  initial begin
    logic [31:0] w;
    int n;
    p_valid = 0; iss_fire = 0; p_data = '0;
    rst_n = 0;
    for (int i = 0; i < NI; i++) begin gen(w, n); prog[i] = w; np[i] = n; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (outn < NI) @(posedge clk);
    repeat (10) @(posedge clk);
    chk(outn == NI, "all instructions decoded once");
    chk(stall_in > 0 && stall_out > 0, "back-pressure exercised");
    for (int k = 0; k < 10; k++) chk(kinds[k] > 0, $sformatf("kind %0d seen", k));
    $display("stall_in=%0d stall_out=%0d", stall_in, stall_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
