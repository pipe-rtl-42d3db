// Testbench for pipe_issue (combinational). Random control words and random
// pipeline states (what is in EX1 and EX2, LDQ count, SQ/LAR full, branch
// queue state, bank flag) are applied, including instructions that take
// two LDQ elements; for each, the testbench works out from
// the interlock rules whether the instruction may be sent on and which
// rules hold it, and checks the bound register descriptors. Directed cases
// check one example of each rule on its own. Every rule must be seen both
// holding and not holding.
module tb_pipe_issue;
  import pipe_pkg::*;
  logic valid, fg, ex1_valid, ex2_valid, sq_full, lar_full, bq_in_empty, bq_out_full;
  ctrl_t c;
  issued_t ex1, ex2, iss;
  logic [1:0] ldq_count;
  logic fire, blk_cbus, blk_ldq, blk_sq, blk_lar, blk_swap, blk_bq;
  int checks = 0, failures = 0;
  int seen [6][2];

  pipe_issue dut (.*);

  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic ctrl_t rnd_ctrl();
    ctrl_t x;
    x = ctrl_t'({$urandom, $urandom, $urandom});
    x.kind = kind_e'($urandom_range(0, 9));
    x.cond = bcond_e'($urandom_range(0, 7));
    x.d1 = dest_e'($urandom_range(0, 3));
    x.d2 = dest_e'($urandom_range(0, 3));
    // keep the mix interesting: many words without a result
    if ($urandom_range(0, 2) == 0) x.d1 = D_NONE;
    if ($urandom_range(0, 2) == 0) x.d2 = D_NONE;
    return x;
  endfunction

  task automatic check_state(input string tag);
    int n_rd, n_ex1;
    logic c2, sqp, larp, refs, e_cbus, e_ldq, e_sq, e_lar, e_swap, e_bq, e_fire;
    #1;
    n_rd  = int'(c.use_a && c.a_q && !c.a_zero) + int'(c.use_b && c.b_q && !c.b_imm);
    n_ex1 = ex1_valid ? int'(ex1.c.use_a && ex1.c.a_q && !ex1.c.a_zero) + int'(ex1.c.use_b && ex1.c.b_q && !ex1.c.b_imm) : 0;
    c2    = ex1_valid && ex1.c.d2 != D_NONE;
    sqp   = (ex1_valid && (ex1.c.d1 == D_SQ || ex1.c.d2 == D_SQ)) || (ex2_valid && ex2.c.d2 == D_SQ);
    larp  = (ex1_valid && (ex1.c.d1 == D_LAR || ex1.c.d2 == D_LAR)) || (ex2_valid && ex2.c.d2 == D_LAR);
    refs  = (c.use_a && !c.a_q && !c.a_zero) || (c.use_b && !c.b_q && !c.b_imm) || c.d1 == D_RF || c.d2 == D_RF;
    e_cbus = valid && c.d1 != D_NONE && c2;
    e_ldq  = valid && n_rd > 0 && int'(ldq_count) - n_ex1 < n_rd;
    e_sq   = valid && (c.d1 == D_SQ || c.d2 == D_SQ) && (sq_full || sqp);
    e_lar  = valid && (c.d1 == D_LAR || c.d2 == D_LAR) && (lar_full || larp);
    e_swap = valid && refs && ex1_valid && ex1.c.kind == K_SWAP;
    e_bq   = valid && c.kind == K_PBR &&
             ((c.cond inside {BC_BQ, BC_NBQ} && (bq_in_empty || (ex1_valid && ex1.c.kind == K_PBR && ex1.c.cond inside {BC_BQ, BC_NBQ}))) ||
              (c.bq_push && (bq_out_full || (ex1_valid && ex1.c.kind == K_PBR && ex1.c.bq_push))));
    e_fire = valid && !(e_cbus || e_ldq || e_sq || e_lar || e_swap || e_bq);
    chk(blk_cbus == e_cbus, {tag, " result bus"});
    chk(blk_ldq == e_ldq, {tag, " LDQ"});
    chk(blk_sq == e_sq, {tag, " SQ"});
    chk(blk_lar == e_lar, {tag, " LAR"});
    chk(blk_swap == e_swap, {tag, " SWAP"});
    chk(blk_bq == e_bq, {tag, " BQ"});
    chk(fire == e_fire, {tag, " fire"});
    chk(iss.c == c && iss.pa == {fg ^ c.a_bg, c.ra} && iss.pb == {fg, c.rb} && iss.pd == {fg ^ c.rd_bg, c.rd}, {tag, " binding"});
    seen[0][e_cbus]++; seen[1][e_ldq]++; seen[2][e_sq]++; seen[3][e_lar]++; seen[4][e_swap]++; seen[5][e_bq]++;
  endtask

  task automatic idle();
    valid = 1; fg = 0; ex1_valid = 0; ex2_valid = 0; ex1 = '0; ex2 = '0;
    ldq_count = 2; sq_full = 0; lar_full = 0; bq_in_empty = 0; bq_out_full = 0;
    c = '0; c.kind = K_NOP;
  endtask

  initial begin
    // directed: one rule at a time
    idle(); c.kind = K_LOGIC; c.d1 = D_RF; ex1_valid = 1; ex1.c.kind = K_ADD; ex1.c.d2 = D_RF;
    check_state("dir cbus"); chk(!fire && blk_cbus, "dir: stage-1 result waits for stage-2 result");
    idle(); c.kind = K_ADD; c.use_a = 1; c.a_q = 1; c.d2 = D_RF; ldq_count = 0;
    check_state("dir ldq0"); chk(!fire && blk_ldq, "dir: empty LDQ");
    ldq_count = 1; ex1_valid = 1; ex1.c = c;
    check_state("dir ldq1"); chk(!fire && blk_ldq, "dir: last LDQ element taken by EX1");
    ex1_valid = 0; check_state("dir ldq1ok"); chk(fire, "dir: one LDQ element available");
    c.use_b = 1; c.b_q = 1; check_state("dir ldq2"); chk(!fire && blk_ldq, "dir: two elements needed, one held");
    ldq_count = 2; check_state("dir ldq2ok"); chk(fire, "dir: two elements available");
    ldq_count = 3; ex1_valid = 1; ex1.c = c; check_state("dir ldq3"); chk(!fire && blk_ldq, "dir: EX1 takes two of three");
    idle(); c.kind = K_LOGIC; c.d1 = D_SQ; ex2_valid = 1; ex2.c.d2 = D_SQ;
    check_state("dir sq"); chk(!fire && blk_sq, "dir: SQ write pending");
    idle(); c.kind = K_LOAD; c.d2 = D_LAR; lar_full = 1;
    check_state("dir lar"); chk(!fire && blk_lar, "dir: LAR full");
    idle(); c.kind = K_ADD; c.use_a = 1; c.d2 = D_RF; ex1_valid = 1; ex1.c.kind = K_SWAP;
    check_state("dir swap"); chk(!fire && blk_swap, "dir: register use after SWAP");
    idle(); c.kind = K_PBR; c.cond = BC_BQ; bq_in_empty = 1;
    check_state("dir bq"); chk(!fire && blk_bq, "dir: empty branch queue");
    idle(); c.kind = K_PBR; c.cond = BC_ALWAYS; c.bq_push = 1; bq_out_full = 1;
    check_state("dir bqo"); chk(!fire && blk_bq, "dir: full outgoing branch queue");
    idle(); c.kind = K_PBR; c.cond = BC_ALWAYS; c.bq_push = 1;
    check_state("dir free"); chk(fire, "dir: no conflict");
    // random
    for (int i = 0; i < 20000; i++) begin
      valid = ($urandom_range(0, 9) != 0);
      c = rnd_ctrl(); fg = 1'($urandom);
      ex1_valid = 1'($urandom); ex1 = issued_t'({$urandom, $urandom, $urandom, $urandom});
      ex1.c = rnd_ctrl();
      ex2_valid = 1'($urandom); ex2 = issued_t'({$urandom, $urandom, $urandom, $urandom});
      ex2.c = rnd_ctrl();
      ldq_count = 2'($urandom_range(0, 3));
      sq_full = ($urandom_range(0, 3) == 0); lar_full = ($urandom_range(0, 3) == 0);
      bq_in_empty = 1'($urandom); bq_out_full = 1'($urandom);
      check_state($sformatf("rnd %0d", i));
    end
    for (int r = 0; r < 6; r++) chk(seen[r][0] > 0 && seen[r][1] > 0, $sformatf("rule %0d seen both ways", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
