// Testbench for pipe_datapath. A pipe_issue instance schedules a random
// instruction stream (immediate loads, add/subtract, logic, shifts, LDQ
// moves, adds taking two LDQ elements, SWAP, load addresses, branch tests, branch-register loads and
// results sent to the store queue) exactly as in the processor. A sequential
// reference model, including both register banks, predicts every store-queue
// datum, every LAR address, every branch decision and every branch-register
// write, which are compared in order. The LDQ is filled and the SQ and LAR
// emptied at random times. Directed cases at the start check the latencies:
// a one-stage result is written one cycle after issue, a two-stage result
// two cycles after issue, and a dependent instruction right behind a
// two-stage one takes the forwarded sum.
module tb_pipe_datapath;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 1;
  int checks = 0, failures = 0;

  // issue <-> datapath
  logic valid, fire, fg, ex1_valid, ex2_valid, ldq_full, ldq_empty, sq_full, lar_full;
  ctrl_t cur;
  issued_t iss, ex1, ex2;
  logic [1:0] ldq_count;
  logic blk_cbus, blk_ldq, blk_sq, blk_lar, blk_swap, blk_bq;
  logic ldq_push, sq_take, lar_take, bq_in_bit, bq_in_empty;
  word_t ldq_push_data, sq_data, lar_addr, br_data;
  otag_e sq_tag, lar_tag;
  logic br_resolve, br_taken, br_we, bq_in_pop, bq_out_push, bq_out_bit, fwd_a, fwd_b, ldq_bypass, alu_ovf;
  logic [2:0] br_idx;

  pipe_issue u_iss (
    .valid, .c(cur), .fg, .ex1_valid, .ex1, .ex2_valid, .ex2, .ldq_count,
    .sq_full, .lar_full, .bq_in_empty, .bq_out_full(1'b0),
    .fire, .iss, .blk_cbus, .blk_ldq, .blk_sq, .blk_lar, .blk_swap, .blk_bq
  );

  pipe_datapath dut (
    .clk, .rst_n, .iss_valid(fire), .iss,
    .ex1_valid, .ex1, .ex2_valid, .ex2, .fg, .ldq_count, .ldq_full, .ldq_empty,
    .sq_full, .lar_full, .ldq_push, .ldq_push_data, .sq_data, .sq_tag, .sq_take,
    .lar_addr, .lar_tag, .lar_take, .br_resolve, .br_taken, .br_we, .br_idx, .br_data,
    .bq_in_bit, .bq_in_pop, .bq_out_push, .bq_out_bit, .fwd_a, .fwd_b, .ldq_bypass, .alu_ovf
  );

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- instruction builders ----------------
  function automatic ctrl_t base();
    ctrl_t x;
    x = '0; x.kind = K_NOP; x.d1 = D_NONE; x.d2 = D_NONE; x.mtag = OT_NONE; x.cond = BC_ALWAYS;
    return x;
  endfunction
  function automatic ctrl_t i_ldi(input int rd, input word_t v);
    ctrl_t x; x = base(); x.kind = K_LOGIC; x.tt = 4'b1010; x.b_imm = 1; x.imm = v; x.rd = 3'(rd); x.d1 = D_RF;
    return x;
  endfunction
  function automatic ctrl_t i_rr(input kind_e k, input int rd, input int ra, input int rb);
    ctrl_t x; x = base(); x.kind = k; x.use_a = 1; x.ra = 3'(ra); x.use_b = 1; x.rb = 3'(rb); x.rd = 3'(rd);
    if (k == K_ADD) x.d2 = D_RF; else x.d1 = D_RF;
    return x;
  endfunction
  function automatic ctrl_t i_out(input int ra);   // SQ <- register (pass A)
    ctrl_t x; x = base(); x.kind = K_LOGIC; x.tt = 4'b1100; x.use_a = 1; x.ra = 3'(ra); x.d1 = D_SQ; x.mtag = OT_SDATA;
    return x;
  endfunction

  // ---------------- reference model ----------------
  word_t rf [16];
  logic  mfg;
  word_t exp_sq [$], exp_lar [$], ldq_data [$], ldq_model [$];
  logic  exp_br [$];
  word_t exp_brd [$];

  function automatic word_t rd_reg(input logic [2:0] r, input logic bg);
    return rf[{mfg ^ bg, r}];
  endfunction

  // executes x in program order and returns it
  function automatic void model(input ctrl_t x, input logic bqbit);
    word_t a, b, r;
    a = (!x.use_a || x.a_zero) ? 16'h0 : x.a_q ? ldq_model.pop_front() : rd_reg(x.ra, x.a_bg);
    b = x.b_imm ? x.imm : !x.use_b ? 16'h0 : x.b_q ? ldq_model.pop_front() : rd_reg(x.rb, 1'b0);
    unique case (x.kind)
      K_ADD:   r = x.sub ? a - b : a + b;
      K_LOGIC: for (int i = 0; i < 16; i++) r[i] = x.tt[{a[i], b[i]}];
      K_SHIFT: unique case (x.shop)
                 SH_SLL: r = a << b[3:0];
                 SH_SRL: r = a >> b[3:0];
                 SH_SRA: r = word_t'($signed(a) >>> b[3:0]);
                 default: r = (a >> b[3:0]) | (a << (5'd16 - {1'b0, b[3:0]}));
               endcase
      K_LOAD:  r = a + b;
      default: r = a;
    endcase
    if (x.kind == K_PBR) begin
      unique case (x.cond)
        BC_EQ: exp_br.push_back(a == 0);
        BC_NE: exp_br.push_back(a != 0);
        BC_LT: exp_br.push_back(a[15]);
        BC_GE: exp_br.push_back(!a[15]);
        BC_BQ: exp_br.push_back(bqbit);
        default: exp_br.push_back(1'b1);
      endcase
    end
    if (x.kind == K_LDBR) exp_brd.push_back(x.imm);
    if (x.d1 == D_RF || x.d2 == D_RF) rf[{mfg ^ x.rd_bg, x.rd}] = r;
    if (x.d1 == D_SQ || x.d2 == D_SQ) exp_sq.push_back(r);
    if (x.d1 == D_LAR || x.d2 == D_LAR) exp_lar.push_back(r);
    if (x.kind == K_SWAP) mfg = !mfg;
  endfunction

  function automatic ctrl_t rnd_instr();
    ctrl_t x;
    int k;
    k = $urandom_range(0, 15);
    unique case (k)
      0, 1:  x = i_ldi($urandom_range(0, 7), 16'($urandom));
      2, 3:  begin x = i_rr(K_ADD, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7)); x.sub = 1'($urandom); end
      4:     begin x = i_rr(K_ADD, $urandom_range(0, 7), $urandom_range(0, 7), 0); x.use_b = 0; x.b_imm = 1; x.imm = 16'($urandom); end
      5, 6:  begin x = i_rr(K_LOGIC, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7)); x.tt = 4'($urandom); end
      7, 8:  begin x = i_rr(K_SHIFT, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7)); x.shop = shop_e'($urandom_range(0, 3)); end
      9, 10: x = i_out($urandom_range(0, 7));
      11:    if ($urandom_range(0, 1) == 0) begin
               x = base(); x.kind = K_MOV; x.use_a = 1; x.a_q = 1; x.rd = 3'($urandom_range(0, 7)); x.d1 = D_RF;
               x.rd_bg = 1'($urandom);
             end else begin      // both sources from the LDQ: two elements
               x = i_rr(K_ADD, $urandom_range(0, 7), 7, 7); x.a_q = 1; x.b_q = 1; x.sub = 1'($urandom);
             end
      12:    begin x = base(); x.kind = K_SWAP; end
      13:    begin x = base(); x.kind = K_LOAD; x.use_a = 1; x.ra = 3'($urandom_range(0, 7)); x.a_zero = ($urandom_range(0, 3) == 0);
                   x.b_imm = 1; x.imm = 16'($urandom); x.d2 = D_LAR; x.mtag = OT_LADDR; end
      14:    begin x = base(); x.kind = K_PBR; x.cond = bcond_e'($urandom_range(0, 5)); x.br = 3'($urandom);
                   x.use_a = x.cond inside {BC_EQ, BC_NE, BC_LT, BC_GE}; x.ra = 3'($urandom_range(0, 7)); end
      default: begin x = base(); x.kind = K_LDBR; x.br = 3'($urandom); x.imm = 16'($urandom); end
    endcase
    return x;
  endfunction

  // ---------------- environment ----------------
  int n_pop2 = 0;
  int cyc = 0, n_fwd = 0, n_swap = 0, n_bq = 0, n_sq_out = 0, n_lar_out = 0;
  logic env_on = 0;
  logic bq_bits [4096];   // incoming branch queue contents, head at bq_head_i
  int   bq_head_i = 0, bq_model_i = 0;
  assign bq_in_bit = bq_bits[bq_head_i];

  always @(negedge clk) begin
    ldq_push = env_on && !ldq_full && ldq_data.size() > 0 && ($urandom_range(0, 99) < 40);
    ldq_push_data = (ldq_data.size() > 0) ? ldq_data[0] : '0;
    sq_take  = env_on && sq_full && ($urandom_range(0, 99) < 50);
    lar_take = env_on && lar_full && ($urandom_range(0, 99) < 50);
    bq_in_empty = 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ldq_push) void'(ldq_data.pop_front());
    if (sq_take) begin
      n_sq_out++;
      chk(exp_sq.size() > 0 && sq_data == exp_sq[0], $sformatf("SQ datum %0d: %h", n_sq_out, sq_data));
      chk(sq_tag == OT_SDATA, "SQ tag");
      if (exp_sq.size() > 0) void'(exp_sq.pop_front());
    end
    if (lar_take) begin
      n_lar_out++;
      chk(exp_lar.size() > 0 && lar_addr == exp_lar[0], $sformatf("LAR %0d: %h", n_lar_out, lar_addr));
      chk(lar_tag == OT_LADDR, "LAR tag");
      if (exp_lar.size() > 0) void'(exp_lar.pop_front());
    end
    if (br_resolve) begin
      chk(exp_br.size() > 0 && br_taken == exp_br[0], "branch decision");
      if (exp_br.size() > 0) void'(exp_br.pop_front());
      if (bq_in_pop) begin n_bq++; bq_head_i++; end
    end
    if (br_we) begin
      chk(exp_brd.size() > 0 && br_data == exp_brd[0], "branch register data");
      if (exp_brd.size() > 0) void'(exp_brd.pop_front());
    end
    if (fwd_a || fwd_b) n_fwd++;
    if (dut.ldq_pop2) n_pop2++;
    if (ex1_valid && ex1.c.kind == K_SWAP) n_swap++;
  end

  // issue one instruction through the real issue logic; returns cycles waited
  task automatic send(input ctrl_t x, output int waited);
    @(negedge clk);
    cur = x; valid = 1; waited = 0;
    #1;
    while (!fire) begin @(negedge clk); waited++; #1; end
    if (x.kind == K_PBR && x.cond == BC_BQ) begin model(x, bq_bits[bq_model_i]); bq_model_i++; end
    else model(x, 1'b0);
    @(posedge clk);
    #1 valid = 0;
  endtask

  // cycles from issue until the C bus writes register pd
  task automatic latency(input ctrl_t x, input int expect_c, input string what);
    int w, n;
    send(x, w);
    n = 0;
    while (!(dut.c_rf_en && dut.c_rf_addr == {fg, x.rd}) && n < 10) begin @(posedge clk); #1; n++; end
    chk(n + 1 == expect_c, $sformatf("%s latency %0d", what, n + 1));
  endtask

  initial begin
    int w;
    valid = 0; cur = base();
    foreach (bq_bits[i]) bq_bits[i] = 1'($urandom);
    rst_n = 0;
    foreach (rf[i]) rf[i] = '0;
    mfg = 0;
    for (int i = 0; i < 3000; i++) ldq_data.push_back(16'($urandom));
    ldq_model = ldq_data;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // registers start cleared by reset; the model agrees
    // directed latencies and forwarding
    latency(i_ldi(1, 16'h1234), 1, "one-stage");
    latency(i_rr(K_ADD, 2, 1, 1), 2, "two-stage");
    send(i_rr(K_ADD, 3, 1, 1), w);
    send(i_rr(K_ADD, 4, 3, 1), w);             // forwarded r3
    chk(w == 0, "dependent add issues back to back");
    send(i_rr(K_LOGIC, 5, 4, 4), w);           // one-stage right behind two-stage
    chk(w == 1, "stage-1 result waits one cycle for the result bus");
    send(i_out(4), w);
    env_on = 1;
    for (int i = 0; i < 4000; i++) send(rnd_instr(), w);
    for (int r = 0; r < 8; r++) send(i_out(r), w);
    send(base(), w);
    repeat (30) @(posedge clk);
    chk(exp_sq.size() == 0 && exp_lar.size() == 0 && exp_br.size() == 0 && exp_brd.size() == 0, "every result came out");
    chk(n_fwd > 0 && n_swap > 0 && n_bq > 0 && n_lar_out > 0, "forwarding, SWAP, BQ and LAR exercised");
    chk(n_pop2 > 0, "two LDQ elements taken by one instruction");
    $display("sq=%0d lar=%0d fwd=%0d swap=%0d bq=%0d cycles=%0d", n_sq_out, n_lar_out, n_fwd, n_swap, n_bq, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
