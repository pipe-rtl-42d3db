// pipe_datapath: the three-bus datapath and the two execution stages.
//
// Two source buses (A, B) and one result bus (C) link the register file, the
// LDQ (load data queue, read as R7), the A-to-C by-pass, the two-stage ALU,
// the barrel shifter, the store queue (SQ, written as R7 or by store-address
// instructions) and the load address register (LAR).
//
// Execution stage 1 (EX1) holds the instruction the issue stage has just
// sent. During EX1 its operands are read onto A and B from the register file,
// the LDQ (its head, or its first two elements when both sources name R7),
// the immediate parcel (B only), or, through the ALU forwarding
// path, from the sum stage-2 is producing in the same cycle for the
// instruction ahead. One-stage results (logic, shift, move through the
// by-pass, immediate load, post-increment address) are put on the C bus in
// EX1. A prepare-to-branch evaluates its condition in EX1 from the zero/sign
// flags of A or from the incoming branch queue, a SWAP exchanges the banks,
// and LDBR writes a branch register. Two-stage instructions (add, subtract,
// address = register + immediate, and the increment of post-increment
// loads/stores) move to EX2 and put the sum on the C bus there.
// The issue logic guarantees that at most one stage drives C in a cycle,
// that SQ and LAR have room, and that an LDQ element exists; assertions here
// check those promises.
//
// C bus destinations: a register (4-bit physical descriptor), the SQ with an
// output tag, or the LAR with a load tag. All writes happen at the clock edge
// ending the stage. The memory interface drains SQ and LAR.
module pipe_datapath
  import pipe_pkg::*;
#(
  parameter int LDQ_DEPTH = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  // from issue
  input  logic     iss_valid,
  input  issued_t  iss,
  // pipeline state, to issue
  output logic     ex1_valid,
  output issued_t  ex1,
  output logic     ex2_valid,
  output issued_t  ex2,
  output logic     fg,
  output logic [$clog2(LDQ_DEPTH+1)-1:0] ldq_count,
  output logic     ldq_full,
  output logic     ldq_empty,
  output logic     sq_full,
  output logic     lar_full,
  // memory interface side
  input  logic     ldq_push,
  input  word_t    ldq_push_data,
  output word_t    sq_data,
  output otag_e    sq_tag,
  input  logic     sq_take,
  output word_t    lar_addr,
  output otag_e    lar_tag,
  input  logic     lar_take,
  // branch control
  output logic     br_resolve,   // a PBR is in EX1
  output logic     br_taken,
  output logic     br_we,        // LDBR in EX1
  output logic [2:0] br_idx,
  output word_t    br_data,
  input  logic     bq_in_bit,    // head of the incoming branch queue
  output logic     bq_in_pop,
  output logic     bq_out_push,
  output logic     bq_out_bit,
  // observation
  output logic     fwd_a,        // ALU result forwarded onto A this cycle
  output logic     fwd_b,
  output logic     ldq_bypass,   // LDQ element taken straight from the input bus
  output logic     alu_ovf       // two's complement overflow of the EX2 sum
);

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex1_valid <= 1'b0;
      ex2_valid <= 1'b0;
      ex1 <= '0;
      ex2 <= '0;
    end else begin
      ex1_valid <= iss_valid;
      if (iss_valid) ex1 <= iss;
      ex2_valid <= ex1_valid && (ex1.c.d2 != D_NONE);
      if (ex1_valid) ex2 <= ex1;
    end
  end

  // ---------------- register file ----------------
  word_t rf_a, rf_b;
  logic  c_rf_en;
  logic [3:0] c_rf_addr;
  word_t c_bus;
  logic  do_swap;

  pipe_regfile u_rf (
    .clk, .rst_n,
    .a_addr(ex1.pa), .a_data(rf_a),
    .b_addr(ex1.pb), .b_data(rf_b),
    .c_en(c_rf_en), .c_addr(c_rf_addr), .c_data(c_bus),
    .swap(do_swap), .fg(fg)
  );

  // ---------------- load data queue ----------------
  word_t ldq_head, ldq_head2;
  logic  ldq_head_valid, ldq_pop, ldq_pop2;

  pipe_ldq #(.DEPTH(LDQ_DEPTH)) u_ldq (
    .clk, .rst_n,
    .push(ldq_push), .push_data(ldq_push_data),
    .pop(ldq_pop), .pop2(ldq_pop2), .head(ldq_head), .head2(ldq_head2), .head_valid(ldq_head_valid),
    .empty(ldq_empty), .full(ldq_full), .count(ldq_count)
  );

  // ---------------- source buses ----------------
  word_t a_bus, b_bus, sum;
  ctrl_t c1;
  assign c1 = ex1.c;

  wire ex2_wr_rf = ex2_valid && (ex2.c.d2 == D_RF);
  assign fwd_a = ex1_valid && c1.use_a && !c1.a_q && !c1.a_zero && ex2_wr_rf && (ex2.pd == ex1.pa);
  assign fwd_b = ex1_valid && c1.use_b && !c1.b_q && !c1.b_imm  && ex2_wr_rf && (ex2.pd == ex1.pb);

  // R7 on both source buses takes two LDQ elements: head to A, next to B
  wire q_a    = c1.use_a && c1.a_q && !c1.a_zero;
  wire q_b    = c1.use_b && c1.b_q && !c1.b_imm;
  wire q_both = q_a && q_b;

  always_comb begin
    if (c1.a_zero || !c1.use_a) a_bus = '0;
    else if (c1.a_q)            a_bus = ldq_head;
    else if (fwd_a)             a_bus = sum;
    else                        a_bus = rf_a;
    if (c1.b_imm)               b_bus = c1.imm;
    else if (!c1.use_b)         b_bus = '0;
    else if (c1.b_q)            b_bus = q_both ? ldq_head2 : ldq_head;
    else if (fwd_b)             b_bus = sum;
    else                        b_bus = rf_b;
  end

  assign ldq_pop    = ex1_valid && (q_a || q_b);
  assign ldq_pop2   = ex1_valid && q_both;
  assign ldq_bypass = ldq_pop && ldq_empty;

  // ---------------- functional units ----------------
  word_t logic_out, shift_out;
  logic  zero, sign, cout;

  pipe_alu u_alu (
    .clk, .rst_n,
    .a(a_bus), .b(b_bus), .sub(c1.sub), .tt(c1.tt),
    .s1_load(ex1_valid && (c1.d2 != D_NONE)),
    .logic_out, .zero, .sign,
    .sum, .cout, .ovf(alu_ovf)
  );

  pipe_shifter u_sh (.a_bus, .b_bus, .op(c1.shop), .result(shift_out));

  // ---------------- result bus ----------------
  wire s1_drive = ex1_valid && (c1.d1 != D_NONE);
  wire s2_drive = ex2_valid && (ex2.c.d2 != D_NONE);
  word_t s1_val;

  always_comb begin
    unique case (c1.kind)
      K_LOGIC: s1_val = logic_out;
      K_SHIFT: s1_val = shift_out;
      default: s1_val = a_bus;     // by-pass: MOV and post-increment addresses
    endcase
  end

  dest_e c_dest;
  otag_e c_tag;
  always_comb begin
    if (s2_drive) begin
      c_bus = sum;  c_dest = ex2.c.d2; c_tag = ex2.c.mtag; c_rf_addr = ex2.pd;
    end else begin
      c_bus = s1_val; c_dest = s1_drive ? c1.d1 : D_NONE; c_tag = c1.mtag; c_rf_addr = ex1.pd;
    end
  end
  assign c_rf_en = (c_dest == D_RF);

  // ---------------- store queue and load address register ----------------
  pipe_sq u_sq (
    .clk, .rst_n,
    .wr(c_dest == D_SQ), .wr_data(c_bus), .wr_tag(c_tag),
    .take(sq_take), .full(sq_full), .data(sq_data), .tag(sq_tag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lar_full <= 1'b0;
      lar_addr <= '0;
      lar_tag  <= OT_NONE;
    end else if (c_dest == D_LAR) begin
      lar_full <= 1'b1;
      lar_addr <= c_bus;
      lar_tag  <= c_tag;
    end else if (lar_take) begin
      lar_full <= 1'b0;
    end
  end

  // ---------------- branch, swap, branch registers ----------------
  logic cond_true;
  always_comb begin
    unique case (c1.cond)
      BC_ALWAYS: cond_true = 1'b1;
      BC_EQ:     cond_true = zero;
      BC_NE:     cond_true = !zero;
      BC_LT:     cond_true = sign;
      BC_GE:     cond_true = !sign;
      BC_BQ:     cond_true = bq_in_bit;
      BC_NBQ:    cond_true = !bq_in_bit;
      default:   cond_true = 1'b0;
    endcase
  end

  assign br_resolve  = ex1_valid && (c1.kind == K_PBR);
  assign br_taken    = cond_true;
  assign bq_in_pop   = br_resolve && (c1.cond inside {BC_BQ, BC_NBQ});
  assign bq_out_push = br_resolve && c1.bq_push;
  assign bq_out_bit  = cond_true;
  assign br_we       = ex1_valid && (c1.kind == K_LDBR);
  assign br_idx      = c1.br;
  assign br_data     = c1.imm;
  assign do_swap     = ex1_valid && (c1.kind == K_SWAP);

  // ---------------- promises of the issue logic ----------------
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) !(s1_drive && s2_drive));
  a_ldq_avail:  assert property (@(posedge clk) disable iff (!rst_n) ldq_pop |-> ldq_head_valid);
  a_sq_room:    assert property (@(posedge clk) disable iff (!rst_n) (c_dest == D_SQ) |-> (!sq_full || sq_take));
  a_lar_room:   assert property (@(posedge clk) disable iff (!rst_n) (c_dest == D_LAR) |-> (!lar_full || lar_take));

endmodule
