// pipe_issue: the instruction issue logic.
//
// All pipeline conflicts are resolved here, in one place, before an
// instruction enters the two-stage execution pipeline; resources are reserved
// at issue time. The instruction in the issue register is sent on (fire) in
// the cycle none of these holds:
//   result bus  it drives the C bus in stage 1 while the instruction now in
//               EX1 will drive it from stage 2 in the next cycle
//   LDQ empty   it reads R7 (one element, or two when both sources name R7)
//               and not enough will be left once the instruction in EX1 has
//               taken its own
//   SQ full     it writes the store queue (store data or store address) and
//               the one-element SQ is full or about to be written
//   LAR busy    it is a load and the load address register is full or about
//               to be written (this interlock is this design's choice: the
//               LAR holds one address)
//   SWAP        it names a register while a SWAP is executing, because the
//               bank binding would be stale
//   branch queue a PBR that tests the incoming branch queue finds it empty or
//               being popped by the PBR in EX1; a PBR that pushes its outcome
//               finds the other processor's queue full or being pushed
// Read-after-write needs no interlock: a two-stage result is forwarded to
// the next instruction's stage 1, and a one-stage result is in the register
// file by the next cycle.
//
// Binding: the 3-bit fields become 4-bit physical descriptors {bank, reg},
// using the current foreground bank and the instruction's background bits.
// The logic is purely combinational.
module pipe_issue
  import pipe_pkg::*;
#(
  parameter int LDQ_DEPTH = 3
) (
  input  logic     valid,
  input  ctrl_t    c,
  input  logic     fg,
  input  logic     ex1_valid,
  input  issued_t  ex1,
  input  logic     ex2_valid,
  input  issued_t  ex2,
  input  logic [$clog2(LDQ_DEPTH+1)-1:0] ldq_count,
  input  logic     sq_full,
  input  logic     lar_full,
  input  logic     bq_in_empty,
  input  logic     bq_out_full,
  output logic     fire,
  output issued_t  iss,
  // reasons an instruction waits (observation)
  output logic     blk_cbus,
  output logic     blk_ldq,
  output logic     blk_sq,
  output logic     blk_lar,
  output logic     blk_swap,
  output logic     blk_bq
);

  // LDQ elements an instruction takes: one per source bus naming R7
  function automatic logic [1:0] q_pops(input ctrl_t x);
    return 2'(x.use_a && x.a_q && !x.a_zero) + 2'(x.use_b && x.b_q && !x.b_imm);
  endfunction

  function automatic logic refs_reg(input ctrl_t x);
    return (x.use_a && !x.a_q && !x.a_zero) || (x.use_b && !x.b_q && !x.b_imm) ||
           x.d1 == D_RF || x.d2 == D_RF;
  endfunction

  wire ex1_c2     = ex1_valid && ex1.c.d2 != D_NONE;
  wire [1:0] ex1_pops = ex1_valid ? q_pops(ex1.c) : 2'd0;
  wire [1:0] need     = q_pops(c);
  wire sq_pending = (ex1_valid && (ex1.c.d1 == D_SQ || ex1.c.d2 == D_SQ)) ||
                    (ex2_valid && ex2.c.d2 == D_SQ);
  wire lar_pending = (ex1_valid && (ex1.c.d1 == D_LAR || ex1.c.d2 == D_LAR)) ||
                     (ex2_valid && ex2.c.d2 == D_LAR);
  wire ex1_bqpop  = ex1_valid && ex1.c.kind == K_PBR && (ex1.c.cond inside {BC_BQ, BC_NBQ});
  wire ex1_bqpush = ex1_valid && ex1.c.kind == K_PBR && ex1.c.bq_push;
  wire is_pbr_i   = c.kind == K_PBR;

  always_comb begin
    blk_cbus = valid && (c.d1 != D_NONE) && ex1_c2;
    blk_ldq  = valid && (need != 2'd0) && (int'(ldq_count) < int'(need) + int'(ex1_pops));
    blk_sq   = valid && (c.d1 == D_SQ || c.d2 == D_SQ) && (sq_full || sq_pending);
    blk_lar  = valid && (c.d1 == D_LAR || c.d2 == D_LAR) && (lar_full || lar_pending);
    blk_swap = valid && refs_reg(c) && ex1_valid && ex1.c.kind == K_SWAP;
    blk_bq   = valid && is_pbr_i &&
               (((c.cond inside {BC_BQ, BC_NBQ}) && (bq_in_empty || ex1_bqpop)) ||
                (c.bq_push && (bq_out_full || ex1_bqpush)));
    fire = valid && !(blk_cbus || blk_ldq || blk_sq || blk_lar || blk_swap || blk_bq);

    iss.c  = c;
    iss.pa = {fg ^ c.a_bg, c.ra};
    iss.pb = {fg, c.rb};
    iss.pd = {fg ^ c.rd_bg, c.rd};
  end

endmodule
