// pipe_processor: one PIPE processor, usable as the access unit (A-unit) or
// the execute unit (E-unit) of a PIPE machine.
//
// Pipeline:  fetch/cache -> decode -> issue -> EX1 -> EX2
//   fetch   pipe_fetch + pipe_icache: one parcel per cycle on a cache hit,
//           prepare-to-branch control, no fetching past an unresolved branch
//           beyond its parcel count
//   decode  pipe_decode: IR1/IR2, control word into the issue register
//   issue   pipe_issue: all interlocks, register binding
//   EX1/EX2 pipe_datapath: register file, by-pass, ALU stages 1 and 2 with
//           forwarding, shifter, LDQ, SQ, LAR
// pipe_memif drives the tagged memory pins, and pipe_bq holds branch outcomes
// arriving from the other processor.
//
// Pins: mem_out_tag/mem_out_data to the memory controller, mem_in_tag/
// mem_in_data from it (tag codes in pipe_pkg). ldq_full tells the controller
// that the on-chip LDQ has no room, so it keeps further load data in its own
// extension of the queue; the architecture does not say how the controller
// learns this, so this pin is this design's choice. bq_in_* receive branch
// outcomes, bq_out_* send them. interruptible is high when the memory queues
// and the branch queue are empty, the only state in which the architecture
// allows an (external) interrupt handler to step in. overflow flags a two's
// complement overflow of an add/subtract in its second stage.
module pipe_processor
  import pipe_pkg::*;
#(
  parameter int          LDQ_DEPTH = 3,
  parameter int          BQ_DEPTH  = 4,
  parameter logic [15:0] RESET_PC  = 16'h0000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [2:0]  mem_out_tag,
  output logic [15:0] mem_out_data,
  input  logic [1:0]  mem_in_tag,
  input  logic [15:0] mem_in_data,
  output logic        ldq_full,
  input  logic        bq_in_push,
  input  logic        bq_in_bit,
  output logic        bq_in_full,
  output logic        bq_out_push,
  output logic        bq_out_bit,
  input  logic        bq_out_full,
  output logic        interruptible,
  output logic        overflow
);

  // fetch <-> cache
  word_t fpc, c_data;
  logic  freq, c_valid, c_hit, mreq, mack, fill_valid, miss_start;
  word_t maddr, fill_data;
  // fetch <-> decode
  logic  p_valid, p_ready;
  word_t p_data;
  // decode <-> issue
  logic  d_valid, fire;
  ctrl_t d_ctrl;
  issued_t iss;
  // datapath status
  logic    ex1_valid, ex2_valid, fg, ldq_empty, sq_full, lar_full;
  issued_t ex1, ex2;
  logic [$clog2(LDQ_DEPTH+1)-1:0] ldq_count;
  // memory side
  logic  ldq_push, sq_take, lar_take, mem_busy;
  word_t ldq_data, sq_data, lar_addr;
  otag_e sq_tag, lar_tag, out_tag;
  // branch
  logic  br_resolve, br_taken, br_we, bq_in_pop, bq_in_head, bq_in_empty;
  logic [2:0] br_idx;
  word_t br_data;
  logic  bp, bh, redirect;
  logic [2:0] pcnt;
  word_t pending_pc;
  logic  fwd_a, fwd_b, ldq_bypass, alu_ovf;
  logic  blk_cbus, blk_ldq, blk_sq, blk_lar, blk_swap, blk_bq;

  pipe_icache u_icache (
    .clk, .rst_n, .pc(fpc), .req(freq), .rvalid(c_valid), .rdata(c_data), .hit(c_hit),
    .mreq, .maddr, .mack, .fill_valid, .fill_data, .miss_start
  );

  pipe_fetch #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n, .pc(fpc), .req(freq), .c_valid, .c_data,
    .p_valid, .p_data, .p_ready,
    .br_resolve, .br_taken, .br_we, .br_idx, .br_data,
    .bp, .bh, .pcnt, .pending_pc, .redirect
  );

  pipe_decode u_decode (
    .clk, .rst_n, .p_valid, .p_data, .p_ready,
    .iss_valid(d_valid), .iss_ctrl(d_ctrl), .iss_fire(fire)
  );

  pipe_issue #(.LDQ_DEPTH(LDQ_DEPTH)) u_issue (
    .valid(d_valid), .c(d_ctrl), .fg,
    .ex1_valid, .ex1, .ex2_valid, .ex2,
    .ldq_count, .sq_full, .lar_full,
    .bq_in_empty, .bq_out_full,
    .fire, .iss,
    .blk_cbus, .blk_ldq, .blk_sq, .blk_lar, .blk_swap, .blk_bq
  );

  pipe_datapath #(.LDQ_DEPTH(LDQ_DEPTH)) u_dp (
    .clk, .rst_n,
    .iss_valid(fire), .iss,
    .ex1_valid, .ex1, .ex2_valid, .ex2, .fg,
    .ldq_count, .ldq_full, .ldq_empty, .sq_full, .lar_full,
    .ldq_push, .ldq_push_data(ldq_data),
    .sq_data, .sq_tag, .sq_take,
    .lar_addr, .lar_tag, .lar_take,
    .br_resolve, .br_taken, .br_we, .br_idx, .br_data,
    .bq_in_bit(bq_in_head), .bq_in_pop, .bq_out_push, .bq_out_bit,
    .fwd_a, .fwd_b, .ldq_bypass, .alu_ovf
  );

  pipe_memif u_memif (
    .out_tag, .out_data(mem_out_data),
    .in_tag(itag_e'(mem_in_tag)), .in_data(mem_in_data),
    .mreq, .maddr, .mack, .fill_valid, .fill_data,
    .lar_full, .lar_addr, .lar_tag, .lar_take,
    .sq_full, .sq_data, .sq_tag, .sq_take,
    .ldq_push, .ldq_data, .busy(mem_busy)
  );
  assign mem_out_tag = out_tag;

  pipe_bq #(.DEPTH(BQ_DEPTH)) u_bq (
    .clk, .rst_n, .push(bq_in_push), .push_bit(bq_in_bit), .pop(bq_in_pop),
    .head(bq_in_head), .empty(bq_in_empty), .full(bq_in_full)
  );

  assign interruptible = ldq_empty && !sq_full && !lar_full && bq_in_empty;
  assign overflow      = ex2_valid && ex2.c.kind == K_ADD && alu_ovf;

endmodule
