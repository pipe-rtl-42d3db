// pipe_decode: instruction registers and the decode stage.
//
// Parcels from fetch are collected in IR1 and, for a two-parcel instruction,
// IR2. A complete instruction is decoded into a control word (pipe_pkg::ctrl_t)
// and held in the issue register until the issue stage sends it on.
//
// Decoding resolves the irregular parts of the instruction set:
//   - R7 as a source is the head of the load data queue; R7 as the
//     destination of an arithmetic, logic, shift, move or immediate
//     instruction is the tail of the store queue (store data), and the
//     register file is not written. A move to or from background R7 (which
//     holds return addresses) is an ordinary register access.
//   - R0 in a load or store address means the constant zero; elsewhere it is
//     an ordinary register.
//   - The first register field is a destination in RRR format but the address
//     register (a source) in LS format; the third field of MOV extends the
//     opcode with the source/destination banks; the fields of PBR name the
//     parcel count, branch register and tested register.
//   - A plain load/store forms its address in the two-stage ALU (register +
//     immediate, written into LAR or SQ in stage 2). A post-increment
//     load/store sends the register itself through the by-pass in stage 1
//     and writes register + immediate back in stage 2.
// Opcode values and field positions are listed in pipe_pkg.
//
// Handshake: p_valid/p_ready with fetch; iss_valid/iss_fire with issue. A
// parcel is accepted whenever IR has room or the instruction in IR moves on.
module pipe_decode
  import pipe_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   p_valid,
  input  word_t  p_data,
  output logic   p_ready,
  output logic   iss_valid,
  output ctrl_t  iss_ctrl,
  input  logic   iss_fire
);

  word_t ir1, ir2;
  logic  ir1_v, ir2_v;

  wire   need2    = two_parcel(ir1[15:9]);
  wire   complete = ir1_v && (!need2 || ir2_v);
  wire   slot     = !iss_valid || iss_fire;     // issue register free next edge
  wire   move     = complete && slot;

  assign p_ready = !complete || move;

  function automatic ctrl_t decode(input word_t p1, input word_t p2);
    ctrl_t      c;
    logic [6:0] op;
    logic [2:0] f1, f2, f3;
    dest_e      dst;
    op = p1[15:9]; f1 = p1[8:6]; f2 = p1[5:3]; f3 = p1[2:0];
    c = '0;
    c.kind = K_NOP; c.d1 = D_NONE; c.d2 = D_NONE; c.mtag = OT_NONE;
    c.cond = BC_ALWAYS; c.shop = SH_SLL;
    c.imm = p2;
    dst = (f1 == 3'd7) ? D_SQ : D_RF;      // R7 destination = store data
    if (!op[6]) begin
      if (op == OP_ADD || op == OP_SUB || op[6:4] == 3'b001 || op[6:2] == 5'b01000) begin
        c.use_a = 1'b1; c.ra = f2; c.a_q = (f2 == 3'd7);
        c.use_b = 1'b1; c.rb = f3; c.b_q = (f3 == 3'd7);
        c.rd = f1; c.mtag = OT_SDATA;
        if (op == OP_ADD || op == OP_SUB) begin
          c.kind = K_ADD; c.sub = op[0]; c.d2 = dst;
        end else if (op[6:4] == 3'b001) begin
          c.kind = K_LOGIC; c.tt = op[3:0]; c.d1 = dst;
        end else begin
          c.kind = K_SHIFT; c.shop = shop_e'(op[1:0]); c.d1 = dst;
        end
      end else if (op == OP_MOV) begin
        c.kind = K_MOV;
        c.use_a = 1'b1; c.ra = f2; c.a_bg = f3[1]; c.a_q = (f2 == 3'd7) && !f3[1];
        c.rd = f1; c.rd_bg = f3[0]; c.mtag = OT_SDATA;
        c.d1 = (f1 == 3'd7 && !f3[0]) ? D_SQ : D_RF;
      end else if (op == OP_SWAP) begin
        c.kind = K_SWAP;
      end else if (is_pbr(op)) begin
        c.kind = K_PBR; c.cond = bcond_e'(op[2:0]); c.bq_push = op[3]; c.br = f2;
        c.use_a = (op[2:0] inside {BC_EQ, BC_NE, BC_LT, BC_GE});
        c.ra = f3; c.a_q = c.use_a && (f3 == 3'd7);
      end
    end else begin
      unique0 case (op)
        OP_LD, OP_LDA, OP_LDP, OP_LDPA, OP_ST, OP_STA, OP_STP, OP_STPA: begin
          c.kind   = op[2] ? K_STORE : K_LOAD;
          c.use_a  = 1'b1; c.ra = f1;
          c.a_zero = (f1 == 3'd0);
          c.a_q    = (f1 == 3'd7);
          c.b_imm  = 1'b1;
          c.rd     = f1;
          c.mtag   = op[2] ? (op[0] ? OT_ALT_SADDR : OT_SADDR) : (op[0] ? OT_ALT_LADDR : OT_LADDR);
          if (op[1]) begin                       // post-increment
            c.d1 = op[2] ? D_SQ : D_LAR;
            c.d2 = (f1 == 3'd0 || f1 == 3'd7) ? D_NONE : D_RF;
          end else begin
            c.d2 = op[2] ? D_SQ : D_LAR;
          end
        end
        OP_LDI: begin
          c.kind = K_LOGIC; c.tt = 4'b1010;      // pass B
          c.b_imm = 1'b1; c.rd = f1; c.d1 = dst; c.mtag = OT_SDATA;
        end
        OP_ADDI: begin
          c.kind = K_ADD; c.use_a = 1'b1; c.ra = f1; c.a_q = (f1 == 3'd7);
          c.b_imm = 1'b1; c.rd = f1; c.d2 = dst; c.mtag = OT_SDATA;
        end
        OP_LDBR: begin
          c.kind = K_LDBR; c.br = f1;
        end
      endcase
    end
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir1_v <= 1'b0; ir2_v <= 1'b0; ir1 <= '0; ir2 <= '0;
      iss_valid <= 1'b0; iss_ctrl <= '0;
    end else begin
      if (iss_fire) iss_valid <= 1'b0;
      if (move) begin
        iss_valid <= 1'b1;
        iss_ctrl  <= decode(ir1, ir2);
        ir1_v <= 1'b0; ir2_v <= 1'b0;
      end
      if (p_valid && p_ready) begin
        if (!ir1_v || move) begin
          ir1 <= p_data; ir1_v <= 1'b1;
        end else begin
          ir2 <= p_data; ir2_v <= 1'b1;
        end
      end
    end
  end

endmodule
