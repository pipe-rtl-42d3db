// tb_asm_pkg: instruction encoders used by the testbenches to build PIPE
// programs (field layout and opcodes as in pipe_pkg).
package tb_asm_pkg;
  import pipe_pkg::*;

  function automatic word_t rrr(input logic [6:0] op, input int rd, input int rs1, input int rs2);
    return {op, 3'(rd), 3'(rs1), 3'(rs2)};
  endfunction

  // two-parcel instruction, first parcel in [31:16]
  function automatic logic [31:0] ls(input logic [6:0] op, input int r, input word_t imm);
    return {op, 3'(r), 6'b0, imm};
  endfunction

  function automatic word_t pbr(input bcond_e cond, input logic push, input int count, input int br, input int rt);
    return {OP_PBR | {3'b0, push, 3'(cond)}, 3'(count), 3'(br), 3'(rt)};
  endfunction

  localparam logic [3:0] TT_AND = 4'b1000, TT_OR = 4'b1110, TT_XOR = 4'b0110, TT_NAND = 4'b0111;

endpackage
