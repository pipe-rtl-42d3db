// pipe_pkg: types and constants shared by the PIPE processor blocks.
//
// The processor is a 16-bit machine with separate 16-bit instruction and data
// address spaces. Instructions are one parcel (16 bits, RRR format) or two
// parcels (32 bits, LS format). The processor talks to the memory controller
// over a unidirectional tagged output bus (3-bit tag) and a tagged input bus
// (2-bit tag); the tag codes below are the ones the architecture defines.
//
// Instruction encoding. The architecture fixes the field sizes (a 7-bit
// opcode and three 3-bit register fields; LS format: opcode, one register
// field, six reserved bits, then a 16-bit address/immediate parcel) but not
// the bit positions or opcode values, so those are this design's choice:
//   RRR  [15:9] opcode  [8:6] rd  [5:3] rs1  [2:0] rs2
//   LS   [15:9] opcode  [8:6] r   [5:0] reserved, second parcel = imm16
// Opcode bit 6 set marks a two-parcel instruction, so fetch and decode can
// tell instruction length from the first parcel alone.
package pipe_pkg;

  localparam int W = 16;
  typedef logic [W-1:0] word_t;

  // ---------------- opcodes (this design's assignment) ----------------
  // one-parcel
  localparam logic [6:0] OP_ADD   = 7'h00;  // rd = rs1 + rs2      (two-stage)
  localparam logic [6:0] OP_SUB   = 7'h01;  // rd = rs1 - rs2      (two-stage)
  localparam logic [6:0] OP_LOGIC = 7'h10;  // 7'h10..7'h1F: rd = f(rs1, rs2), op[3:0] = truth table
  localparam logic [6:0] OP_SLL   = 7'h20;  // rd = rs1 << rs2[3:0]
  localparam logic [6:0] OP_SRL   = 7'h21;  // rd = rs1 >> rs2[3:0]
  localparam logic [6:0] OP_SRA   = 7'h22;  // rd = rs1 >>> rs2[3:0]
  localparam logic [6:0] OP_ROR   = 7'h23;  // rd = rs1 rotated right by rs2[3:0]
  localparam logic [6:0] OP_NOP   = 7'h24;
  localparam logic [6:0] OP_MOV   = 7'h28;  // rd = rs1; rs2[0]: rd in background bank, rs2[1]: rs1 in background bank
  localparam logic [6:0] OP_SWAP  = 7'h2C;  // exchange foreground and background banks
  localparam logic [6:0] OP_PBR   = 7'h30;  // 7'h30..7'h3F: prepare to branch
                                            //   op[2:0] condition, op[3] push outcome to outgoing branch queue
                                            //   [8:6] parcel count, [5:3] branch register, [2:0] tested register
  // two-parcel
  localparam logic [6:0] OP_LD    = 7'h40;  // load address r+imm (r0 = 0)
  localparam logic [6:0] OP_LDA   = 7'h41;  // alternate load (data goes to the other processor's LDQ)
  localparam logic [6:0] OP_LDP   = 7'h42;  // post-increment load: address r, then r = r + imm
  localparam logic [6:0] OP_LDPA  = 7'h43;  // alternate post-increment load
  localparam logic [6:0] OP_ST    = 7'h44;  // store address r+imm
  localparam logic [6:0] OP_STA   = 7'h45;  // alternate store address
  localparam logic [6:0] OP_STP   = 7'h46;  // post-increment store address
  localparam logic [6:0] OP_STPA  = 7'h47;  // alternate post-increment store address
  localparam logic [6:0] OP_LDI   = 7'h48;  // r = imm
  localparam logic [6:0] OP_ADDI  = 7'h49;  // r = r + imm (two-stage)
  localparam logic [6:0] OP_LDBR  = 7'h4C;  // branch register r = imm

  // branch conditions, tested on the A bus by the ALU flag generator
  typedef enum logic [2:0] {
    BC_ALWAYS = 3'd0, BC_EQ = 3'd1, BC_NE = 3'd2, BC_LT = 3'd3,
    BC_GE = 3'd4, BC_BQ = 3'd5, BC_NBQ = 3'd6, BC_NEVER = 3'd7
  } bcond_e;

  // ---------------- memory interface tags (from the architecture) ----------------
  typedef enum logic [2:0] {
    OT_NONE      = 3'b000,  // no memory request
    OT_IADDR     = 3'b001,  // instruction address
    OT_LADDR     = 3'b010,  // internal load address
    OT_ALT_LADDR = 3'b011,  // alternative load address
    OT_SDATA     = 3'b100,  // store data
    OT_BLOCK     = 3'b101,  // block fetch
    OT_SADDR     = 3'b110,  // internal store address
    OT_ALT_SADDR = 3'b111   // alternative store address
  } otag_e;

  typedef enum logic [1:0] {
    IT_BUSY  = 2'b00,  // memory busy: inhibit to-memory requests
    IT_NONE  = 2'b01,  // no input data
    IT_INSTR = 2'b10,  // instruction data
    IT_DATA  = 2'b11   // load data
  } itag_e;

  // ---------------- decoded instruction ----------------
  typedef enum logic [3:0] {
    K_NOP, K_ADD, K_LOGIC, K_SHIFT, K_MOV, K_SWAP, K_PBR, K_LOAD, K_STORE, K_LDBR
  } kind_e;

  typedef enum logic [1:0] { SH_SLL = 2'd0, SH_SRL = 2'd1, SH_SRA = 2'd2, SH_ROR = 2'd3 } shop_e;

  // where a result leaves the C bus
  typedef enum logic [1:0] { D_NONE, D_RF, D_SQ, D_LAR } dest_e;

  typedef struct packed {
    kind_e       kind;
    logic        sub;        // K_ADD: subtract
    logic [3:0]  tt;         // K_LOGIC: truth table, result bit = tt[{a,b}]
    shop_e       shop;       // K_SHIFT
    // source A
    logic        use_a;      // reads a register (or the LDQ) onto the A bus
    logic        a_q;        // A operand is the LDQ head (R7 as a source)
    logic        a_zero;     // A operand is the constant 0 (R0 in load/store)
    logic        a_bg;       // A register is in the background bank
    logic [2:0]  ra;
    // source B
    logic        use_b;
    logic        b_q;
    logic        b_imm;      // B bus carries the immediate parcel
    logic [2:0]  rb;
    // results: stage-1 C bus use and stage-2 C bus use
    dest_e       d1;         // destination of a stage-1 result
    dest_e       d2;         // destination of a stage-2 result
    logic        rd_bg;      // register destination in the background bank
    logic [2:0]  rd;
    otag_e       mtag;       // tag for a LAR or SQ write
    // branch
    bcond_e      cond;
    logic        bq_push;
    logic [2:0]  br;         // branch register number (PBR, LDBR)
    word_t       imm;
  } ctrl_t;

  // an issued instruction: the control word with register fields bound to
  // 4-bit physical register descriptors {bank, field}
  typedef struct packed {
    ctrl_t       c;
    logic [3:0]  pa;
    logic [3:0]  pb;
    logic [3:0]  pd;
  } issued_t;

  function automatic logic two_parcel(input logic [6:0] op);
    return op[6];
  endfunction

  function automatic logic is_pbr(input logic [6:0] op);
    return op[6:4] == 3'b011;
  endfunction

endpackage
