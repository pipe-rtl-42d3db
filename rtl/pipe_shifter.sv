// pipe_shifter: the one-stage barrel shifter.
//
// Structure follows the shifter the architecture describes: the operand
// (ShftIn) comes from the A bus, a decode step (ShftDecode) turns the low four
// bits of the B bus into sixteen one-hot S control lines, and a crossbar links
// a 31-bit L bus to a 16-bit R bus, with S[k] connecting L[i+k] to R[i]:
//   rotate right     ShftIn on L[30:16] and L[15:0], result read from R
//   logical right    ShftIn on L[15:0], L[30:16] = 0, result read from R
//   arithmetic right as logical right, but L[30:16] filled with the sign
//   logical left     ShftIn driven onto R, result read from L[15:0]; L bits
//                    with no R bit above them read as 0
// The real circuit carries L and R complemented and precharged and splits the
// work over two clock phases (ShftIn latched in one, ShftOut in the other).
// This model keeps the bus structure but is purely combinational: the
// datapath samples the result at the end of the first execution stage, which
// is where the ShftOut latch sits.
module pipe_shifter
  import pipe_pkg::*;
(
  input  word_t  a_bus,   // ShftIn: the operand
  input  word_t  b_bus,   // shift amount in b_bus[3:0]
  input  shop_e  op,
  output word_t  result   // ShftOut value, driven to the C bus
);

  logic [15:0] s_lines;   // ShftDecode output, one-hot
  logic [30:0] l_bus;
  logic [15:0] r_bus;
  logic [15:0] l_out;

  always_comb begin
    s_lines = 16'h0001 << b_bus[3:0];
    unique case (op)
      SH_ROR:  l_bus = {a_bus[14:0], a_bus};
      SH_SRA:  l_bus = {{15{a_bus[15]}}, a_bus};
      default: l_bus = {15'b0, a_bus};
    endcase
    // L to R direction: R[i] = L[i+k] for the selected k
    r_bus = '0;
    for (int k = 0; k < 16; k++)
      if (s_lines[k]) r_bus = l_bus[k +: 16];
    // R to L direction (left shift): the operand drives R, L[j] = R[j-k]
    l_out = '0;
    for (int k = 0; k < 16; k++)
      if (s_lines[k]) l_out = a_bus << k;
    result = (op == SH_SLL) ? l_out : r_bus;
  end

endmodule
