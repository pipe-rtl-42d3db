// pipe_alu: the two-stage ALU.
//
// Its five parts are the ones the architecture names:
//   function generator  all sixteen bitwise functions f(a,b), selected by a
//                       4-bit truth table (result bit = tt[{a,b}]), and the
//                       propagate/generate signals for add and subtract
//   condition flags     zero test of the A operand plus its sign bit, used
//                       by conditional branches
//   carry lookahead     two-level lookahead giving the carries into bits 4,
//                       8 and 12 from the 4-bit group propagate/generate
//   sum stage           four 4-bit slices, each forming its sums from the
//                       latched P/G and its group carry-in
//   overflow            carry into the sign bit XOR carry out of it
//
// Timing. Stage 1 is combinational from a/b during the first execution cycle:
// logic_out, zero and sign are valid there, and the lookahead runs. On the
// clock edge at the end of that cycle, when s1_load is high, P, G and the
// group carries are latched. Stage 2 is combinational from that latch: sum,
// ovf and cout are valid during the following cycle, early enough for the
// datapath to forward sum back onto the A/B buses of the next instruction in
// the same cycle. Subtraction is a + ~b + 1 (this design's choice of method).
module pipe_alu
  import pipe_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // stage 1
  input  word_t       a,
  input  word_t       b,
  input  logic        sub,
  input  logic [3:0]  tt,
  input  logic        s1_load,
  output word_t       logic_out,
  output logic        zero,
  output logic        sign,
  // stage 2
  output word_t       sum,
  output logic        cout,
  output logic        ovf
);

  // ---------------- stage 1 ----------------
  word_t      bx, p, g;
  logic [3:0] gp, gg;       // group propagate / generate
  logic [4:0] gc;           // carry into each 4-bit group, gc[4] = carry out

  always_comb begin
    for (int i = 0; i < W; i++) logic_out[i] = tt[{a[i], b[i]}];
    bx = sub ? ~b : b;
    p  = a ^ bx;
    g  = a & bx;
    for (int j = 0; j < 4; j++) begin
      gp[j] = &p[4*j +: 4];
      gg[j] = g[4*j+3] | (p[4*j+3] & g[4*j+2]) | (p[4*j+3] & p[4*j+2] & g[4*j+1]) |
              (p[4*j+3] & p[4*j+2] & p[4*j+1] & g[4*j]);
    end
    gc[0] = sub;
    gc[1] = gg[0] | (gp[0] & gc[0]);
    gc[2] = gg[1] | (gp[1] & gg[0]) | (gp[1] & gp[0] & gc[0]);
    gc[3] = gg[2] | (gp[2] & gg[1]) | (gp[2] & gp[1] & gg[0]) | (gp[2] & gp[1] & gp[0] & gc[0]);
    gc[4] = gg[3] | (gp[3] & gc[3]);
  end

  assign zero = (a == '0);
  assign sign = a[W-1];

  // stage 1 / stage 2 latch
  word_t      p_q, g_q;
  logic [4:0] gc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q <= '0; g_q <= '0; gc_q <= '0;
    end else if (s1_load) begin
      p_q <= p; g_q <= g; gc_q <= gc;
    end
  end

  // ---------------- stage 2 ----------------
  logic [W:0] c;            // carry into each bit

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      c[4*j] = gc_q[j];
      for (int k = 1; k < 4; k++)
        c[4*j+k] = g_q[4*j+k-1] | (p_q[4*j+k-1] & c[4*j+k-1]);
    end
    c[W] = gc_q[4];
    sum  = p_q ^ c[W-1:0];
  end

  assign cout = c[W];
  assign ovf  = c[W] ^ c[W-1];

endmodule
