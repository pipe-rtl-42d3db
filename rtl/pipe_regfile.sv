// pipe_regfile: the 16 x 16-bit register file, two read ports and one write port.
//
// The sixteen registers form two banks of eight. One bank is the foreground
// bank that three-bit register fields normally name; the other is the
// background bank. The bank roles are held in one flag, fg, and swap toggles
// it, which is how a SWAP instruction exchanges the banks in a single cycle
// without moving data. Addresses here are 4-bit physical descriptors
// {bank, register}; the issue stage forms them from the instruction fields
// and fg ("bound into a four-bit register descriptor at issue time").
//
// Timing: reads are combinational (A and B ports). The write port (C) and the
// bank flag update on the rising clock edge, so a value written in one cycle
// is read by the next. Reset clears all registers and makes bank 0 the
// foreground bank; the reset values are this design's choice.
module pipe_regfile
  import pipe_pkg::*;
#(
  parameter int NREG = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  a_addr,
  output word_t       a_data,
  input  logic [3:0]  b_addr,
  output word_t       b_data,
  input  logic        c_en,
  input  logic [3:0]  c_addr,
  input  word_t       c_data,
  input  logic        swap,
  output logic        fg      // physical bank currently in the foreground
);

  word_t regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
      fg <= 1'b0;
    end else begin
      if (c_en) regs[c_addr] <= c_data;
      if (swap) fg <= ~fg;
    end
  end

  assign a_data = regs[a_addr];
  assign b_data = regs[b_addr];

endmodule
