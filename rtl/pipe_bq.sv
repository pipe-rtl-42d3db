// pipe_bq: a branch queue.
//
// Carries Boolean branch outcomes from one processor of a PIPE machine to the
// other, so that both take the same path on a conditional test. The sending
// processor pushes the outcome of a PBR that asks for it; a PBR of the
// receiving processor with a branch-queue condition pops one outcome and
// branches on it. The queue sits at the receiving processor's instruction
// unit. The architecture does not give its length; DEPTH is this design's
// choice.
//
// Timing: push and pop at the clock edge, both allowed in one cycle; head,
// empty and full come from registered state. Reset empties the queue.
module pipe_bq #(
  parameter int DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  logic push_bit,
  input  logic pop,
  output logic head,
  output logic empty,
  output logic full
);

  localparam int PW = $clog2(DEPTH);
  logic [DEPTH-1:0] q;
  logic [PW-1:0]    hd, tl;
  logic [PW:0]      cnt;

  assign head  = q[hd];
  assign empty = (cnt == '0);
  assign full  = (cnt == (PW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; hd <= '0; tl <= '0; cnt <= '0;
    end else begin
      if (push) begin
        q[tl] <= push_bit;
        tl <= (tl == PW'(DEPTH - 1)) ? '0 : tl + 1'b1;
      end
      if (pop) hd <= (hd == PW'(DEPTH - 1)) ? '0 : hd + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_over:  assert property (@(posedge clk) disable iff (!rst_n) (push && full) |-> pop);
  a_no_under: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
