// pipe_sq: the one-element on-chip store queue (SQ).
//
// The store address queue and store data queue share this single register on
// the chip, because both leave over the same output pins; the memory
// controller keeps them as separate, longer queues. Each entry carries the
// output tag that tells the controller what it is: store data, internal
// store address or alternate store address. The full flag is the status bit
// the issue logic uses to hold back store-address and store-data instructions.
//
// Timing: written from the result bus at the clock edge when wr is high,
// emptied by the memory interface at the edge when take is high. A write into
// a full entry is allowed only in the cycle it is taken (not used by the
// processor, whose issue logic never does it; the assertion checks this).
module pipe_sq
  import pipe_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr,
  input  word_t  wr_data,
  input  otag_e  wr_tag,
  input  logic   take,
  output logic   full,
  output word_t  data,
  output otag_e  tag
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      data <= '0;
      tag  <= OT_NONE;
    end else begin
      if (wr) begin
        data <= wr_data;
        tag  <= wr_tag;
        full <= 1'b1;
      end else if (take) begin
        full <= 1'b0;
      end
    end
  end

  a_tag_ok:  assert property (@(posedge clk) disable iff (!rst_n)
                              wr |-> (wr_tag inside {OT_SDATA, OT_SADDR, OT_ALT_SADDR}));
  a_no_over: assert property (@(posedge clk) disable iff (!rst_n) (wr && full) |-> take);
  a_take_ok: assert property (@(posedge clk) disable iff (!rst_n) take |-> full);

endmodule
