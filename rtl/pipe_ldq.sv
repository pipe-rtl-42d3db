// pipe_ldq: the on-chip part of the load data queue (LDQ).
//
// A DEPTH-element register array with head and tail pointers, filled by the
// memory interface and read by the datapath as register R7. An instruction
// that names R7 once takes the head element (pop); one that names R7 as both
// sources takes two (pop with pop2), the head going to the A bus and the next
// element (head2) to the B bus. When the
// queue is empty, data arriving on the memory input bus is passed straight to
// the outputs, so an element can be used in the cycle it arrives without
// first being latched; a pop in that cycle consumes it and it is not stored.
//
// Timing: push and pop take effect at the clock edge; a push and a pop may
// occur in the same cycle, also when the queue is full. full and empty are
// registered state and change at the edge of the cycle that fills or empties
// the queue. Reset clears the pointers and marks the queue empty.
// A pop with no element and no arriving data, or a push into a full queue
// without a pop, is an error that the assertions catch.
module pipe_ldq
  import pipe_pkg::*;
#(
  parameter int DEPTH = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  word_t  push_data,
  input  logic   pop,
  input  logic   pop2,        // with pop: remove two elements (needs two stored)
  output word_t  head,        // to the A or B bus
  output word_t  head2,       // second element, to the B bus when pop2
  output logic   head_valid,  // an element (stored or arriving) is available
  output logic   empty,
  output logic   full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  word_t           mem [DEPTH];
  logic [PW-1:0]   hd, tl;

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  wire bypass = empty && push;       // arriving word forwarded to the buses
  assign head       = empty ? push_data : mem[hd];
  assign head2      = mem[nxt(hd)];
  assign head_valid = !empty || push;
  assign empty      = (count == '0);
  assign full       = (count == ($bits(count))'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd <= '0; tl <= '0; count <= '0;
    end else begin
      if (bypass && pop) begin
        // word used straight from the input bus; queue stays empty
      end else begin
        if (push) begin
          mem[tl] <= push_data;
          tl <= nxt(tl);
        end
        if (pop) hd <= pop2 ? nxt(nxt(hd)) : nxt(hd);
        count <= count + ($bits(count))'(push) - ($bits(count))'(pop) - ($bits(count))'(pop && pop2);
      end
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
  a_pop2_avail:   assert property (@(posedge clk) disable iff (!rst_n) pop2 |-> pop && count >= 2);
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) (push && full) |-> pop);

endmodule
