// pipe_memif: the memory/processor interface.
//
// The processor has dedicated, unidirectional output and input pins, so
// requests and returning data never wait for a bus turnaround. Every cycle
// carries at most one item each way, told apart by a tag:
//   output  3-bit tag + 16-bit value: block fetch (line address of an
//           instruction cache miss), internal/alternate load address (from
//           the LAR), store data or internal/alternate store address (from
//           the SQ)
//   input   2-bit tag + 16-bit value: memory busy, no data, instruction word
//           (routed to the cache refill), load data (routed to the LDQ)
// The to-memory and from-memory sides are independent, except that an input
// tag of "memory busy" holds back all output requests in that cycle.
// When several requests wait, this design sends the cache's block fetch
// first, then the load address, then the store queue entry; the
// architecture does not give an order. Cache misses use the block-fetch tag;
// the single-word instruction-address tag is defined but not generated, since
// the cache always refills whole lines.
//
// Timing: combinational. A source is told it has been taken (mack, lar_take,
// sq_take) in the cycle its item is on the output pins.
module pipe_memif
  import pipe_pkg::*;
(
  // pins
  output otag_e  out_tag,
  output word_t  out_data,
  input  itag_e  in_tag,
  input  word_t  in_data,
  // cache
  input  logic   mreq,
  input  word_t  maddr,
  output logic   mack,
  output logic   fill_valid,
  output word_t  fill_data,
  // load address register
  input  logic   lar_full,
  input  word_t  lar_addr,
  input  otag_e  lar_tag,
  output logic   lar_take,
  // store queue
  input  logic   sq_full,
  input  word_t  sq_data,
  input  otag_e  sq_tag,
  output logic   sq_take,
  // load data queue
  output logic   ldq_push,
  output word_t  ldq_data,
  output logic   busy          // observation: output held back this cycle
);

  assign busy = (in_tag == IT_BUSY);

  always_comb begin
    mack = 1'b0; lar_take = 1'b0; sq_take = 1'b0;
    out_tag = OT_NONE; out_data = '0;
    if (!busy) begin
      if (mreq) begin
        mack = 1'b1; out_tag = OT_BLOCK; out_data = maddr;
      end else if (lar_full) begin
        lar_take = 1'b1; out_tag = lar_tag; out_data = lar_addr;
      end else if (sq_full) begin
        sq_take = 1'b1; out_tag = sq_tag; out_data = sq_data;
      end
    end
  end

  assign fill_valid = (in_tag == IT_INSTR);
  assign fill_data  = in_data;
  assign ldq_push   = (in_tag == IT_DATA);
  assign ldq_data   = in_data;

endmodule
