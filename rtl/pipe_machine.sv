// pipe_machine: a PIPE machine, the top of the design.
//
// Two identical PIPE processors run decoupled instruction streams: the access
// processor (A-unit) computes addresses and issues all memory references,
// including "alternate" loads whose data the memory controller delivers to
// the execute processor's (E-unit's) load queue and alternate store
// addresses that the controller pairs with the E-unit's store data. The
// E-unit does the main computation. Boolean branch outcomes cross between
// the two through a branch queue in each direction, so both streams follow
// the same path.
//
// The memory controller is not part of this RTL: each processor's tagged
// memory pins are brought out (a_* and e_*), and a controller model connects
// to them. The processors differ only in their reset program counters.
module pipe_machine #(
  parameter int          LDQ_DEPTH  = 3,
  parameter int          BQ_DEPTH   = 4,
  parameter logic [15:0] A_RESET_PC = 16'h0000,
  parameter logic [15:0] E_RESET_PC = 16'h0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // access processor memory pins
  output logic [2:0]  a_out_tag,
  output logic [15:0] a_out_data,
  input  logic [1:0]  a_in_tag,
  input  logic [15:0] a_in_data,
  output logic        a_ldq_full,
  output logic        a_interruptible,
  output logic        a_overflow,
  // execute processor memory pins
  output logic [2:0]  e_out_tag,
  output logic [15:0] e_out_data,
  input  logic [1:0]  e_in_tag,
  input  logic [15:0] e_in_data,
  output logic        e_ldq_full,
  output logic        e_interruptible,
  output logic        e_overflow
);

  logic a2e_push, a2e_bit, a2e_full;
  logic e2a_push, e2a_bit, e2a_full;

  pipe_processor #(.LDQ_DEPTH(LDQ_DEPTH), .BQ_DEPTH(BQ_DEPTH), .RESET_PC(A_RESET_PC)) u_a (
    .clk, .rst_n,
    .mem_out_tag(a_out_tag), .mem_out_data(a_out_data),
    .mem_in_tag(a_in_tag), .mem_in_data(a_in_data), .ldq_full(a_ldq_full),
    .bq_in_push(e2a_push), .bq_in_bit(e2a_bit), .bq_in_full(e2a_full),
    .bq_out_push(a2e_push), .bq_out_bit(a2e_bit), .bq_out_full(a2e_full),
    .interruptible(a_interruptible), .overflow(a_overflow)
  );

  pipe_processor #(.LDQ_DEPTH(LDQ_DEPTH), .BQ_DEPTH(BQ_DEPTH), .RESET_PC(E_RESET_PC)) u_e (
    .clk, .rst_n,
    .mem_out_tag(e_out_tag), .mem_out_data(e_out_data),
    .mem_in_tag(e_in_tag), .mem_in_data(e_in_data), .ldq_full(e_ldq_full),
    .bq_in_push(a2e_push), .bq_in_bit(a2e_bit), .bq_in_full(a2e_full),
    .bq_out_push(e2a_push), .bq_out_bit(e2a_bit), .bq_out_full(e2a_full),
    .interruptible(e_interruptible), .overflow(e_overflow)
  );

endmodule
