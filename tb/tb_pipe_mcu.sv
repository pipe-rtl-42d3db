// tb_pipe_mcu: behavioural model of the PIPE memory controller and memory,
// for testbenches only (the controller is not part of the RTL).
//
// Two processor ports, A and E. Each cycle it reads every port's tagged
// output and acts on it:
//   block fetch        queue the four instruction words of the line
//   instruction addr   queue one instruction word
//   load address       queue a load for the issuing processor (internal) or
//                      for the other processor (alternate)
//   store address      append to the issuing (internal) or other (alternate)
//                      processor's store address queue
//   store data         append to the issuing processor's store data queue
// Store address and store data queue heads are paired and written to data
// memory. A load waits while an earlier store to its address is unpaired.
// Replies come back LAT cycles after the request: instruction words first,
// then load data, the latter only while the processor's ldq_full pin is low.
// With BUSY_PCT > 0 a port randomly reports "memory busy" in idle cycles.
// Inputs are driven at the falling clock edge so that they see the
// processor's state after the rising edge. Instruction memories are separate
// per processor; the data memory is shared.
module tb_pipe_mcu #(
  parameter int LAT      = 3,
  parameter int BUSY_PCT = 5
) (
  input  logic        clk,
  input  logic [2:0]  a_out_tag,
  input  logic [15:0] a_out_data,
  output logic [1:0]  a_in_tag,
  output logic [15:0] a_in_data,
  input  logic        a_ldq_full,
  input  logic [2:0]  e_out_tag,
  input  logic [15:0] e_out_data,
  output logic [1:0]  e_in_tag,
  output logic [15:0] e_in_data,
  input  logic        e_ldq_full
);
  import pipe_pkg::*;

  logic [15:0] imem [2][4096];
  logic [15:0] dmem [65536];

  typedef struct { int ready; logic [15:0] v; } item_t;
  item_t ique [2][$];      // instruction words to deliver
  item_t lque [2][$];      // load addresses awaiting delivery (v = address)
  logic [15:0] saq [2][$];
  logic [15:0] sdq [2][$];
  int cycle = 0;
  int stores_done = 0, loads_done = 0, busy_cycles = 0, held_full = 0;
  int reqs [8];

  initial begin
    a_in_tag = IT_NONE; a_in_data = '0; e_in_tag = IT_NONE; e_in_data = '0;
    foreach (dmem[i]) dmem[i] = '0;
    for (int p = 0; p < 2; p++) for (int i = 0; i < 4096; i++) imem[p][i] = '0;
    foreach (reqs[i]) reqs[i] = 0;
  end

  task automatic take(input int p, input logic [2:0] tag, input logic [15:0] d);
    int o;
    o = 1 - p;
    reqs[tag]++;
    unique case (otag_e'(tag))
      OT_NONE: ;
      OT_IADDR: ique[p].push_back('{cycle + LAT, imem[p][d[11:0]]});
      OT_BLOCK: for (int i = 0; i < 4; i++) ique[p].push_back('{cycle + LAT + i, imem[p][12'(d[11:0] + 12'(i))]});
      OT_LADDR: lque[p].push_back('{cycle + LAT, d});
      OT_ALT_LADDR: lque[o].push_back('{cycle + LAT, d});
      OT_SADDR: saq[p].push_back(d);
      OT_ALT_SADDR: saq[o].push_back(d);
      OT_SDATA: sdq[p].push_back(d);
      default: ;
    endcase
  endtask

  function automatic logic store_pending(input logic [15:0] a);
    for (int p = 0; p < 2; p++)
      foreach (saq[p][i]) if (saq[p][i] == a) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    cycle++;
    take(0, a_out_tag, a_out_data);
    take(1, e_out_tag, e_out_data);
    for (int p = 0; p < 2; p++)
      while (saq[p].size() > 0 && sdq[p].size() > 0) begin
        dmem[saq[p].pop_front()] = sdq[p].pop_front();
        stores_done++;
      end
  end

  task automatic drive(input int p, input logic full, output logic [1:0] tag, output logic [15:0] d);
    tag = IT_NONE; d = '0;
    if (ique[p].size() > 0 && ique[p][0].ready <= cycle) begin
      tag = IT_INSTR; d = ique[p].pop_front().v;
    end else if (lque[p].size() > 0 && lque[p][0].ready <= cycle && !store_pending(lque[p][0].v)) begin
      if (full) held_full++;
      else begin
        tag = IT_DATA; d = dmem[lque[p].pop_front().v];
        loads_done++;
      end
    end else if (($urandom % 100) < BUSY_PCT) begin
      tag = IT_BUSY; busy_cycles++;
    end
  endtask

  always @(negedge clk) begin
    logic [1:0] t; logic [15:0] d;
    drive(0, a_ldq_full, t, d); a_in_tag = t; a_in_data = d;
    drive(1, e_ldq_full, t, d); e_in_tag = t; e_in_data = d;
  end

endmodule
