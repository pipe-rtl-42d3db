// pipe_fetch: the instruction fetch unit and its branch control.
//
// The fetch unit hands one instruction parcel per cycle to decode, taking it
// from the instruction cache at the Fetch Program Counter (FetchPC), and only
// fetches parcels that will execute. It watches the parcels it passes:
//   - A prepare-to-branch (PBR) parcel sets Branch Pending (BP), loads its
//     parcel-count field (up to 7) into the Parcel Counter (PCnt) and copies
//     the named branch register into the Pending Program Counter (PendingPC).
//   - While BP is set each further parcel decrements PCnt; when PCnt reaches
//     zero fetching stops.
//   - When the PBR executes, a true condition sets Branch-to-Happen (BH); a
//     false one clears BP, and sequential fetching resumes.
//   - With BP, BH and PCnt = 0, PendingPC is gated to FetchPC and BP and BH
//     are cleared: control has been transferred without fetching any parcel
//     that would be discarded.
// The eight branch registers BR0-BR7 live here and are written by LDBR when it
// executes (br_we). Two interlocks are this design's choice, where the
// architecture leaves the case open: a PBR parcel is held while another
// branch is pending, and while an LDBR that has already passed fetch has not
// yet written its branch register.
// The unit tracks instruction length (opcode bit 6) so that the immediate
// parcel of a two-parcel instruction is never taken for an opcode.
//
// Timing: the cache answers in the cycle of the request, so a parcel passes
// to decode in the cycle it is found; all state changes at the clock edge.
module pipe_fetch
  import pipe_pkg::*;
#(
  parameter logic [15:0] RESET_PC = 16'h0000
) (
  input  logic       clk,
  input  logic       rst_n,
  // cache
  output word_t      pc,
  output logic       req,
  input  logic       c_valid,
  input  word_t      c_data,
  // decode
  output logic       p_valid,
  output word_t      p_data,
  input  logic       p_ready,
  // from execution
  input  logic       br_resolve,
  input  logic       br_taken,
  input  logic       br_we,
  input  logic [2:0] br_idx,
  input  word_t      br_data,
  // status
  output logic       bp,
  output logic       bh,
  output logic [2:0] pcnt,
  output word_t      pending_pc,
  output logic       redirect       // PendingPC gated to FetchPC this cycle
);

  word_t      br [8];
  logic       second;               // next parcel is an immediate
  logic [2:0] brw_pending;          // LDBRs fetched but not yet executed

  wire [6:0] op       = c_data[15:9];
  wire       is_op    = !second;
  wire       pbr_p    = is_op && is_pbr(op);
  wire       ldbr_p   = is_op && (op == OP_LDBR);
  wire       inhibit  = bp && (pcnt == '0);
  wire       pbr_hold = pbr_p && (bp || brw_pending != '0);

  assign redirect = inhibit && bh;
  assign req      = p_ready && !inhibit;
  assign p_valid  = req && c_valid && !pbr_hold;
  assign p_data   = c_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc          <= RESET_PC;
      bp          <= 1'b0;
      bh          <= 1'b0;
      pcnt        <= '0;
      pending_pc  <= '0;
      second      <= 1'b0;
      brw_pending <= '0;
      for (int i = 0; i < 8; i++) br[i] <= '0;
    end else begin
      if (br_we) br[br_idx] <= br_data;
      brw_pending <= brw_pending + (p_valid && ldbr_p ? 3'd1 : 3'd0) - (br_we ? 3'd1 : 3'd0);

      if (br_resolve) begin
        if (br_taken) bh <= 1'b1;
        else          bp <= 1'b0;
      end

      if (redirect) begin
        pc <= pending_pc;
        bp <= 1'b0;
        bh <= 1'b0;
      end else if (p_valid) begin
        pc     <= pc + 1'b1;
        second <= is_op && two_parcel(op);
        if (pbr_p) begin
          bp         <= 1'b1;
          bh         <= 1'b0;
          pcnt       <= c_data[8:6];
          pending_pc <= br[c_data[5:3]];
        end else if (bp) begin
          pcnt <= pcnt - 1'b1;
        end
      end
    end
  end

  a_resolve_pending: assert property (@(posedge clk) disable iff (!rst_n) br_resolve |-> bp);

endmodule
