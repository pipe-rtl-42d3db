// Testbench for pipe_fetch with a modelled cache, decode stage and execution
// stage. The program holds one-parcel instructions, two-parcel instructions
// whose immediate parcel looks like a PBR opcode, LDBRs and PBRs with random
// parcel counts. The testbench predicts the exact parcel address sequence:
// after a PBR with count k, k more parcels, then either the branch target
// (taken) or the next parcel (not taken). It resolves each PBR a random
// number of cycles after it passed fetch, so a parcel fetched beyond the
// count before resolution is caught as an address mismatch. Also checked:
// a PBR taken-early waits for PCnt, LDBR results reach the branch registers
// before a later PBR reads them, and at most one parcel per cycle.
module tb_pipe_fetch;
  import pipe_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t pc, c_data, p_data, br_data, pending_pc;
  logic req, c_valid, p_valid, p_ready, br_resolve, br_taken, br_we, bp, bh, redirect;
  logic [2:0] br_idx, pcnt;
  int checks = 0, failures = 0, taken_n = 0, nottaken_n = 0, stalls = 0;

  pipe_fetch dut (.*);
  always #5 clk = ~clk;
  initial begin #3000000; $display("stuck pc=%h bp=%b bh=%b pcnt=%0d brw=%0d pend=%b left=%0d dec=%b fetched=%0d", pc, bp, bh, pcnt, dut.brw_pending, pend, left, decided, fetched); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h", what, pc); end
  endtask

  // program memory built at time 0
  word_t prog [1024];
  word_t brv [8];
  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = {OP_NOP, 9'(i)};
    // LDBR br1..br3 at the start
    for (int b = 0; b < 4; b++) begin
      prog[2*b] = {OP_LDBR, 3'(b), 6'b0};
      brv[b] = 16'(64 + 128 * b);
      prog[2*b+1] = brv[b];
    end
    // PBR blocks in each region: at region base + 20
    for (int r = 0; r < 8; r++) begin
      int base;
      base = 128 * r;
      prog[base + 10] = {OP_LD, 3'd1, 6'b0};
      prog[base + 11] = {OP_PBR, 9'h1FF};      // immediate that looks like a PBR
      prog[base + 20] = {OP_PBR | 7'(r % 6), 3'(r % 8), 3'((r + 1) % 4), 3'd0};
      prog[base + 64 + 5] = {OP_PBR, 3'd2, 3'(r % 4), 3'd1};
      prog[base + 32] = {OP_PBR, 3'd0, 3'((r + 2) % 4), 3'd1};
      prog[base + 96] = {OP_PBR, 3'd7, 3'((r + 3) % 4), 3'd1};
      prog[base + 110] = {OP_PBR, 3'd3, 3'(r % 4), 3'd1};
    end
  end

  logic c_hit_r;
  assign c_valid = req && c_hit_r;   // cache sometimes misses
  assign c_data  = prog[pc[9:0]];

  // expected-sequence model
  int exp_pc, left;   // left: parcels still allowed after a pending PBR (-1 none)
  int pbr_target, pbr_pc;
  logic pend, decided, dtaken, second;
  int resolve_in, ldbr_in [$];
  int ldbr_idx [$];
  word_t ldbr_val [$];
  int fetched = 0;

  initial begin
    p_ready = 0; br_resolve = 0; br_taken = 0; br_we = 0; br_idx = 0; br_data = 0;
    exp_pc = 0; left = -1; pend = 0; decided = 0; second = 0; resolve_in = -1;
    repeat (2) @(posedge clk); rst_n = 1;
    while (fetched < 3000) begin
      @(negedge clk);
      p_ready = ($urandom % 5 != 0);
      c_hit_r = ($urandom % 4 != 0);
      br_resolve = 0; br_we = 0;
      // execution: LDBR writes after a delay
      if (ldbr_in.size() > 0) begin
        if (ldbr_in[0] <= 0) begin
          br_we = 1; br_idx = 3'(ldbr_idx[0]); br_data = ldbr_val[0];
          void'(ldbr_in.pop_front()); void'(ldbr_idx.pop_front()); void'(ldbr_val.pop_front());
        end
        foreach (ldbr_in[i]) ldbr_in[i]--;
      end
      // execution: PBR resolves after a delay
      if (pend && !decided) begin
        if (resolve_in == 0) begin
          br_resolve = 1; br_taken = 1'($urandom); decided = 1; dtaken = br_taken;
          if (br_taken) taken_n++; else nottaken_n++;
        end else resolve_in--;
      end
      #1;
      if (p_valid) begin
        chk(p_ready, "parcel only when decode ready");
        chk(pc[9:0] == 10'(exp_pc), "parcel address sequence");
        if (p_data != prog[exp_pc[9:0]]) $display("pd=%h want=%h exp=%0d", p_data, prog[exp_pc[9:0]], exp_pc);
        chk(p_data == prog[exp_pc[9:0]], "parcel data");
        fetched++;
        if (!second && is_pbr(p_data[15:9])) begin
          pend = 1; decided = 0; left = p_data[8:6];
          pbr_target = int'(brv[p_data[5:3]]); resolve_in = $urandom % 8;
          exp_pc = (exp_pc + 1) % 1024;
        end else begin
          if (!second && p_data[15:9] == OP_LDBR) begin
            ldbr_in.push_back($urandom % 6); ldbr_idx.push_back(p_data[8:6]);
            ldbr_val.push_back(prog[exp_pc[9:0] + 1]);
          end
          exp_pc = (exp_pc + 1) % 1024;
          if (pend) left--;
        end
        second = !second && two_parcel(p_data[15:9]);
      end else if (pend && left == 0 && !decided) stalls++;
      @(posedge clk);
      // branch transfer once the count is used up and the outcome is known
      if (pend && decided && (left == 0 || !dtaken)) begin
        if (dtaken) exp_pc = pbr_target;
        pend = 0;
      end
      exp_pc = exp_pc % 1024;
    end
    chk(taken_n > 10 && nottaken_n > 10, "both branch outcomes seen");
    chk(stalls > 0, "fetch held at zero parcel count");
    $display("taken=%0d not_taken=%0d stall_cycles=%0d", taken_n, nottaken_n, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
