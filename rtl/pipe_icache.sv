// pipe_icache: the on-chip direct-mapped instruction cache.
//
// LINES lines of WORDS 16-bit words (16 x 4 = 64 words), each with a TAGW-bit
// tag and a valid bit. A 16-bit parcel address splits into
//   [15:6] tag   [5:2] line   [1:0] word
// so the 10-bit tag is the high-order part of the fetch PC.
//
// Lookup: while req is high the fetch PC indexes the tag and data arrays; on
// a tag match with the valid bit set, the addressed word is returned in the
// same cycle (hit, rvalid). On a miss the whole line is replaced: the cache
// raises mreq with the line's first address until the memory interface
// accepts it (mack), then collects the returning words, which arrive in word
// order (word 0 first), in the assembly register. When the last word arrives
// the line, its tag and valid bit are written, and the requested word is
// passed through to rdata in that same cycle. Reset clears all valid bits.
// Only one miss is outstanding at a time.
module pipe_icache
  import pipe_pkg::*;
#(
  parameter int LINES = 16,
  parameter int WORDS = 4,
  parameter int TAGW  = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  pc,
  input  logic   req,
  output logic   rvalid,
  output word_t  rdata,
  output logic   hit,
  // line refill
  output logic   mreq,
  output word_t  maddr,
  input  logic   mack,
  input  logic   fill_valid,
  input  word_t  fill_data,
  output logic   miss_start    // observation: a miss began this cycle
);

  localparam int OW = $clog2(WORDS);
  localparam int LW = $clog2(LINES);
  initial assert (OW + LW + TAGW == W) else $error("cache geometry must cover the 16-bit address");

  word_t            data_a [LINES][WORDS];
  logic [TAGW-1:0]  tag_a  [LINES];
  logic [LINES-1:0] valid_a;

  wire [OW-1:0]   pc_word = pc[OW-1:0];
  wire [LW-1:0]   pc_line = pc[OW +: LW];
  wire [TAGW-1:0] pc_tag  = pc[W-1 -: TAGW];

  typedef enum logic [1:0] { S_IDLE, S_REQ, S_FILL } state_e;
  state_e        state;
  word_t         miss_pc;
  logic [OW-1:0] wcnt;
  word_t         asm_r [WORDS];     // cache assembly register

  assign hit = req && (state == S_IDLE) && valid_a[pc_line] && (tag_a[pc_line] == pc_tag);

  wire last_word = (state == S_FILL) && fill_valid && (wcnt == OW'(WORDS - 1));

  // assembled line including the word arriving now
  word_t line_now [WORDS];
  always_comb begin
    for (int i = 0; i < WORDS; i++)
      line_now[i] = (fill_valid && wcnt == OW'(i)) ? fill_data : asm_r[i];
  end

  wire pass = last_word && req && (pc == miss_pc);
  assign rvalid = hit || pass;
  assign rdata  = pass ? line_now[pc_word] : data_a[pc_line][pc_word];

  assign mreq       = (state == S_REQ);
  assign maddr      = {miss_pc[W-1:OW], {OW{1'b0}}};
  assign miss_start = req && (state == S_IDLE) && !hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      valid_a <= '0;
      miss_pc <= '0;
      wcnt    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (miss_start) begin
          miss_pc <= pc;
          state   <= S_REQ;
        end
        S_REQ: if (mack) begin
          wcnt  <= '0;
          state <= S_FILL;
        end
        S_FILL: if (fill_valid) begin
          wcnt <= wcnt + 1'b1;
          if (last_word) begin
            valid_a[miss_pc[OW +: LW]] <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // arrays without reset
  always_ff @(posedge clk) begin
    if (state == S_FILL && fill_valid) asm_r[wcnt] <= fill_data;
    if (last_word) begin
      tag_a[miss_pc[OW +: LW]] <= miss_pc[W-1 -: TAGW];
      for (int i = 0; i < WORDS; i++) data_a[miss_pc[OW +: LW]][i] <= line_now[i];
    end
  end

endmodule
