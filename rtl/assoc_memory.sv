// assoc_memory: the maskable, fully associative page-map memory AM.
//
// Each 32-bit word (fields X, Y, Z, SN, S) describes one main-memory page or,
// with status 110, acts as a segment-number register. A search compares every
// word with the argument `arg` in the bit positions where `mask` is 1; words are
// unique, so at most one matches in normal use. The search is combinational:
// `rdata` is the matching word and `hit` says whether there is one. Two
// operations, as in the document:
//   match-read  - the caller loads `rdata` into its buffer register D;
//   match-write - when `mw` is high at a clock edge, `wdata` (the whole of D)
//                 replaces the matching word. Without a match nothing is written.
// Should several words match, the lowest-numbered one is used and `multi` is
// raised; an assertion flags a match-write in that case.
// A host port reads and writes a word by index; it is how the map is first set
// up, a path the document does not describe. Reset marks every word unused
// (status 111), a code the document leaves free, so that no stale word matches.
module assoc_memory
  import loader_pkg::*;
#(
  parameter int unsigned WORDS = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  // search port
  input  am_word_t                 arg,
  input  am_word_t                 mask,
  input  logic                     mw,
  input  am_word_t                 wdata,
  output am_word_t                 rdata,
  output logic                     hit,
  output logic                     multi,
  // host port
  input  logic                     host_we,
  input  logic [$clog2(WORDS)-1:0] host_idx,
  input  am_word_t                 host_wdata,
  output am_word_t                 host_rdata
);
  am_word_t mem [WORDS];
  logic [WORDS-1:0] match;
  logic [$clog2(WORDS)-1:0] midx;

  always_comb begin
    for (int i = 0; i < WORDS; i++)
      match[i] = ((mem[i] ^ arg) & mask) == '0;
  end

  always_comb begin
    midx  = '0;
    hit   = 1'b0;
    multi = 1'b0;
    for (int i = WORDS - 1; i >= 0; i--) begin
      if (match[i]) begin
        if (hit) multi = 1'b1;
        midx = i[$clog2(WORDS)-1:0];
        hit  = 1'b1;
      end
    end
  end

  assign rdata      = mem[midx];
  assign host_rdata = mem[host_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WORDS; i++) begin
        mem[i]   <= '0;
        mem[i].s <= ST_UNUSED;
      end
    end else if (host_we) begin
      mem[host_idx] <= host_wdata;
    end else if (mw && hit) begin
      mem[midx] <= wdata;
    end
  end

  a_single_match_write: assert property (@(posedge clk) disable iff (rst) mw |-> !multi);
endmodule
