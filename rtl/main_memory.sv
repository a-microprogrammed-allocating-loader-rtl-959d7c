// main_memory: the paged main memory M of the loader.
//
// 2^(PA_W+LA_W) words of WORD_W bits; with the default sizes 256 pages of 128
// 48-bit words (32,768 words), as the document specifies. An address is a page
// address PA in the upper bits and a line address LA in the lower 7 bits, so a
// page is 128 contiguous words. The loader only writes it: the word in buffer
// register B is stored at address AR when `we` is high at a rising clock edge
// (M(AR) <- B). A second, combinational read port lets the processor or a host
// read any word. No reset: the contents are whatever was stored last.
module main_memory #(
  parameter int unsigned PA_W   = 8,
  parameter int unsigned LA_W   = 7,
  parameter int unsigned WORD_W = 48
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic [PA_W+LA_W-1:0]   waddr,
  input  logic [WORD_W-1:0]      wdata,
  input  logic [PA_W+LA_W-1:0]   raddr,
  output logic [WORD_W-1:0]      rdata
);
  localparam int unsigned WORDS = 1 << (PA_W + LA_W);

  logic [WORD_W-1:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
