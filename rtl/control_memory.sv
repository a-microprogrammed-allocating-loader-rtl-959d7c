// control_memory: the control memory CM that holds the loader's microprogram.
//
// CM_WORDS control words of 32 bits, addressed by the sequencer's address
// register H and read combinationally; the sequencer copies the addressed word
// into its control-word register F in clock phase P(0). The contents are set at
// start-up from loader_pkg::ucode(): words 0 to 9 are the allocate/load
// microprogram, every other word is zero. Writing is not provided; the document
// only describes the microprogram as stored in the control memory.
module control_memory
  import loader_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic [$clog2(WORDS)-1:0] addr,
  output cword_t                   data
);
  cword_t cm [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) cm[i] = ucode(i);
  end

  assign data = cm[addr];
endmodule
