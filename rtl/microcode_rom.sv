// microcode_rom -- clocked microprogram memory (64 bits x DEPTH).
//
// A synchronous-read ROM: on each rising clock edge q takes the word at addr.
// The contents are the microprogram of c4x_if_pkg::ucode_word, filled in at
// elaboration; a synthesis tool maps the array to embedded memory blocks.
// The default depth of 128 words holds the 109-word program; the 64-bit width
// and the clocked read follow the source design, the depth is chosen to hold
// the program (the source design used "nearly 100 instructions" and left more
// than 60 % of its 24-kbit embedded memory free, which 128 x 64 bits does).
module microcode_rom
  import c4x_if_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output uword_t        q
);
  uword_t mem [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = ucode_word(8'(a));
  end

  always_ff @(posedge clk) begin
    q <= mem[addr[$clog2(DEPTH)-1:0]];
  end
endmodule
