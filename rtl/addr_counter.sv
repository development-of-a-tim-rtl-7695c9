// addr_counter -- loadable DSP address counter of one transfer direction.
//
// Holds the DSP byte address of the next word of a comm port transfer.  LD
// loads D (the word just read from DSP memory by the host port group); INCR
// advances the address by one 32-bit word, i.e. by 4, after each word moved
// through the host port.  LD has priority over INCR.  Both act on the rising
// clock edge; Q is the register output.  The width (32 bits) and the step of
// four follow the source design; the synchronous active-low reset to zero is
// this implementation's choice.
module addr_counter #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned STEP  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  input  logic             ld,
  input  logic             incr,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (ld)   q <= d;
    else if (incr) q <= q + WIDTH'(STEP);
  end
endmodule
