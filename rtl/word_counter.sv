// word_counter -- loadable down counter of the words left in a transfer.
//
// LD loads D, the length in 32-bit words of the DSP memory block assigned to a
// comm port; DEC counts one word down after each word moved through the host
// port.  ZERO is high while the count is zero.  LD has priority; DEC at zero
// is ignored, so the count never wraps.  Width 32 follows the 32-bit data path
// of the source design; reset to zero and the no-wrap rule are this
// implementation's choices.
module word_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  input  logic             ld,
  input  logic             dec,
  output logic [WIDTH-1:0] q,
  output logic             zero
);
  assign zero = (q == '0);

  always_ff @(posedge clk) begin
    if (!rst_n)            q <= '0;
    else if (ld)           q <= d;
    else if (dec && !zero) q <= q - 1'b1;
  end
endmodule
