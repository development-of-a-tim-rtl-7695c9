// port_counters -- the transfer bookkeeping of one comm port.
//
// Two pairs of counters and two done flags: an input (write into the DSP)
// address counter, word counter and done flag, and the same for output (read
// from the DSP).  Loading a word counter with a non-zero count clears its done
// flag, which enables that direction ("set up for a write / read" in the Idle
// loop).  The flag is set on the clock after the counter's ZERO output goes
// high, so the controller branches on ZERO (in_zero / out_zero) right after
// the last DEC and finds the flag set one cycle later.  All loads take their
// value from d, the 32-bit word reassembled from the HPI.
// After reset both done flags are set: nothing is set up.
// The counter set and the done-flag rule follow the source design; the reset
// state is this implementation's choice.
module port_counters #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      d,
  input  logic             ld_in_addr,
  input  logic             ld_out_addr,
  input  logic             ld_in_wc,
  input  logic             ld_out_wc,
  input  logic             incr_in_addr,
  input  logic             incr_out_addr,
  input  logic             dec_in_wc,
  input  logic             dec_out_wc,
  output logic [31:0]      in_addr,
  output logic [31:0]      out_addr,
  output logic [WIDTH-1:0] in_wc,
  output logic [WIDTH-1:0] out_wc,
  output logic             in_zero,
  output logic             out_zero,
  output logic             in_done,
  output logic             out_done
);
  addr_counter u_in_addr (
    .clk, .rst_n, .d(d), .ld(ld_in_addr), .incr(incr_in_addr), .q(in_addr)
  );
  addr_counter u_out_addr (
    .clk, .rst_n, .d(d), .ld(ld_out_addr), .incr(incr_out_addr), .q(out_addr)
  );
  word_counter #(.WIDTH(WIDTH)) u_in_wc (
    .clk, .rst_n, .d(d[WIDTH-1:0]), .ld(ld_in_wc), .dec(dec_in_wc),
    .q(in_wc), .zero(in_zero)
  );
  word_counter #(.WIDTH(WIDTH)) u_out_wc (
    .clk, .rst_n, .d(d[WIDTH-1:0]), .ld(ld_out_wc), .dec(dec_out_wc),
    .q(out_wc), .zero(out_zero)
  );

  // Done flag flip-flops.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_done  <= 1'b1;
      out_done <= 1'b1;
    end else begin
      if (ld_in_wc)  in_done  <= (d[WIDTH-1:0] == '0);
      else           in_done  <= in_done | in_zero;
      if (ld_out_wc) out_done <= (d[WIDTH-1:0] == '0);
      else           out_done <= out_done | out_zero;
    end
  end
endmodule
