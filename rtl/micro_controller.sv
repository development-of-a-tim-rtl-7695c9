// micro_controller -- microprogrammed controller: sequencer plus microprogram
// memory.
//
// Each microinstruction is 64 bits: 16 next-address bits (sequencer
// instruction, condition select, branch address) that go back to the
// sequencer, and 48 output bits (uo) that drive the rest of the interface and
// the DSP host port.  The sequencer's next address is registered into the
// memory's output register and into the address register on the same edge,
// so uo changes once per clock.  While rst_n is low the controller fetches
// address 0 and uo is forced to the idle value (nHCS high, no strobes), so
// no strobe leaves the controller before the memory output register has
// been loaded.  Structure as in the source design; the reset gating of uo
// is this design's own.
module micro_controller
  import c4x_if_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_COND-1:0] cond,
  output uout_t               uo,
  output logic [7:0]          upc
);
  uword_t     w;
  logic [7:0] next_addr;

  micro_sequencer #(.AW(8), .NCOND(NUM_COND)) u_seq (
    .clk, .rst_n,
    .seq(w.seq), .cond_sel(w.cond), .target(w.target), .cond(cond),
    .upc(upc), .next_addr(next_addr)
  );

  microcode_rom #(.DEPTH(DEPTH), .AW(8)) u_rom (
    .clk, .addr(next_addr), .q(w)
  );

  assign uo = rst_n ? w.o : o_idle();
endmodule
