// micro_sequencer -- next-address logic of the microprogrammed controller.
//
// Picks one condition input with the microinstruction's condition-select
// field and executes one of four sequencer instructions: continue (address +
// 1), branch if the condition is 0, branch if it is 1, and unconditional
// branch to the branch-address field.  next_addr is combinational and feeds
// the clocked microprogram memory, which registers the next microinstruction
// on the same edge as upc (the current microinstruction's address) is updated;
// one microinstruction therefore executes per clock, with no delay slot.
// Reset (synchronous, active low) forces address 0, the start of the Idle
// loop.  The instruction set follows the source design; the encoding and the
// condition count are this implementation's.
module micro_sequencer
  import c4x_if_pkg::*;
#(
  parameter int unsigned AW    = 8,
  parameter int unsigned NCOND = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  seq_e             seq,
  input  cond_e            cond_sel,
  input  logic [AW-1:0]    target,
  input  logic [NCOND-1:0] cond,
  output logic [AW-1:0]    upc,
  output logic [AW-1:0]    next_addr
);
  logic c;

  always_comb begin
    c = cond[cond_sel];
    unique case (seq)
      SEQ_CONT: next_addr = upc + 1'b1;
      SEQ_BR0:  next_addr = !c ? target : upc + 1'b1;
      SEQ_BR1:  next_addr =  c ? target : upc + 1'b1;
      SEQ_JMP:  next_addr = target;
      default:  next_addr = upc + 1'b1;
    endcase
    if (!rst_n) next_addr = '0;
  end

  always_ff @(posedge clk) begin
    upc <= next_addr;
  end
endmodule
