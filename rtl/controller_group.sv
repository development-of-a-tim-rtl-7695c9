// controller_group -- the control half of the host group.
//
// Holds the microprogrammed controller and the small amount of state around
// it:
//   * reg5: the 5 setup bits (SETUPCOM[3:0], IN/nOUT) read from DSP word
//     8000_0000h, loaded from the 5 LSBs of the host port group's hiloreg;
//   * the host-data multiplexer: the 16-bit HostDataOutput field of the
//     microinstruction, or {8'h00, comm port status bits} for the status word;
//   * the active-port counter: advanced once per pass through the Idle loop,
//     it selects which comm port's handshakes the controller sees and which
//     port its strobes go to (fixed at 0 with one port);
//   * the HPIA tag: which port/direction's address counter was last written
//     to the DSP's HPIA, so a transfer can keep using HPI auto-increment and
//     reload HPIA only when another address was used in between;
//   * the condition inputs of the sequencer.
// Outputs are registered microinstruction bits (uo) plus port-decoded LOAD
// and DATACK strobes.  reg5, the mux, the port counter and the condition list
// follow the source design; the tag register is this implementation's way of
// knowing "if this is the first word of the transfer".
module controller_group
  import c4x_if_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // DSP host port lines observed
  input  logic                 nhint,
  input  logic                 nhrdy,
  // comm port group handshakes
  input  logic [NUM_PORTS-1:0] dav,
  input  logic [NUM_PORTS-1:0] loadack,
  output logic [NUM_PORTS-1:0] load,
  output logic [NUM_PORTS-1:0] datack,
  // from the host port group
  input  logic [4:0]           hilo_lsb,
  input  logic [NUM_PORTS-1:0] in_done,
  input  logic [NUM_PORTS-1:0] out_done,
  input  logic [NUM_PORTS-1:0] in_zero,
  input  logic [NUM_PORTS-1:0] out_zero,
  // to the host port group
  output uout_t                uo,
  output setup_t               reg5,
  output logic [1:0]           act,
  output logic [15:0]          ctl_hd,
  output logic                 ext_int4,
  output logic [7:0]           upc
);
  logic [NUM_COND-1:0] cond;
  logic [7:0]          status;
  logic                tag_valid, tag_in;
  logic [1:0]          tag_port;
  logic [1:0]          act_i;

  assign act = act_i;

  micro_controller u_mc (
    .clk, .rst_n, .cond(cond), .uo(uo), .upc(upc)
  );

  // Comm port status word, bit 2p = COMMp OUTPUT flag, 2p+1 = COMMp INPUT flag.
  always_comb begin
    status = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      status[2*p]     = out_done[p];
      status[2*p + 1] = in_done[p];
    end
  end

  assign ctl_hd   = uo.stat_sel ? {8'h00, status} : uo.hdata;
  assign ext_int4 = uo.ext_int4;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      load[p]   = uo.load   && int'(act_i) == p;
      datack[p] = uo.datack && int'(act_i) == p;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg5      <= '0;
      act_i     <= '0;
      tag_valid <= 1'b0;
      tag_in    <= 1'b0;
      tag_port  <= '0;
    end else begin
      if (uo.ld_reg5) reg5 <= setup_t'(hilo_lsb);
      if (uo.adv_port)
        act_i <= (int'(act_i) == NUM_PORTS - 1) ? 2'd0 : act_i + 2'd1;
      unique case (uo.tag_op)
        TAG_IN:    begin tag_valid <= 1'b1; tag_in <= 1'b1; tag_port <= act_i; end
        TAG_OUT:   begin tag_valid <= 1'b1; tag_in <= 1'b0; tag_port <= act_i; end
        TAG_CLEAR: tag_valid <= 1'b0;
        default:   ;
      endcase
    end
  end

  logic a_in_done, a_out_done, a_in_zero, a_out_zero, a_dav, a_loadack;
  always_comb begin
    {a_in_done, a_out_done, a_in_zero, a_out_zero, a_dav, a_loadack} = '0;
    for (int p = 0; p < NUM_PORTS; p++)
      if (int'(act_i) == p)
        {a_in_done, a_out_done, a_in_zero, a_out_zero, a_dav, a_loadack} =
          {in_done[p], out_done[p], in_zero[p], out_zero[p], dav[p], loadack[p]};
  end

  always_comb begin
    cond             = '0;
    cond[C_ZERO]     = 1'b0;
    cond[C_NHINT]    = nhint;
    cond[C_NHRDY]    = nhrdy;
    cond[C_WR_READY] = !a_in_done  && a_dav;
    cond[C_RD_READY] = !a_out_done && a_loadack;
    cond[C_TAG_IN]   = tag_valid &&  tag_in && tag_port == act_i;
    cond[C_TAG_OUT]  = tag_valid && !tag_in && tag_port == act_i;
    cond[C_IN_DONE]  = a_in_zero;
    cond[C_OUT_DONE] = a_out_zero;
  end

  // The port counter never leaves the range of existing ports.
  a_act_range: assert property (@(posedge clk) disable iff (!rst_n) int'(act_i) < NUM_PORTS);
  // LOAD and DATACK are never strobed in the same cycle.
  a_strobes: assert property (@(posedge clk) disable iff (!rst_n) !(uo.load && uo.datack));
endmodule
