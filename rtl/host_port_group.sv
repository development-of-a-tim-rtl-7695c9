// host_port_group -- data path between the DSP host port and the comm ports.
//
// Outgoing path (DSP -> comm port): hiloreg reassembles a 32-bit word from two
// 16-bit HPI reads, MS half on LDOUTHI, LS half on LDOUTLO.  Its output is
// OUTDATA, which goes to every comm port group and is also the D input of all
// address and word counters (setup words arrive the same way).
// Incoming path (comm port -> DSP): inreg latches the active port's INDATA on
// LDINREG; a first multiplexer chooses inreg, the active port's input address
// counter or its output address counter; a second picks the half word; a
// third chooses between that and the controller group's 16-bit value; the
// result drives HD[15:0] when hd_oe is set.  The pad's tri-state buffer is
// outside this module: hd_o and hd_oe go to it, hd_i comes back from it.
// One port_counters set per comm port.  Counter loads go to the ports and
// direction named by reg5 (SETUPCOM one-hot, IN/nOUT); INCR/DEC go to the
// active port.  All registers change on the rising clock edge.
// The register set and the three multiplexers follow the source design; the
// split hd_i/hd_o/hd_oe pad interface and the one-hot SETUPCOM decode are
// this implementation's.
module host_port_group
  import c4x_if_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  uout_t                      uo,
  input  setup_t                     reg5,
  input  logic [1:0]                 act,
  input  logic [15:0]                ctl_hd,
  // HPI data bus
  input  logic [15:0]                hd_i,
  output logic [15:0]                hd_o,
  output logic                       hd_oe,
  // comm port groups
  input  logic [NUM_PORTS-1:0][31:0] indat,
  output logic [31:0]                outdat,
  // counter state
  output logic [NUM_PORTS-1:0]       in_done,
  output logic [NUM_PORTS-1:0]       out_done,
  output logic [NUM_PORTS-1:0]       in_zero,
  output logic [NUM_PORTS-1:0]       out_zero
);
  logic [31:0] hiloreg, inreg, word_sel;
  logic [15:0] half_sel;
  logic [NUM_PORTS-1:0][31:0] in_addr, out_addr, in_wc, out_wc;
  logic [31:0] a_indat, a_in_addr, a_out_addr;

  // hiloreg
  always_ff @(posedge clk) begin
    if (!rst_n) hiloreg <= '0;
    else begin
      if (uo.ldouthi) hiloreg[31:16] <= hd_i;
      if (uo.ldoutlo) hiloreg[15:0]  <= hd_i;
    end
  end
  assign outdat = hiloreg;

  // inreg
  always_ff @(posedge clk) begin
    if (!rst_n)          inreg <= '0;
    else if (uo.ldinreg) inreg <= a_indat;
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic sel, here;
    assign sel  = reg5.setupcom[p];
    assign here = (int'(act) == p);
    port_counters u_cnt (
      .clk, .rst_n, .d(hiloreg),
      .ld_in_addr   (uo.ld_addr &&  reg5.in_nout && sel),
      .ld_out_addr  (uo.ld_addr && !reg5.in_nout && sel),
      .ld_in_wc     (uo.ld_wc   &&  reg5.in_nout && sel),
      .ld_out_wc    (uo.ld_wc   && !reg5.in_nout && sel),
      .incr_in_addr (uo.incr_in_addr  && here),
      .incr_out_addr(uo.incr_out_addr && here),
      .dec_in_wc    (uo.dec_in_wc     && here),
      .dec_out_wc   (uo.dec_out_wc    && here),
      .in_addr(in_addr[p]), .out_addr(out_addr[p]),
      .in_wc(in_wc[p]), .out_wc(out_wc[p]),
      .in_zero(in_zero[p]), .out_zero(out_zero[p]),
      .in_done(in_done[p]), .out_done(out_done[p])
    );
  end

  // Active-port multiplexers.
  always_comb begin
    {a_indat, a_in_addr, a_out_addr} = '0;
    for (int p = 0; p < NUM_PORTS; p++)
      if (int'(act) == p) {a_indat, a_in_addr, a_out_addr} = {indat[p], in_addr[p], out_addr[p]};
  end

  // Output multiplexers toward HD[15:0].
  always_comb begin
    unique case (uo.wsel)
      SRC_IN_ADDR:  word_sel = a_in_addr;
      SRC_OUT_ADDR: word_sel = a_out_addr;
      default:      word_sel = inreg;
    endcase
    half_sel = uo.half_lo ? word_sel[15:0] : word_sel[31:16];
    hd_o     = uo.hd_ctl ? ctl_hd : half_sel;
  end
  assign hd_oe = uo.hd_oe;
endmodule
