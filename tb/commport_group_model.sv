// commport_group_model -- behavioural model of the host-side handshakes of
// one C4x comm port group (testbench only).
//
// Output side: LOADACK is high while the 32-bit output register is empty.  A
// LOAD strobe stores OUTDATA in rx[] and holds LOADACK low for ldack_low
// clocks, standing in for the byte-wide transmission of the word.
// Input side: words queued with push() are presented one at a time on INDATA
// with DAV high, dav_gap clocks after the previous DATACK (or after the push);
// DATACK drops DAV and removes the word.  The timing knobs are variables the
// testbench sets.
module commport_group_model (
  input  logic        clk,
  input  logic        load,
  output logic        loadack,
  input  logic [31:0] outdat,
  output logic        dav,
  input  logic        datack,
  output logic [31:0] indat
);
  logic [31:0] rx [256];
  logic [31:0] tx [256];
  int unsigned n_rx = 0, n_tx = 0, tx_rd = 0;
  int unsigned ldack_low = 3, dav_gap = 3;
  int          ld_cnt = 0, gap_cnt = 0;
  logic        dav_r = 1'b0;
  longint unsigned cyc = 0;
  longint unsigned load_cyc [256];
  longint unsigned datack_cyc [256];
  int unsigned n_datack = 0;

  assign loadack = (ld_cnt == 0);
  assign dav     = dav_r;
  assign indat   = tx[tx_rd % 256];

  task automatic push(logic [31:0] w);
    tx[n_tx % 256] = w;
    n_tx++;
  endtask

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (load) begin
      rx[n_rx % 256]       <= outdat;
      load_cyc[n_rx % 256] <= cyc;
      n_rx   <= n_rx + 1;
      ld_cnt <= int'(ldack_low);
    end else if (ld_cnt != 0) ld_cnt <= ld_cnt - 1;

    if (datack && dav_r) begin
      dav_r   <= 1'b0;
      datack_cyc[n_datack % 256] <= cyc;
      n_datack <= n_datack + 1;
      tx_rd   <= tx_rd + 1;
      gap_cnt <= int'(dav_gap);
    end else if (!dav_r && tx_rd < n_tx) begin
      if (gap_cnt != 0) gap_cnt <= gap_cnt - 1;
      else dav_r <= 1'b1;
    end
  end
endmodule
