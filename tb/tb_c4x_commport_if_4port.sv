// tb_c4x_commport_if_4port -- end-to-end test of the four-comm-port
// configuration.  Port 0 sends 8 words out of the DSP, port 2 brings 8 words
// in, port 3 sends 8 words out, all set up before any finishes.  The Idle
// loop's active-port counter visits every port; the test checks the data on
// every port, that ports 1 (unused) never saw a strobe, the final status word
// (all eight done flags set) and the number of EXT_INT_4 pulses.
module tb_c4x_commport_if_4port;
  import c4x_if_pkg::*;
  localparam int NP = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] hd_i, hd_o;
  logic        hd_oe, hr_nw, hhwil, nhcs, nhrdy, nhint, ext_int4;
  logic [1:0]  hcntl;
  logic [NP-1:0] load, loadack, dav, datack;
  logic [31:0] outdat;
  logic        boot_en = 1'b0, img_we = 1'b0, boot_done;
  logic [7:0]  img_addr = '0;
  logic [31:0] img_wdata = '0;
  logic [8:0]  img_len = 9'd16;
  logic [NP-1:0][31:0] indat;

  c4x_commport_if #(.NUM_PORTS(NP)) dut (
    .clk, .rst_n, .hd_i, .hd_o, .hd_oe, .hcntl, .hr_nw, .hhwil, .nhcs,
    .nhrdy, .nhint, .ext_int4, .boot_en, .img_we, .img_addr, .img_wdata,
    .img_len, .boot_done, .load, .loadack, .outdat, .dav, .datack, .indat
  );

  hpi_dsp_model dsp (
    .clk, .hd_from_host(hd_o), .hd_oe, .hd_to_host(hd_i), .hcntl, .hr_nw,
    .hhwil, .nhcs, .nhrdy, .nhint
  );

  commport_group_model cp0 (.clk, .load(load[0]), .loadack(loadack[0]), .outdat,
    .dav(dav[0]), .datack(datack[0]), .indat(indat[0]));
  commport_group_model cp1 (.clk, .load(load[1]), .loadack(loadack[1]), .outdat,
    .dav(dav[1]), .datack(datack[1]), .indat(indat[1]));
  commport_group_model cp2 (.clk, .load(load[2]), .loadack(loadack[2]), .outdat,
    .dav(dav[2]), .datack(datack[2]), .indat(indat[2]));
  commport_group_model cp3 (.clk, .load(load[3]), .loadack(loadack[3]), .outdat,
    .dav(dav[3]), .datack(datack[3]), .indat(indat[3]));

  int checks = 0, failures = 0, n_ext_int = 0;
  logic ext_q = 1'b0;
  int act_seen [NP];
  initial for (int p = 0; p < NP; p++) act_seen[p] = 0;

  always_ff @(posedge clk) if (rst_n) begin
    ext_q <= ext_int4;
    if (ext_int4 && !ext_q) n_ext_int <= n_ext_int + 1;
    if (dut.upc == A_I0) act_seen[dut.act] <= act_seen[dut.act] + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dsp_setup(int port, bit in_not_out, logic [31:0] words, logic [31:0] addr);
    dsp.wr(SETUP_ADDR, {27'h0, 4'(1 << port), in_not_out});
    dsp.wr(WCOUNT_ADDR, words);
    dsp.wr(ADDRV_ADDR, addr);
    dsp.set_hint();
    @(posedge clk);
    wait (nhint == 1'b1);
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      dsp.wr(32'h1000 + 32'(4*i), 32'h0A000000 + 32'(i));
      dsp.wr(32'h3000 + 32'(4*i), 32'h3A000000 + 32'(i));
      cp2.push(32'h2B000000 + 32'(i));
    end
    cp1.push(32'hDEAD_BEEF);         // never set up: must not be taken
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    dsp_setup(0, 1'b0, 8, 32'h1000);
    dsp_setup(2, 1'b1, 8, 32'h2000);
    dsp_setup(3, 1'b0, 8, 32'h3000);
    while (n_ext_int < 3) @(posedge clk);
    repeat (5) @(posedge clk);
    check(cp0.n_rx == 8 && cp3.n_rx == 8, $sformatf("output word counts %0d %0d", cp0.n_rx, cp3.n_rx));
    check(cp2.n_datack == 8, "input word count");
    check(cp1.n_rx == 0 && cp1.n_datack == 0 && cp0.n_datack == 0 && cp2.n_rx == 0,
          "no strobes on ports not set up for them");
    for (int i = 0; i < 8; i++) begin
      check(cp0.rx[i] == 32'h0A000000 + 32'(i), $sformatf("port 0 word %0d", i));
      check(cp3.rx[i] == 32'h3A000000 + 32'(i), $sformatf("port 3 word %0d", i));
      check(dsp.rd(32'h2000 + 32'(4*i)) == 32'h2B000000 + 32'(i), $sformatf("port 2 word %0d", i));
    end
    check(dsp.rd(STATUS_ADDR) == 32'hFF, $sformatf("status %h", dsp.rd(STATUS_ADDR)));
    check(n_ext_int == 3, "one EXT_INT_4 per finished transfer");
    for (int p = 0; p < NP; p++) check(act_seen[p] > 0, $sformatf("Idle loop visited port %0d", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
