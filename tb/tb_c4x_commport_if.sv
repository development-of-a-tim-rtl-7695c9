// tb_c4x_commport_if -- end-to-end test of the comm port interface at its
// default parameters (one comm port).
//
// A behavioural C6x host port with DSP memory and a behavioural comm port
// group surround the interface.  The testbench plays the DSP program: it
// writes the three control words, raises HINT, and waits for EXT_INT_4.
// Phases:
//   0. host boot: the boot loader copies a 16-word image to DSP address 0
//      and sets DSPINT before the controller starts;
//   1. read transfer (DSP -> comm port) of 16 words, fast LOADACK;
//      checks data, status word and the 19-cycle word period;
//   2. write transfer (comm port -> DSP) of 16 words, fast DAV;
//      checks data, status word and the 18-cycle word period;
//   3. read transfer with LOADACK low 9 clocks: each word waits one extra
//      Idle loop, 19 + 7 = 26 cycles per word;
//   4. read and write transfers set up together, 16 words each; the
//      Idle loop alternates them and HPIA is reloaded on each switch;
//   5. write transfer with DAV back about 20 clocks after DATACK: two
//      extra Idle loops, 18 + 14 = 32 cycles per word.
// It counts how often each mechanism happened (setup, HPIA reload,
// auto-increment reuse, nHRDY wait, prefetch hit, status report, Idle-loop
// recirculation, direction switch) and fails on one that never did.
module tb_c4x_commport_if;
  import c4x_if_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] hd_i, hd_o;
  logic        hd_oe, hr_nw, hhwil, nhcs, nhrdy, nhint, ext_int4;
  logic [1:0]  hcntl;
  logic [0:0]  load, loadack, dav, datack;
  logic [31:0] outdat;
  logic        boot_en = 1'b1, img_we = 1'b0, boot_done;
  logic [7:0]  img_addr = '0;
  logic [31:0] img_wdata = '0;
  logic [8:0]  img_len = 9'd16;
  logic [0:0][31:0] indat;

  c4x_commport_if dut (
    .clk, .rst_n, .hd_i, .hd_o, .hd_oe, .hcntl, .hr_nw, .hhwil, .nhcs,
    .nhrdy, .nhint, .ext_int4, .boot_en, .img_we, .img_addr, .img_wdata,
    .img_len, .boot_done, .load, .loadack, .outdat, .dav, .datack, .indat
  );

  hpi_dsp_model dsp (
    .clk, .hd_from_host(hd_o), .hd_oe, .hd_to_host(hd_i), .hcntl, .hr_nw,
    .hhwil, .nhcs, .nhrdy, .nhint
  );

  commport_group_model cp (
    .clk, .load(load[0]), .loadack(loadack[0]), .outdat, .dav(dav[0]),
    .datack(datack[0]), .indat(indat[0])
  );

  int checks = 0, failures = 0;
  int n_ext_int = 0, n_setup = 0, n_recirc = 0, n_switch = 0;
  logic ext_q = 1'b0, nhint_q = 1'b1;
  int   cyc = 0, last_load = -1;
  logic last_dir_rd = 1'b0, any_xfer = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Event counters observed on the interface.
  always_ff @(posedge clk) if (rst_n) begin
    ext_q <= ext_int4;
    if (ext_int4 && !ext_q) n_ext_int <= n_ext_int + 1;
    cyc     <= cyc + 1;
    nhint_q <= nhint;
    // a setup ends when the controller clears HINT (nHINT rises)
    if (nhint && !nhint_q) n_setup <= n_setup + 1;
    // a word that waited one extra Idle loop for LOADACK: 19 + 7 cycles
    if (load[0]) begin
      last_load <= cyc;
      if (last_load >= 0 && cyc - last_load == 26) n_recirc <= n_recirc + 1;
    end
    if (load[0] || datack[0]) begin
      any_xfer    <= 1'b1;
      last_dir_rd <= load[0];
      if (any_xfer && last_dir_rd != load[0]) n_switch <= n_switch + 1;
    end
  end

  // DSP program side: post a setup and wait until the interface took it.
  task automatic dsp_setup(bit in_not_out, logic [31:0] words, logic [31:0] addr);
    dsp.wr(SETUP_ADDR, {27'h0, 4'b0001, in_not_out});
    dsp.wr(WCOUNT_ADDR, words);
    dsp.wr(ADDRV_ADDR, addr);
    dsp.set_hint();
    @(posedge clk);
    wait (nhint == 1'b1);
    @(posedge clk);
  endtask

  task automatic wait_ext_int(int n);
    while (n_ext_int < n) @(posedge clk);
  endtask

  int base_rx, base_dk, ints;

  initial begin
    // boot image: 16 words for DSP address 0
    for (int i = 0; i < 16; i++) begin
      @(posedge clk);
      img_we <= 1'b1; img_addr <= 8'(i); img_wdata <= 32'hB0070000 + 32'(i * 3);
    end
    @(posedge clk); img_we <= 1'b0;
    for (int i = 0; i < 16; i++) dsp.wr(32'h0000_1000 + 4*i, 32'hA5000000 + 32'(i * 7 + 1));
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    dsp.write_busy = 1;
    // ---------------- phase 0: host boot load
    while (!boot_done) @(posedge clk);
    for (int i = 0; i < 16; i++)
      check(dsp.rd(32'(4*i)) == 32'hB0070000 + 32'(i * 3), $sformatf("boot word %0d", i));
    check(dsp.n_dspint == 1, "DSPINT written once");
    check(dsp.hpia == 32'd64, "HPIA auto-incremented through the image");
    dsp.write_busy = 0;
    repeat (5) @(posedge clk);

    // ---------------- phase 1: read transfer, fast LOADACK
    cp.ldack_low = 3;
    base_rx = 0;
    dsp_setup(1'b0, 16, 32'h0000_1000);
    wait_ext_int(1);
    repeat (3) @(posedge clk);
    check(cp.n_rx == 16, "phase 1 word count");
    for (int i = 0; i < 16; i++)
      check(cp.rx[i] == 32'hA5000000 + 32'(i * 7 + 1), $sformatf("phase 1 word %0d", i));
    check(dsp.rd(STATUS_ADDR) == 32'h3, $sformatf("phase 1 status %h", dsp.rd(STATUS_ADDR)));
    for (int i = 2; i < 16; i++)
      check(cp.load_cyc[i] - cp.load_cyc[i-1] == 19,
            $sformatf("phase 1 read period %0d", cp.load_cyc[i] - cp.load_cyc[i-1]));
    $display("phase 1: 16-word read took %0d cycles from first to last LOAD",
             cp.load_cyc[15] - cp.load_cyc[0]);

    // ---------------- phase 2: write transfer, fast DAV
    cp.dav_gap = 2;
    for (int i = 0; i < 16; i++) cp.push(32'h5A000000 + 32'(i * 13 + 3));
    dsp_setup(1'b1, 16, 32'h0000_2000);
    wait_ext_int(2);
    repeat (3) @(posedge clk);
    check(cp.n_datack == 16, "phase 2 word count");
    for (int i = 0; i < 16; i++)
      check(dsp.rd(32'h2000 + 32'(4*i)) == 32'h5A000000 + 32'(i * 13 + 3),
            $sformatf("phase 2 word %0d", i));
    check(dsp.rd(STATUS_ADDR) == 32'h3, "phase 2 status");
    for (int i = 2; i < 16; i++)
      check(cp.datack_cyc[i] - cp.datack_cyc[i-1] == 18,
            $sformatf("phase 2 write period %0d", cp.datack_cyc[i] - cp.datack_cyc[i-1]));

    // ---------------- phase 3: read transfer, slow LOADACK
    cp.ldack_low = 9;
    base_rx = int'(cp.n_rx);
    for (int i = 0; i < 8; i++) dsp.wr(32'h0000_3000 + 4*i, 32'h3C000000 + 32'(i));
    dsp_setup(1'b0, 8, 32'h0000_3000);
    wait_ext_int(3);
    repeat (3) @(posedge clk);
    check(cp.n_rx == 32'(base_rx + 8), "phase 3 word count");
    for (int i = 0; i < 8; i++)
      check(cp.rx[base_rx + i] == 32'h3C000000 + 32'(i), $sformatf("phase 3 word %0d", i));
    for (int i = base_rx + 2; i < base_rx + 8; i++)
      check(cp.load_cyc[i] - cp.load_cyc[i-1] == 26,
            $sformatf("phase 3 read period %0d", cp.load_cyc[i] - cp.load_cyc[i-1]));

    // ---------------- phase 4: both directions at once
    cp.ldack_low = 3;
    cp.dav_gap = 2;
    base_rx = int'(cp.n_rx);
    base_dk = int'(cp.n_datack);
    for (int i = 0; i < 16; i++) dsp.wr(32'h0000_4000 + 4*i, 32'h77000000 + 32'(i));
    dsp_setup(1'b0, 16, 32'h0000_4000);
    for (int i = 0; i < 16; i++) cp.push(32'h88000000 + 32'(i));
    dsp_setup(1'b1, 16, 32'h0000_5000);
    ints = 5;
    wait_ext_int(ints);
    repeat (3) @(posedge clk);
    check(cp.n_rx == 32'(base_rx + 16), "phase 4 read count");
    check(cp.n_datack == 32'(base_dk + 16), "phase 4 write count");
    for (int i = 0; i < 16; i++) begin
      check(cp.rx[base_rx + i] == 32'h77000000 + 32'(i), $sformatf("phase 4 read word %0d", i));
      check(dsp.rd(32'h5000 + 32'(4*i)) == 32'h88000000 + 32'(i), $sformatf("phase 4 write word %0d", i));
    end
    check(dsp.rd(STATUS_ADDR) == 32'h3, "phase 4 status");

    // ---------------- phase 5: write transfer, slow DAV
    // DAV comes back about 20 clocks after DATACK: the controller misses
    // it on two Idle-loop passes, so words are 18 + 2 * 7 = 32 clocks
    // (800 ns at 40 MHz) apart.
    cp.dav_gap = 18;
    base_dk = int'(cp.n_datack);
    for (int i = 0; i < 8; i++) cp.push(32'h6E000000 + 32'(i * 5));
    dsp_setup(1'b1, 8, 32'h0000_6000);
    wait_ext_int(6);
    repeat (3) @(posedge clk);
    check(cp.n_datack == 32'(base_dk + 8), "phase 5 write count");
    for (int i = 0; i < 8; i++)
      check(dsp.rd(32'h6000 + 32'(4*i)) == 32'h6E000000 + 32'(i * 5),
            $sformatf("phase 5 word %0d", i));
    for (int i = base_dk + 2; i < base_dk + 8; i++)
      check(cp.datack_cyc[i] - cp.datack_cyc[i-1] == 32,
            $sformatf("phase 5 write period %0d", cp.datack_cyc[i] - cp.datack_cyc[i-1]));

    // ---------------- mechanisms seen
    $display("setups=%0d hpia_writes=%0d prefetch_hits=%0d nhrdy_wait_cycles=%0d ext_int4=%0d recirc=%0d dir_switches=%0d hpic_writes=%0d",
             n_setup, dsp.n_hpia_wr, dsp.n_prefetch_hit, dsp.n_wait, n_ext_int, n_recirc, n_switch, dsp.n_hpic_wr);
    check(n_setup == 6, "six setups");
    check(dsp.n_hpic_wr == 7, "HINT acknowledged six times, DSPINT once");
    check(dsp.n_hpia_wr > 5 + 5, "HPIA reloaded from address counters");
    check(dsp.n_prefetch_hit > 0, "auto-increment reads used");
    check(dsp.n_wait > 0, "nHRDY wait happened");
    check(n_ext_int == 6, "EXT_INT_4 per finished transfer");
    check(n_recirc > 0, "Idle loop recirculated");
    check(n_switch > 4, "directions interleaved");
    check(dsp.n_bus_conflict == 0, "no HD bus conflict");
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
