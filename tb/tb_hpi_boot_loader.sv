// tb_hpi_boot_loader -- self-checking test of the host-boot loader against
// the behavioural DSP host port: the image lands at DSP address 0 in order,
// DSPINT is written once after the image, nHRDY waits stretch the load, and
// each word takes 7 clocks plus its nHRDY wait.
module tb_hpi_boot_loader;
  localparam int IW = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic img_we = 1'b0, start = 1'b0, busy, done;
  logic [4:0] img_addr = '0;
  logic [31:0] img_wdata = '0;
  logic [5:0] img_len = 6'd20;
  logic [15:0] hd_o, hd_i;
  logic hd_oe, hr_nw, hhwil, nhcs, nhrdy, nhint;
  logic [1:0] hcntl;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hpi_boot_loader #(.IMAGE_WORDS(IW)) dut (.*);
  hpi_dsp_model dsp (.clk, .hd_from_host(hd_o), .hd_oe, .hd_to_host(hd_i), .hcntl,
                     .hr_nw, .hhwil, .nhcs, .nhrdy, .nhint);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint t0, t1;
  initial begin
    dsp.write_busy = 2;
    dsp.wr(32'd80, 32'h1234_5678);   // just past the image: must survive
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < IW; i++) begin
      @(posedge clk);
      img_we <= 1'b1; img_addr <= 5'(i); img_wdata <= 32'hC0DE0000 ^ 32'(i * 32'h01010101);
    end
    @(posedge clk); img_we <= 1'b0; start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    t0 = $time;
    while (!done) @(posedge clk);
    t1 = $time;
    for (int i = 0; i < 20; i++)
      check(dsp.rd(32'(4*i)) == (32'hC0DE0000 ^ 32'(i * 32'h01010101)), $sformatf("word %0d", i));
    check(dsp.rd(32'd80) == 32'h1234_5678, "nothing written past img_len");
    check(dsp.n_dspint == 1 && dsp.n_hpic_wr == 1, "DSPINT written once");
    check(dsp.n_hpid_wr == 20, "20 HPID writes");
    check(dsp.n_wait == 40, $sformatf("nHRDY wait cycles %0d", dsp.n_wait));
    // HPIA (7) + 20 words x (7 + 2 wait) + HPIC (7) clocks, plus 1 to see done
    check((t1 - t0) / 10 == 7 + 20 * 9 + 7 + 1, $sformatf("load took %0d clocks", (t1 - t0) / 10));
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
