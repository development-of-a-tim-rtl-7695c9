// tb_microcode_rom -- checks the microprogram memory: one-clock read latency
// and the fields of key microinstructions (Idle-loop checks and their
// branch targets, the LOAD / DATACK / EXT_INT_4 strobes, the setup loads,
// the HINT acknowledge), plus a walk of every word that counts nHCS pulses
// and strobes and checks every branch target is inside the program.
module tb_microcode_rom;
  import c4x_if_pkg::*;
  logic clk = 1'b0;
  logic [7:0] addr = '0;
  uword_t q;
  int checks = 0, failures = 0;
  int n_load = 0, n_datack = 0, n_ext = 0, n_ldwc = 0, n_ldaddr = 0, n_ldreg5 = 0;
  always #5 clk = ~clk;

  microcode_rom dut (.clk, .addr, .q);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(logic [7:0] a, output uword_t w);
    addr = a;
    @(posedge clk); #1;
    w = q;
  endtask

  uword_t w;
  initial begin
    rd(8'd0, w);
    check(w.seq == SEQ_BR0 && w.cond == C_NHINT && w.target == 8'd72, "I0: nHINT=0 -> setup");
    rd(8'd4, w);
    check(w.seq == SEQ_BR1 && w.cond == C_WR_READY && w.target == 8'd40, "I4: write check");
    rd(8'd5, w);
    check(w.seq == SEQ_BR1 && w.cond == C_RD_READY && w.target == 8'd8, "I5: read check");
    rd(8'd6, w);
    check(w.seq == SEQ_JMP && w.target == 8'd0 && w.o.adv_port, "I6: loop back, next port");
    for (int a = 1; a <= 3; a++) begin
      rd(8'(a), w);
      check(w.seq == SEQ_CONT && w.o.nhcs && !w.o.hd_oe, "Idle filler word");
    end
    // latency: address changes, q follows one clock later
    addr = 8'd18; #1;
    check(q.o.load == 1'b0, "read is clocked");
    @(posedge clk); #1;
    check(q.o.load == 1'b1, "R10 strobes LOAD");
    rd(8'd20, w);
    check(w.seq == SEQ_BR0 && w.cond == C_OUT_DONE && w.target == 8'd0, "R12 back to I0");
    rd(8'd50, w);
    check(w.seq == SEQ_BR0 && w.cond == C_IN_DONE && w.target == 8'd5, "W10 back to I5");
    rd(8'd47, w);
    check(w.o.datack && !w.o.nhcs && w.o.hd_oe, "W7 DATACK during low half");
    rd(8'd104, w);
    check(w.o.hcntl == HC_HPIC && w.o.hd_ctl && w.o.hdata == 16'h0004, "HINT acknowledge");
    rd(8'd108, w);
    check(w.seq == SEQ_JMP && w.target == 8'd4, "setup returns to write check");
    rd(8'd72, w);
    check(w.o.hcntl == HC_HPIA && w.o.hdata == 16'h8000 && w.o.hd_oe, "setup HPIA high half");
    for (int a = 0; a < 128; a++) begin
      rd(8'(a), w);
      n_load   += int'(w.o.load);
      n_datack += int'(w.o.datack);
      n_ext    += int'(w.o.ext_int4);
      n_ldwc   += int'(w.o.ld_wc);
      n_ldaddr += int'(w.o.ld_addr);
      n_ldreg5 += int'(w.o.ld_reg5);
      if (w.seq != SEQ_CONT) check(w.target <= 8'd108, $sformatf("target in range at %0d", a));
      check(!(w.o.hd_oe && w.o.hr_nw && !w.o.nhcs), $sformatf("no drive during a read at %0d", a));
    end
    check(n_load == 1 && n_datack == 1, "one LOAD and one DATACK word");
    check(n_ext == 4, "two EXT_INT_4 words per status routine");
    check(n_ldwc == 1 && n_ldaddr == 1 && n_ldreg5 == 1, "one load of each setup word");
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
