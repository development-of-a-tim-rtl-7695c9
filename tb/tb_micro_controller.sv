// tb_micro_controller -- runs the microprogram with directly driven
// condition inputs and checks the cycle counts of its paths: the 7-cycle
// Idle loop, a 13-cycle read pass plus 6 Idle cycles back to the read check
// (19), LOAD 8 cycles before the next read check, an 11-cycle write pass
// plus 7 back to the write check (18), DATACK 10 cycles before the next
// write check, and one extra cycle per nHRDY wait cycle.
module tb_micro_controller;
  import c4x_if_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_COND-1:0] cond;
  uout_t uo;
  logic [7:0] upc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic nhint = 1, nhrdy = 0, wr_ready = 0, rd_ready = 0, tag_in = 1, tag_out = 1;
  always_comb begin
    cond = '0;
    cond[C_NHINT] = nhint; cond[C_NHRDY] = nhrdy;
    cond[C_WR_READY] = wr_ready; cond[C_RD_READY] = rd_ready;
    cond[C_TAG_IN] = tag_in; cond[C_TAG_OUT] = tag_out;
  end

  micro_controller dut (.clk, .rst_n, .cond, .uo, .upc);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // cycle at which upc next equals a
  task automatic wait_pc(logic [7:0] a, output longint t);
    do begin @(posedge clk); #1; end while (upc != a);
    t = cyc;
  endtask

  longint t0, t1, t2, tl;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(uo.nhcs && !uo.load, "idle outputs in reset");
    wait_pc(A_I0, t0);
    wait_pc(A_I0, t1);
    check(t1 - t0 == 7, $sformatf("Idle loop %0d cycles", t1 - t0));
    // read path with HPIA already pointing at the output block
    rd_ready = 1;
    wait_pc(A_R0, t0);
    wait_pc(8'd18, tl);
    check(uo.load, "LOAD at R10");
    wait_pc(A_R0, t1);
    check(t1 - t0 == 19, $sformatf("read period %0d", t1 - t0));
    check(t1 - tl == 9, "read check 8 cycles after LOAD (R0 follows it)");
    wait_pc(A_R0, t2);
    check(t2 - t1 == 19, "second read period");
    // an nHRDY wait of 3 cycles stretches the pass
    wait_pc(8'd12, tl);
    nhrdy = 1; repeat (3) begin @(posedge clk); #1; end nhrdy = 0;
    wait_pc(A_R0, t0);
    check(t0 - t2 == 19 + 3, $sformatf("nHRDY stretch %0d", t0 - t2));
    rd_ready = 0; wr_ready = 1;
    wait_pc(A_W0, t0);
    wait_pc(8'd47, tl);
    check(uo.datack, "DATACK at W7");
    wait_pc(A_W0, t1);
    check(t1 - t0 == 18, $sformatf("write period %0d", t1 - t0));
    check(t1 - tl == 11, "write check 10 cycles after DATACK");
    // HPIA miss: 5 extra cycles
    tag_in = 0;
    wait_pc(A_WA, t2);
    tag_in = 1;
    wait_pc(A_W0, t2);
    check(t2 - t1 == 18 + 5, $sformatf("write with HPIA reload %0d", t2 - t1));
    // setup request
    wr_ready = 0; nhint = 0;
    wait_pc(A_T0, t0);
    nhint = 1;
    wait_pc(A_I4, t1);
    check(t1 - t0 == 37, $sformatf("setup length %0d", t1 - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
