// tb_port_counters -- self-checking test of one comm port's counter set:
// loads from the shared data word, increments by 4, word counts, ZERO and
// done flags (set after reset, cleared by a non-zero load, set again one
// clock after the count reaches zero, set by a zero load).
module tb_port_counters;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] d = '0;
  logic ld_in_addr = 0, ld_out_addr = 0, ld_in_wc = 0, ld_out_wc = 0;
  logic incr_in_addr = 0, incr_out_addr = 0, dec_in_wc = 0, dec_out_wc = 0;
  logic [31:0] in_addr, out_addr, in_wc, out_wc;
  logic in_zero, out_zero, in_done, out_done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  port_counters dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clk1();
    @(posedge clk); #1;
    {ld_in_addr, ld_out_addr, ld_in_wc, ld_out_wc} = '0;
    {incr_in_addr, incr_out_addr, dec_in_wc, dec_out_wc} = '0;
  endtask

  initial begin
    @(posedge clk); #1; rst_n = 1'b1;
    check(in_done && out_done, "done flags set after reset");
    d = 32'h0000_1000; ld_in_addr = 1; clk1();
    d = 32'h0000_2000; ld_out_addr = 1; clk1();
    d = 32'd3; ld_in_wc = 1; clk1();
    check(!in_done && out_done, "input enabled only");
    check(in_addr == 32'h1000 && out_addr == 32'h2000 && in_wc == 3, "loaded values");
    for (int i = 0; i < 3; i++) begin
      incr_in_addr = 1; dec_in_wc = 1; clk1();
      check(in_addr == 32'h1000 + 32'(4 * (i + 1)), "input address step 4");
      check(in_wc == 32'(2 - i), "input word count");
      check(in_zero == (i == 2), "input zero");
      check(!in_done, "done flag lags zero by one clock");
    end
    clk1();
    check(in_done, "input done after count reached zero");
    check(out_addr == 32'h2000, "output address untouched");
    d = 32'd2; ld_out_wc = 1; clk1();
    check(!out_done, "output enabled");
    incr_out_addr = 1; dec_out_wc = 1; clk1();
    incr_out_addr = 1; dec_out_wc = 1; clk1();
    check(out_zero && out_addr == 32'h2008, "output counted to zero");
    clk1();
    check(out_done, "output done");
    d = 32'd0; ld_out_wc = 1; clk1();
    check(out_done, "zero-length load leaves done set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
