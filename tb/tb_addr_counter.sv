// tb_addr_counter -- self-checking test of addr_counter: reset, load,
// increment by one word (4), load priority over increment, hold.
module tb_addr_counter;
  logic clk = 1'b0, rst_n = 1'b0, ld = 1'b0, incr = 1'b0;
  logic [31:0] d = '0, q, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  addr_counter dut (.clk, .rst_n, .d, .ld, .incr, .q);

  task automatic step(logic l, logic i, logic [31:0] v);
    ld = l; incr = i; d = v;
    @(posedge clk); #1;
    if (l) model = v; else if (i) model = model + 32'd4;
    checks++;
    if (q !== model) begin failures++; $display("FAIL: q=%h expected %h", q, model); end
  endtask

  initial begin
    @(posedge clk); #1;
    rst_n = 1'b1; model = '0;
    checks++; if (q != 0) begin failures++; $display("FAIL: reset"); end
    step(1, 0, 32'h8000_1000);
    repeat (5) step(0, 1, 32'h0);
    step(0, 0, 32'h0);
    step(1, 1, 32'h0000_2000);
    step(0, 1, 32'h0);
    step(1, 0, 32'hFFFF_FFFC);
    step(0, 1, 32'h0);               // wraps to 0
    for (int n = 0; n < 50; n++) step(($urandom % 4) == 0, 1'($urandom % 2), $urandom);
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
