// tb_word_counter -- self-checking test of word_counter: load, count down,
// ZERO flag, no wrap below zero, load priority.
module tb_word_counter;
  logic clk = 1'b0, rst_n = 1'b0, ld = 1'b0, dec = 1'b0;
  logic [31:0] d = '0, q, model;
  logic zero;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  word_counter dut (.clk, .rst_n, .d, .ld, .dec, .q, .zero);

  task automatic step(logic l, logic de, logic [31:0] v);
    ld = l; dec = de; d = v;
    @(posedge clk); #1;
    if (l) model = v; else if (de && model != 0) model = model - 1;
    checks += 2;
    if (q !== model) begin failures++; $display("FAIL: q=%0d expected %0d", q, model); end
    if (zero !== (model == 0)) begin failures++; $display("FAIL: zero=%b at %0d", zero, model); end
  endtask

  initial begin
    @(posedge clk); #1;
    rst_n = 1'b1; model = '0;
    checks++; if (!zero) begin failures++; $display("FAIL: reset"); end
    step(1, 0, 32'd16);
    for (int i = 0; i < 18; i++) step(0, 1, 32'd0);   // down to 0 and stays
    step(1, 1, 32'd3);
    step(0, 0, 32'd0);
    step(0, 1, 32'd0);
    for (int n = 0; n < 60; n++) step(($urandom % 8) == 0, 1'($urandom % 2), $urandom % 6);
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
