// tb_micro_sequencer -- self-checking test of the sequencer: the four
// instructions against every condition input, reset to address 0, and the
// registered address following next_addr.
module tb_micro_sequencer;
  import c4x_if_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  seq_e seq = SEQ_CONT;
  cond_e cond_sel = C_ZERO;
  logic [7:0] target = '0, upc, next_addr, exp_next;
  logic [15:0] cond = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  micro_sequencer dut (.clk, .rst_n, .seq, .cond_sel, .target, .cond, .upc, .next_addr);

  initial begin
    @(posedge clk); #1;
    checks++; if (upc != 0) begin failures++; $display("FAIL: reset address"); end
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      seq      = seq_e'($urandom % 4);
      cond_sel = cond_e'($urandom % 9);
      target   = 8'($urandom);
      cond     = 16'($urandom);
      #1;
      case (seq)
        SEQ_CONT: exp_next = upc + 8'd1;
        SEQ_BR0:  exp_next = cond[cond_sel] ? upc + 8'd1 : target;
        SEQ_BR1:  exp_next = cond[cond_sel] ? target : upc + 8'd1;
        default:  exp_next = target;
      endcase
      checks++;
      if (next_addr !== exp_next) begin
        failures++;
        $display("FAIL: seq=%s cond=%0d c=%b upc=%0d next=%0d expected %0d",
                 seq.name(), cond_sel, cond[cond_sel], upc, next_addr, exp_next);
      end
      @(posedge clk); #1;
      checks++;
      if (upc !== exp_next) begin failures++; $display("FAIL: upc not registered"); end
    end
    rst_n = 1'b0; seq = SEQ_JMP; target = 8'd55; #1;
    checks++; if (next_addr != 0) begin failures++; $display("FAIL: reset forces address 0"); end
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
