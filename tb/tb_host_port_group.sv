// tb_host_port_group -- self-checking test of the host port group data path
// with two comm ports, driven with hand-made microinstruction output words:
// hiloreg reassembly, counter loads steered by reg5, per-port increment and
// decrement, inreg from the active port, and the three multiplexers to HD.
module tb_host_port_group;
  import c4x_if_pkg::*;
  localparam int NP = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  uout_t uo;
  setup_t reg5 = '0;
  logic [1:0] act = '0;
  logic [15:0] ctl_hd = 16'hBEEF, hd_i = '0, hd_o;
  logic hd_oe;
  logic [NP-1:0][31:0] indat;
  logic [31:0] outdat;
  logic [NP-1:0] in_done, out_done, in_zero, out_zero;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  host_port_group #(.NUM_PORTS(NP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick();
    @(posedge clk); #1;
    uo = o_idle();
  endtask
  // put a 32-bit word into hiloreg through two half-word loads
  task automatic hilo(logic [31:0] w);
    hd_i = w[31:16]; uo.ldouthi = 1; tick();
    hd_i = w[15:0];  uo.ldoutlo = 1; tick();
  endtask
  task automatic load_setup(int port, bit in_dir, logic [31:0] wc, logic [31:0] a);
    reg5 = '{setupcom: 4'(1 << port), in_nout: in_dir};
    hilo(wc); uo.ld_wc = 1; tick();
    hilo(a);  uo.ld_addr = 1; tick();
  endtask
  task automatic show(wsel_e s, bit lo, output logic [15:0] v);
    uo.wsel = s; uo.half_lo = lo; uo.hd_ctl = 0;
    #1 v = hd_o;
  endtask
  logic [15:0] v0, v1;

  initial begin
    uo = o_idle();
    indat[0] = 32'h1111_2222; indat[1] = 32'h3333_4444;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    check(in_done == '1 && out_done == '1, "nothing set up after reset");
    hilo(32'hCAFE_F00D);
    check(outdat == 32'hCAFE_F00D, "hiloreg reassembles the word");
    load_setup(1, 1'b1, 32'd5, 32'h0000_2000);
    load_setup(0, 1'b0, 32'd2, 32'h0000_1000);
    check(in_done == 2'b01 && out_done == 2'b10, "port 1 input and port 0 output set up");
    act = 2'd1;
    show(SRC_IN_ADDR, 0, v0); show(SRC_IN_ADDR, 1, v1);
    check(v0 == 16'h0000 && v1 == 16'h2000, "port 1 input address on HD");
    uo.incr_in_addr = 1; uo.dec_in_wc = 1; tick();
    show(SRC_IN_ADDR, 1, v1);
    check(v1 == 16'h2004, "increment by 4 on the active port");
    uo.ldinreg = 1; tick();
    show(SRC_INREG, 0, v0); show(SRC_INREG, 1, v1);
    check(v0 == 16'h3333 && v1 == 16'h4444, "inreg from port 1");
    act = 2'd0;
    show(SRC_OUT_ADDR, 1, v1);
    check(v1 == 16'h1000, "port 0 output address untouched");
    uo.incr_out_addr = 1; uo.dec_out_wc = 1; tick();
    check(!out_zero[0], "one word left");
    uo.incr_out_addr = 1; uo.dec_out_wc = 1; tick();
    check(out_zero[0] && !out_done[0], "zero before done flag");
    tick();
    check(out_done[0] && !in_done[1], "port 0 output done, port 1 input still set up");
    show(SRC_OUT_ADDR, 1, v1);
    check(v1 == 16'h1008, "two increments");
    uo.hd_ctl = 1; #1;
    check(hd_o == 16'hBEEF, "controller group value selected by last mux");
    uo.hd_oe = 1; #1;
    check(hd_oe, "HD output enable follows microinstruction");
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
