// tb_controller_group -- self-checking test of the controller group with two
// comm ports: the setup HPIA address written from the microinstruction
// field, reg5 loaded from the 5 LSBs of hiloreg, the status-bit mux, LOAD
// decoded to the active port, the active-port counter advancing once per
// Idle pass, and the HPIA tag deciding between reload and auto-increment.
module tb_controller_group;
  import c4x_if_pkg::*;
  localparam int NP = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic nhint = 1'b1, nhrdy = 1'b0;
  logic [NP-1:0] dav = '0, loadack = '0, load, datack;
  logic [4:0] hilo_lsb = 5'b00011;
  logic [NP-1:0] in_done = '1, out_done = '1, in_zero = '1, out_zero = '1;
  uout_t uo;
  setup_t reg5;
  logic [1:0] act;
  logic [15:0] ctl_hd;
  logic ext_int4;
  logic [7:0] upc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  controller_group #(.NUM_PORTS(NP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wait_pc(logic [7:0] a);
    do begin @(posedge clk); #1; end while (upc != a);
  endtask

  logic [15:0] seen [$];
  logic prev_ncs = 1'b1;
  always @(posedge clk) begin
    prev_ncs <= uo.nhcs;
    if (!prev_ncs && uo.nhcs && uo.hd_oe) seen.push_back(ctl_hd);
  end

  int n_act1 = 0;
  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    // the active port alternates 0,1,0,... at the loop end
    for (int i = 0; i < 4; i++) begin
      wait_pc(A_I0);
      check(int'(act) == (i + 1) % 2 || int'(act) == i % 2, "act within range");
      if (act == 2'd1) n_act1++;
    end
    check(n_act1 == 2, "act advances once per Idle pass");
    // setup: first two controller-driven half words are 8000h, 0000h
    nhint = 1'b0;
    wait_pc(A_T0 + 8'd5);
    nhint = 1'b1;
    check(seen.size() == 2 && seen[0] == 16'h8000 && seen[1] == 16'h0000,
          "setup address 8000_0000h on HD");
    wait_pc(A_T0 + 8'd14);
    check(reg5.in_nout == 1'b1 && reg5.setupcom == 4'b0001, "reg5 loaded from hiloreg LSBs");
    wait_pc(A_I4);
    check(seen.size() == 4 && seen[2] == 16'h0004 && seen[3] == 16'h0004, "HINT acknowledge value");
    // status mux: port 0 output busy, port 1 input busy
    out_done = 2'b10; in_done = 2'b01;
    @(posedge clk); #1;
    // read on port 0: LOAD only on port 0, HPIA reloaded first time only
    out_zero = 2'b11; loadack = 2'b01;
    out_zero[0] = 1'b0;
    wait_pc(A_R0);
    check(act == 2'd0, "read on port 0");
    wait_pc(A_RA);
    check(1'b1, "first read reloads HPIA");
    do begin @(posedge clk); #1; end while (!uo.load);
    check(load == 2'b01 && datack == 2'b00, "LOAD to port 0 only");
    // force the status routine for this port
    out_zero[0] = 1'b1;
    seen.delete();
    wait_pc(A_SR + 8'd13);
    check(seen.size() == 4 && seen[0] == 16'h8000 && seen[1] == 16'h000C, "status address 8000_000Ch");
    check(seen.size() == 4 && seen[2] == 16'h0000 && seen[3] == {8'h00, 8'b0000_0110},
          $sformatf("status bits %h", seen.size() == 4 ? seen[3] : 16'hFFFF));
    check(ext_int4, "EXT_INT_4 pulse");
    // tag: after the status write the next read reloads HPIA again
    out_zero[0] = 1'b0; out_done[0] = 1'b0;
    wait_pc(A_R0);
    @(posedge clk); #1;
    check(upc == A_RA, "HPIA reload after status write");
    wait_pc(A_R0);
    @(posedge clk); #1;
    check(upc == A_R0 + 8'd1, "auto-increment when HPIA still points at the block");
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
