// c4x_if_pkg -- shared types, constants and the microprogram of the C6x host
// port to C4x comm port interface.
//
// The interface turns the 16-bit host port interface (HPI) of a TMS320C6x DSP
// into word-level transfers for up to four C4x-compatible comm port groups.
// All of its sequencing is done by a microprogrammed controller: a sequencer
// and a clocked 64-bit-wide microprogram memory.  This package holds
//   * the HPI register select codes (HCNTL) and the DSP control-word addresses,
//   * the 64-bit microinstruction layout: 16 next-address bits (instruction,
//     condition select, branch address) and 48 output bits,
//   * the condition-input codes seen by the sequencer,
//   * the microprogram itself, as the function ucode_word(address).
//
// From the source design: the 64-bit word split into 16 next-address and 48
// output bits, the four sequencer instructions, the Idle loop with three
// checks entered at three different places, the control-word addresses
// 8000_0000h/04h/08h/0Ch, the status-word bit layout, and the cycle budget of
// the loops (Idle loop 7 cycles, fastest read 19 cycles, fastest write 18
// cycles, LOADACK sampled 8 cycles after LOAD, DAV sampled 10 cycles after
// DATACK).  The exact field positions, condition codes, microprogram
// addresses, the half-word order on the HPI and the HPIA-ownership tag are
// choices of this implementation.
package c4x_if_pkg;

  // ---------------------------------------------------------------- HPI
  typedef enum logic [1:0] {
    HC_HPIC     = 2'b00,  // HPI control register
    HC_HPIA     = 2'b01,  // HPI address register
    HC_HPID_INC = 2'b10,  // data register, HPIA post-incremented by one word
    HC_HPID     = 2'b11   // data register, HPIA unchanged
  } hcntl_e;

  // DSP memory words shared with the interface (Figure "control words").
  localparam logic [31:0] SETUP_ADDR  = 32'h8000_0000;
  localparam logic [31:0] WCOUNT_ADDR = 32'h8000_0004;
  localparam logic [31:0] ADDRV_ADDR  = 32'h8000_0008;
  localparam logic [31:0] STATUS_ADDR = 32'h8000_000C;

  // HPIC value written by the controller to acknowledge nHINT (HINT bit,
  // bit 2, write-one-to-clear; HWOB = 0 so the first half word is the MS one).
  localparam logic [15:0] HPIC_CLEAR_HINT = 16'h0004;

  localparam int unsigned MAX_PORTS = 4;

  // Setup word at 8000_0000h: bit 0 IN/nOUT, bits 4..1 SETUPCOM[3:0].
  typedef struct packed {
    logic [3:0] setupcom;  // one bit per comm port
    logic       in_nout;   // 1 = input (write into DSP), 0 = output (read)
  } setup_t;

  // ---------------------------------------------------------------- microinstruction
  typedef enum logic [1:0] {
    SEQ_CONT = 2'd0,  // continue with the next address
    SEQ_BR0  = 2'd1,  // branch if the selected condition is 0
    SEQ_BR1  = 2'd2,  // branch if the selected condition is 1
    SEQ_JMP  = 2'd3   // unconditional branch
  } seq_e;

  typedef enum logic [3:0] {
    C_ZERO     = 4'd0,  // constant 0
    C_NHINT    = 4'd1,  // nHINT line level
    C_NHRDY    = 4'd2,  // nHRDY line level
    C_WR_READY = 4'd3,  // active port set up for input AND DAV = 1
    C_RD_READY = 4'd4,  // active port set up for output AND LOADACK = 1
    C_TAG_IN   = 4'd5,  // HPIA holds the active port's input address
    C_TAG_OUT  = 4'd6,  // HPIA holds the active port's output address
    C_IN_DONE  = 4'd7,  // active port input done flag
    C_OUT_DONE = 4'd8   // active port output done flag
  } cond_e;
  localparam int unsigned NUM_COND = 16;  // condition-select field reach

  // Source of the 32-bit word ahead of the half-word multiplexer.
  typedef enum logic [1:0] {
    SRC_INREG    = 2'd0,
    SRC_IN_ADDR  = 2'd1,
    SRC_OUT_ADDR = 2'd2
  } wsel_e;

  typedef enum logic [1:0] {
    TAG_NOP   = 2'd0,
    TAG_IN    = 2'd1,
    TAG_OUT   = 2'd2,
    TAG_CLEAR = 2'd3
  } tag_op_e;

  // 48 output bits.
  typedef struct packed {
    logic [15:0] hdata;       // HostDataOutput[15:0] field
    hcntl_e      hcntl;
    logic        hr_nw;
    logic        hhwil;
    logic        nhcs;
    logic        hd_oe;       // drive the HPI data bus
    logic        hd_ctl;      // last mux: 1 = controller group, 0 = host port group
    logic        stat_sel;    // controller mux: 1 = comm port status bits
    wsel_e       wsel;        // first mux of the host port group
    logic        half_lo;     // second mux: 1 = lower half word
    logic        ldouthi;
    logic        ldoutlo;
    logic        ldinreg;
    logic        incr_in_addr;
    logic        incr_out_addr;
    logic        dec_in_wc;
    logic        dec_out_wc;
    logic        ld_reg5;
    logic        ld_wc;       // load the word counter chosen by reg5
    logic        ld_addr;     // load the address counter chosen by reg5
    logic        load;        // LOAD strobe to the comm port group
    logic        datack;      // DATACK strobe to the comm port group
    logic        ext_int4;    // EXT_INT_4 to the DSP
    tag_op_e     tag_op;
    logic        adv_port;    // increment the active-port counter
    logic [4:0]  spare;
  } uout_t;

  typedef struct packed {
    seq_e        seq;
    cond_e       cond;
    logic [1:0]  nspare;      // unused next-address bits
    logic [7:0]  target;
    uout_t       o;
  } uword_t;

  localparam int unsigned UADDR_W = 8;

  // ---------------------------------------------------------------- microprogram map
  // Idle loop (Figure "Idle loop"): nHINT check, write check, read check.
  localparam logic [7:0] A_I0 = 8'd0;   // nHINT = 0 ? -> setup   (entry from read)
  localparam logic [7:0] A_I4 = 8'd4;   // write ready ? -> write (entry from setup)
  localparam logic [7:0] A_I5 = 8'd5;   // read ready ?  -> read  (entry from write)
  localparam logic [7:0] A_I6 = 8'd6;   // back to A_I0, next port
  localparam logic [7:0] A_R0 = 8'd8;   // read transfer (DSP -> comm port)
  localparam logic [7:0] A_SR = 8'd21;  // status report after a read
  localparam logic [7:0] A_RA = 8'd35;  // load HPIA from output address counter
  localparam logic [7:0] A_W0 = 8'd40;  // write transfer (comm port -> DSP)
  localparam logic [7:0] A_SW = 8'd51;  // status report after a write
  localparam logic [7:0] A_WA = 8'd65;  // load HPIA from input address counter
  localparam logic [7:0] A_T0 = 8'd72;  // transfer setup
  localparam logic [7:0] A_LAST = 8'd108;

  localparam int unsigned UROM_DEPTH = 128;

  // Idle state of the output bits: nHCS high, nothing strobed.
  function automatic uout_t o_idle();
    uout_t o = '0;
    o.nhcs  = 1'b1;
    o.hr_nw = 1'b1;
    return o;
  endfunction

  // HPI bus state for one microinstruction.
  function automatic uout_t o_hpi(hcntl_e hc, logic rnw, logic hw, logic ncs);
    uout_t o = o_idle();
    o.hcntl = hc;
    o.hr_nw = rnw;
    o.hhwil = hw;
    o.nhcs  = ncs;
    o.hd_oe = ~rnw;
    return o;
  endfunction

  function automatic uword_t mk(seq_e s, cond_e c, logic [7:0] t, uout_t o);
    uword_t w;
    w.seq = s; w.cond = c; w.nspare = '0; w.target = t; w.o = o;
    return w;
  endfunction

  function automatic uword_t cont(uout_t o);
    return mk(SEQ_CONT, C_ZERO, 8'd0, o);
  endfunction

  // Controller-driven half-word write of a register (HPIA or HPIC); step
  // 0..4 of a 5-cycle pattern.  HD must be valid when nHCS rises; HHWIL is
  // latched when nHCS falls, so it changes on the rising edge.
  function automatic uout_t o_ctl_wr(hcntl_e hc, int step, logic [15:0] hi, logic [15:0] lo);
    uout_t o;
    case (step)
      0:       o = o_hpi(hc, 1'b0, 1'b0, 1'b1);
      1:       o = o_hpi(hc, 1'b0, 1'b0, 1'b0);
      2:       o = o_hpi(hc, 1'b0, 1'b1, 1'b1);
      3:       o = o_hpi(hc, 1'b0, 1'b1, 1'b0);
      default: o = o_hpi(hc, 1'b0, 1'b1, 1'b1);
    endcase
    o.hd_ctl = 1'b1;
    o.hdata  = (step <= 2) ? hi : lo;
    return o;
  endfunction

  // Host-port-group-driven write of HPIA from an address counter.
  function automatic uout_t o_addr_wr(int step, wsel_e src);
    uout_t o = o_ctl_wr(HC_HPIA, step, 16'h0, 16'h0);
    o.hd_ctl  = 1'b0;
    o.hdata   = 16'h0;
    o.wsel    = src;
    o.half_lo = (step >= 3);
    return o;
  endfunction

  // Autoincrement HPID word read, step 0..8 (9 cycles):
  // 0 set up, 1 nHCS low, 2 settle, 3 wait nHRDY, 4 latch high half,
  // 5 nHCS high, 6 nHCS low (second half), 7 latch low half, 8 nHCS high.
  function automatic uout_t o_rd(int step);
    uout_t o;
    case (step)
      0:       o = o_hpi(HC_HPID_INC, 1'b1, 1'b0, 1'b1);
      1, 2, 3: o = o_hpi(HC_HPID_INC, 1'b1, 1'b0, 1'b0);
      4: begin o = o_hpi(HC_HPID_INC, 1'b1, 1'b0, 1'b0); o.ldouthi = 1'b1; end
      5:       o = o_hpi(HC_HPID_INC, 1'b1, 1'b1, 1'b1);
      6:       o = o_hpi(HC_HPID_INC, 1'b1, 1'b1, 1'b0);
      7: begin o = o_hpi(HC_HPID_INC, 1'b1, 1'b1, 1'b0); o.ldoutlo = 1'b1; end
      default: o = o_hpi(HC_HPID_INC, 1'b1, 1'b1, 1'b1);
    endcase
    return o;
  endfunction

  // HPID word write, step 0..7 (8 cycles): 0 set up, 1 nHCS low, 2 settle,
  // 3 wait nHRDY, 4 nHCS high (high half taken), 5 nHCS low (second half),
  // 6 hold, 7 nHCS high (low half taken).
  function automatic uout_t o_wr(hcntl_e hc, int step);
    uout_t o;
    case (step)
      0:       o = o_hpi(hc, 1'b0, 1'b0, 1'b1);
      1, 2, 3: o = o_hpi(hc, 1'b0, 1'b0, 1'b0);
      4:       o = o_hpi(hc, 1'b0, 1'b1, 1'b1);
      5, 6:    o = o_hpi(hc, 1'b0, 1'b1, 1'b0);
      default: o = o_hpi(hc, 1'b0, 1'b1, 1'b1);
    endcase
    o.half_lo = (step >= 5);
    return o;
  endfunction

  // Status report: HPIA <- 8000_000Ch, HPID <- {16'h0, 8'h0, status},
  // then a two-cycle EXT_INT_4 pulse; returns to ret.  14 words.
  function automatic uword_t status_word(int k, logic [7:0] base, logic [7:0] ret);
    uout_t o;
    if (k <= 4) begin
      o = o_ctl_wr(HC_HPIA, k, STATUS_ADDR[31:16], STATUS_ADDR[15:0]);
      if (k == 4) o.tag_op = TAG_CLEAR;
      return cont(o);
    end else if (k <= 12) begin
      o = o_wr(HC_HPID, k - 5);
      o.hd_ctl   = 1'b1;
      o.stat_sel = (k - 5 >= 5);
      o.hdata    = 16'h0000;
      if (k - 5 == 3) return mk(SEQ_BR1, C_NHRDY, base + 8'(k), o);
      if (k == 12) o.ext_int4 = 1'b1;
      return cont(o);
    end else begin
      o = o_idle();
      o.ext_int4 = 1'b1;
      return mk(SEQ_JMP, C_ZERO, ret, o);
    end
  endfunction

  // The microprogram.  Unused addresses hold a jump to the Idle loop.
  function automatic uword_t ucode_word(logic [7:0] a);
    uout_t o;
    int k;
    o = o_idle();
    // ---------------- Idle loop (7 cycles)
    if (a == A_I0) return mk(SEQ_BR0, C_NHINT, A_T0, o);
    if (a > A_I0 && a < A_I4) return cont(o);
    if (a == A_I4) return mk(SEQ_BR1, C_WR_READY, A_W0, o);
    if (a == A_I5) return mk(SEQ_BR1, C_RD_READY, A_R0, o);
    if (a == A_I6) begin
      o.adv_port = 1'b1;
      return mk(SEQ_JMP, C_ZERO, A_I0, o);
    end
    // ---------------- Read transfer: DSP memory -> comm port (13 words)
    if (a == A_R0) return mk(SEQ_BR0, C_TAG_OUT, A_RA, o);
    if (a > A_R0 && a <= A_R0 + 9) begin
      k = (int'(a) - int'(A_R0)) - 1;
      o = o_rd(k);
      if (k == 3) return mk(SEQ_BR1, C_NHRDY, a, o);
      return cont(o);
    end
    if (a == A_R0 + 10) begin o.load = 1'b1; return cont(o); end
    if (a == A_R0 + 11) begin
      o.incr_out_addr = 1'b1; o.dec_out_wc = 1'b1; return cont(o);
    end
    if (a == A_R0 + 12) return mk(SEQ_BR0, C_OUT_DONE, A_I0, o);
    if (a >= A_SR && a < A_SR + 14) return status_word((int'(a) - int'(A_SR)), A_SR, A_I0);
    if (a >= A_RA && a < A_RA + 5) begin
      o = o_addr_wr((int'(a) - int'(A_RA)), SRC_OUT_ADDR);
      if (a == A_RA + 4) begin
        o.tag_op = TAG_OUT;
        return mk(SEQ_JMP, C_ZERO, A_R0 + 8'd1, o);
      end
      return cont(o);
    end
    // ---------------- Write transfer: comm port -> DSP memory (11 words)
    if (a == A_W0) begin
      o.ldinreg = 1'b1;
      return mk(SEQ_BR0, C_TAG_IN, A_WA, o);
    end
    if (a > A_W0 && a <= A_W0 + 8) begin
      k = (int'(a) - int'(A_W0)) - 1;
      o = o_wr(HC_HPID_INC, k);
      o.wsel = SRC_INREG;
      if (k == 6) o.datack = 1'b1;
      if (k == 3) return mk(SEQ_BR1, C_NHRDY, a, o);
      return cont(o);
    end
    if (a == A_W0 + 9) begin
      o.incr_in_addr = 1'b1; o.dec_in_wc = 1'b1; return cont(o);
    end
    if (a == A_W0 + 10) return mk(SEQ_BR0, C_IN_DONE, A_I5, o);
    if (a >= A_SW && a < A_SW + 14) return status_word((int'(a) - int'(A_SW)), A_SW, A_I5);
    if (a >= A_WA && a < A_WA + 5) begin
      o = o_addr_wr((int'(a) - int'(A_WA)), SRC_IN_ADDR);
      if (a == A_WA + 4) begin
        o.tag_op = TAG_IN;
        return mk(SEQ_JMP, C_ZERO, A_W0 + 8'd1, o);
      end
      return cont(o);
    end
    // ---------------- Transfer setup (37 words)
    if (a >= A_T0 && a < A_T0 + 5) begin
      o = o_ctl_wr(HC_HPIA, (int'(a) - int'(A_T0)), SETUP_ADDR[31:16], SETUP_ADDR[15:0]);
      if (a == A_T0 + 4) o.tag_op = TAG_CLEAR;
      return cont(o);
    end
    if (a >= A_T0 + 5 && a < A_T0 + 32) begin
      k = (int'(a) - int'(A_T0)) - 5;       // 0..26: three 9-cycle word reads
      o = o_rd(k % 9);
      if (k % 9 == 8) begin
        case (k / 9)
          0:       o.ld_reg5 = 1'b1;
          1:       o.ld_wc   = 1'b1;
          default: o.ld_addr = 1'b1;
        endcase
      end
      if (k % 9 == 3) return mk(SEQ_BR1, C_NHRDY, a, o);
      return cont(o);
    end
    if (a >= A_T0 + 32 && a <= A_LAST) begin
      o = o_ctl_wr(HC_HPIC, (int'(a) - int'(A_T0)) - 32, HPIC_CLEAR_HINT, HPIC_CLEAR_HINT);
      if (a == A_LAST) return mk(SEQ_JMP, C_ZERO, A_I4, o);
      return cont(o);
    end
    return mk(SEQ_JMP, C_ZERO, A_I0, o_idle());
  endfunction

endpackage
