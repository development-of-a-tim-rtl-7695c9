// c4x_commport_if -- C4x-compatible comm port interface for a TMS320C6x DSP
// host port (top level of the interface FPGA logic).
//
// The C6x has no C4x comm ports, only a 16-bit host port interface (HPI)
// through which an external master can read and write any DSP address.  This
// block is that master.  The DSP assigns a memory block to a comm port and
// direction by writing three control words (setup, word count, start
// address) at 8000_0000h..8000_0008h and pulling nHINT low.  The interface
// then moves words one at a time between DSP memory and the comm port groups:
//   * read transfer (DSP -> comm port) when the port is set up for output and
//     LOADACK = 1: two HPI half-word reads into hiloreg, then a LOAD strobe;
//   * write transfer (comm port -> DSP) when set up for input and DAV = 1:
//     INDATA is latched, written as two HPI half words, then DATACK strobed.
// HPIA is reloaded from the port's address counter only when another address
// was used since, otherwise HPI auto-increment is used.  When a word counter
// reaches zero, the done flags are written to 8000_000Ch and EXT_INT_4 is
// pulsed.  An Idle loop polls nHINT, the write condition and the read
// condition; each routine re-enters it at a different check, so setup, write
// and read share the host port fairly.
//
// Timing at one microinstruction per clock (40 MHz in the source design):
// Idle loop 7 cycles, fastest read 19 cycles per word, fastest write 18 cycles
// per word, HPIA reload adds 5 cycles, each nHRDY wait cycle adds 1.
//
// Ports: clk and synchronous active-low rst_n; the HPI lines (HD split into
// hd_i / hd_o / hd_oe for the pad buffer); nHINT in, EXT_INT_4 out; per comm
// port group LOAD/LOADACK, DAV/DATACK and INDATA, and the shared OUTDATA.
// NUM_PORTS = 1 is the configuration built and measured in the source
// design; 2..4 use the active-port counter and multiplexers it describes for
// expansion.
//
// Host boot: with boot_en high (DSP strapped for host boot) the boot loader
// owns the HPI after reset, copies img_len words of its image memory (filled
// through img_we/img_addr/img_wdata) to DSP address 0, sets DSPINT and raises
// boot_done; until then the controller is held in reset.  With boot_en low
// the controller starts at once.  Two assertions check the HPI bus rules
// (access type stable while nHCS is low, write data held across its rising
// edge).
module c4x_commport_if
  import c4x_if_pkg::*;
#(
  parameter int unsigned NUM_PORTS   = 1,
  parameter int unsigned IMAGE_WORDS = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host boot
  input  logic                       boot_en,
  input  logic                       img_we,
  input  logic [$clog2(IMAGE_WORDS)-1:0] img_addr,
  input  logic [31:0]                img_wdata,
  input  logic [$clog2(IMAGE_WORDS):0]   img_len,
  output logic                       boot_done,
  // DSP host port
  input  logic [15:0]                hd_i,
  output logic [15:0]                hd_o,
  output logic                       hd_oe,
  output logic [1:0]                 hcntl,
  output logic                       hr_nw,
  output logic                       hhwil,
  output logic                       nhcs,
  input  logic                       nhrdy,
  input  logic                       nhint,
  output logic                       ext_int4,
  // comm port groups
  output logic [NUM_PORTS-1:0]       load,
  input  logic [NUM_PORTS-1:0]       loadack,
  output logic [31:0]                outdat,
  input  logic [NUM_PORTS-1:0]       dav,
  output logic [NUM_PORTS-1:0]       datack,
  input  logic [NUM_PORTS-1:0][31:0] indat
);
  uout_t                uo;
  setup_t               reg5;
  logic [1:0]           act;
  logic [15:0]          ctl_hd;
  logic [7:0]           upc;
  logic [NUM_PORTS-1:0] in_done, out_done, in_zero, out_zero;

  // boot loader and its HPI lines
  logic [15:0] b_hd_o, c_hd_o;
  logic        b_hd_oe, c_hd_oe, b_hr_nw, b_hhwil, b_nhcs, b_busy, b_done;
  logic [1:0]  b_hcntl;
  logic        run_n, started;

  always_ff @(posedge clk) begin
    if (!rst_n) started <= 1'b0;
    else        started <= 1'b1;
  end

  hpi_boot_loader #(.IMAGE_WORDS(IMAGE_WORDS)) u_boot (
    .clk, .rst_n, .img_we, .img_addr, .img_wdata, .img_len,
    .start(boot_en && !started), .busy(b_busy), .done(b_done),
    .hd_o(b_hd_o), .hd_oe(b_hd_oe), .hcntl(b_hcntl), .hr_nw(b_hr_nw),
    .hhwil(b_hhwil), .nhcs(b_nhcs), .nhrdy
  );

  assign boot_done = b_done;
  // the controller runs once the boot load is over, or at once without it
  assign run_n = rst_n && (!boot_en || b_done);

  initial assert (NUM_PORTS >= 1 && NUM_PORTS <= MAX_PORTS)
    else $error("NUM_PORTS must be 1..%0d", MAX_PORTS);

  controller_group #(.NUM_PORTS(NUM_PORTS)) u_ctl (
    .clk, .rst_n(run_n), .nhint, .nhrdy, .dav, .loadack, .load, .datack,
    .hilo_lsb(outdat[4:0]),
    .in_done, .out_done, .in_zero, .out_zero,
    .uo, .reg5, .act, .ctl_hd, .ext_int4, .upc
  );

  host_port_group #(.NUM_PORTS(NUM_PORTS)) u_hpg (
    .clk, .rst_n(run_n), .uo, .reg5, .act, .ctl_hd,
    .hd_i, .hd_o(c_hd_o), .hd_oe(c_hd_oe), .indat, .outdat,
    .in_done, .out_done, .in_zero, .out_zero
  );

  // HPI lines: boot loader while it is busy, controller otherwise
  always_comb begin
    if (b_busy) begin
      hd_o = b_hd_o; hd_oe = b_hd_oe; hcntl = b_hcntl;
      hr_nw = b_hr_nw; hhwil = b_hhwil; nhcs = b_nhcs;
    end else begin
      hd_o = c_hd_o; hd_oe = c_hd_oe; hcntl = uo.hcntl;
      hr_nw = uo.hr_nw; hhwil = uo.hhwil; nhcs = uo.nhcs;
    end
  end

  // HPI bus rules, whoever drives the bus: the access type latched at the
  // falling edge of nHCS stays put while nHCS is low, and write data is
  // held across the rising edge of nHCS, where the DSP takes it.
  a_hpi_type_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (!nhcs && !$past(nhcs)) |-> ($stable(hcntl) && $stable(hr_nw) && $stable(hhwil)));
  a_hpi_wdata_held: assert property (@(posedge clk) disable iff (!rst_n)
    (nhcs && !$past(nhcs) && $past(hd_oe)) |-> $stable(hd_o));
endmodule
