// hpi_boot_loader -- host-boot loader: copies a code/data image held in FPGA
// memory into DSP memory through the host port, then releases the DSP from
// reset.
//
// In host boot mode the DSP stays in reset until a 1 is written to the DSPINT
// bit of HPIC, and then runs from address 0.  This state machine, started by
// `start`, writes HPIA with START_ADDR, writes img_len image words through
// HPID with auto-increment (each as two half words, most significant first,
// waiting for nHRDY on the first half), writes HPIC with DSPINT set, and
// raises `done`.  The image memory (IMAGE_WORDS x 32) is filled through the
// img_we / img_addr / img_wdata port, standing in for the FPGA configuration
// that holds the image.  Every HPI half word takes nHCS low for two clocks
// with HCNTL / HR/nW / HHWIL set up one clock before the falling edge and
// write data held through the rising edge.
// From the source design: the use of FPGA memory for the image, the load
// through the HPI, the final HPIC write, execution from address 0.  The image
// size, the start/done handshake and the cycle-level sequencing are this
// implementation's choices.
module hpi_boot_loader
  import c4x_if_pkg::*;
#(
  parameter int unsigned IMAGE_WORDS = 256,
  parameter logic [31:0] START_ADDR  = 32'h0000_0000
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // image memory fill port
  input  logic                           img_we,
  input  logic [$clog2(IMAGE_WORDS)-1:0] img_addr,
  input  logic [31:0]                    img_wdata,
  input  logic [$clog2(IMAGE_WORDS):0]   img_len,
  // control
  input  logic                           start,
  output logic                           busy,
  output logic                           done,
  // HPI master
  output logic [15:0]                    hd_o,
  output logic                           hd_oe,
  output logic [1:0]                     hcntl,
  output logic                           hr_nw,
  output logic                           hhwil,
  output logic                           nhcs,
  input  logic                           nhrdy
);
  localparam int unsigned IW = $clog2(IMAGE_WORDS);
  localparam logic [15:0] HPIC_DSPINT = 16'h0002;

  typedef enum logic [2:0] {S_IDLE, S_HPIA, S_DATA, S_HPIC, S_DONE} state_e;
  // phase of one 32-bit register write: 0 set up, 1-2 first half low,
  // 3 first half high, 4-5 second half low, 6 second half high
  state_e      state;
  logic [2:0]  ph;
  logic [IW:0] idx;
  logic [31:0] image [IMAGE_WORDS];
  logic [31:0] word;

  always_ff @(posedge clk) begin
    if (img_we) image[img_addr] <= img_wdata;
  end

  always_comb begin
    unique case (state)
      S_HPIA:  word = START_ADDR;
      S_HPIC:  word = {HPIC_DSPINT, HPIC_DSPINT};
      default: word = image[idx[IW-1:0]];
    endcase
  end

  assign busy  = (state != S_IDLE) && (state != S_DONE);
  assign done  = (state == S_DONE);
  assign hr_nw = 1'b0;
  assign hd_oe = busy;
  assign hhwil = (ph >= 3'd3);
  assign nhcs  = !(busy && (ph == 3'd1 || ph == 3'd2 || ph == 3'd4 || ph == 3'd5));
  assign hd_o  = (ph >= 3'd4) ? word[15:0] : word[31:16];
  always_comb begin
    unique case (state)
      S_HPIA:  hcntl = HC_HPIA;
      S_DATA:  hcntl = HC_HPID_INC;
      default: hcntl = HC_HPIC;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ph    <= '0;
      idx   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_HPIA;
          ph    <= '0;
          idx   <= '0;
        end
        S_DONE: ;
        default: begin
          // hold the first half low while an HPID access is not ready
          if (!(state == S_DATA && ph == 3'd2 && nhrdy)) ph <= ph + 3'd1;
          if (ph == 3'd6) begin
            ph <= '0;
            unique case (state)
              S_HPIA: state <= (img_len == '0) ? S_HPIC : S_DATA;
              S_DATA: begin
                idx <= idx + 1'b1;
                if (idx + 1'b1 == img_len) state <= S_HPIC;
              end
              default: state <= S_DONE;
            endcase
          end
        end
      endcase
    end
  end
endmodule
