// hpi_dsp_model -- behavioural model of the TMS320C6x host port interface and
// of the DSP memory behind it (testbench only, not synthesizable).
//
// It answers the interface's HPI cycles the way the DSP does:
//   * HCNTL, HR/nW and HHWIL are latched when nHCS falls; write data is
//     taken when nHCS rises; the first half word is the most significant;
//   * HPIC: HINT (bit 2) drives nHINT low; writing 1 to it clears it (the
//     write takes effect with the second half word);
//     writing 1 to DSPINT (bit 1) is counted;
//   * HPIA: written/read in two halves;
//   * HPID: word at HPIA; HCNTL = 10 post-increments HPIA by 4 after the
//     second half.  On the first half of an HPID access nHRDY goes high
//     one clock after nHCS falls and stays high for read_busy (reads) or
//     write_busy (writes) clocks.  After an auto-increment read the next word
//     counts as prefetched and a following auto-increment read sees no wait.
// Memory: 16384 words; byte address bit 31 and bits 14..2 select the word,
// which covers both the control words at 8000_0000h and low data memory.
// The DSP software side is modelled by the testbench through the tasks wr,
// rd and set_hint; set_hint returns once HINT is set on a clock edge.
module hpi_dsp_model (
  input  logic        clk,
  input  logic [15:0] hd_from_host,
  input  logic        hd_oe,
  output logic [15:0] hd_to_host,
  input  logic [1:0]  hcntl,
  input  logic        hr_nw,
  input  logic        hhwil,
  input  logic        nhcs,
  output logic        nhrdy,
  output logic        nhint
);
  logic [31:0] mem [16384];
  initial for (int i = 0; i < 16384; i++) mem[i] = '0;
  logic [31:0] hpia = '0;
  logic        hint = 1'b0;
  logic        prev_ncs = 1'b1;
  logic [1:0]  l_hcntl = '0;
  logic        l_rnw = 1'b1, l_hw = 1'b0;
  logic [15:0] wbuf_hi = '0;
  logic [31:0] rword = '0;
  logic        prefetched = 1'b0;
  int          busy = 0;
  int unsigned read_busy = 3, write_busy = 0;
  // statistics
  int unsigned n_hpia_wr = 0, n_hpic_wr = 0, n_dspint = 0, n_hpid_rd = 0,
               n_hpid_wr = 0, n_wait = 0, n_prefetch_hit = 0, n_bus_conflict = 0;

  assign nhint = !hint;
  assign nhrdy = (busy != 0);

  function automatic int unsigned idx(logic [31:0] a);
    return int'({18'b0, a[31], a[14:2]});
  endfunction

  function automatic logic [31:0] rd(logic [31:0] a);
    return mem[idx(a)];
  endfunction

  task automatic wr(logic [31:0] a, logic [31:0] d);
    mem[idx(a)] = d;
  endtask

  int unsigned hint_req = 0, hint_ack = 0;

  task automatic set_hint();
    hint_req++;
    wait (hint_ack == hint_req);
  endtask

  // Read data on HD while a read access is under way.
  always_comb begin
    hd_to_host = 16'h0;
    if (!nhcs && l_rnw) begin
      unique case (l_hcntl)
        2'b00:   hd_to_host = {13'h0, hint, 2'b00};
        2'b01:   hd_to_host = l_hw ? hpia[15:0] : hpia[31:16];
        default: hd_to_host = l_hw ? rword[15:0] : rword[31:16];
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (hint_ack != hint_req) hint_ack <= hint_req;
    if (busy != 0) begin
      busy <= busy - 1;
      n_wait <= n_wait + 1;
      if (busy == 1 && l_rnw) rword <= rd(hpia);
    end
    if (hd_oe && !nhcs && hr_nw) n_bus_conflict <= n_bus_conflict + 1;
    prev_ncs <= nhcs;
    if (prev_ncs && !nhcs) begin
      // falling edge of nHCS: latch the access type
      l_hcntl <= hcntl;
      l_rnw   <= hr_nw;
      l_hw    <= hhwil;
      if (hcntl[1] && !hhwil) begin
        if (hr_nw) begin
          if (prefetched && hcntl == 2'b10) begin
            rword <= rd(hpia);
            n_prefetch_hit <= n_prefetch_hit + 1;
          end else if (read_busy == 0) rword <= rd(hpia);
          else busy <= read_busy;
        end else begin
          busy <= write_busy;
        end
      end
    end
    if (!prev_ncs && nhcs) begin
      // rising edge of nHCS: complete the half word
      unique case (l_hcntl)
        2'b00: if (!l_rnw) begin
          if (hd_from_host[2] && l_hw) hint <= 1'b0;
          if (hd_from_host[1] && l_hw) n_dspint <= n_dspint + 1;
          if (l_hw) n_hpic_wr <= n_hpic_wr + 1;
        end
        2'b01: if (!l_rnw) begin
          if (l_hw) begin
            hpia[15:0] <= hd_from_host;
            n_hpia_wr  <= n_hpia_wr + 1;
          end else hpia[31:16] <= hd_from_host;
          prefetched <= 1'b0;
        end
        default: begin
          if (l_rnw) begin
            if (l_hw) begin
              n_hpid_rd <= n_hpid_rd + 1;
              prefetched <= (l_hcntl == 2'b10);
              if (l_hcntl == 2'b10) hpia <= hpia + 32'd4;
            end
          end else begin
            if (!l_hw) wbuf_hi <= hd_from_host;
            else begin
              mem[idx(hpia)] <= {wbuf_hi, hd_from_host};
              n_hpid_wr <= n_hpid_wr + 1;
              prefetched <= 1'b0;
              if (l_hcntl == 2'b10) hpia <= hpia + 32'd4;
            end
          end
        end
      endcase
    end
    // the DSP setting HINT wins over a clear in the same clock
    if (hint_ack != hint_req) hint <= 1'b1;
  end
endmodule
