// cmd_if: command interface, receives command packets from the mission data
// processor (MDP).
//
// While the MDP holds CMD_ENA high it clocks bits into a shift register on
// the rising edges of CMD_CLK, MSB first.  The three link signals are
// synchronised to the board clock and CMD_CLK's edges are found there, so
// each CMD_CLK level must last at least three board clocks.  Completed bytes
// are gathered three at a time into a 27-bit word that is written into the
// three 4k x 9 command FIFOs in parallel; each 9-bit segment carries a byte
// and an end-of-packet (EOP) flag.  The newest byte is held back until the
// next byte completes or CMD_ENA falls, so the last byte of a packet can be
// written with EOP set; a part-filled last word is written with its unused
// segments zero.  The first byte of a word is seg[2], read on PMD[47:39].
// When CMD_ENA falls:
//   - ~Irq goes low (the DSP's ~IRQ3) until software writes 0 to ~ClrIrq;
//   - if the bit count is not a multiple of 8, ~BitErr goes low and the
//     stray bits are dropped.
// A word that arrives while the FIFO is full is lost and ~OvrFlw goes low.
// Writing 0 to ~RST (PMD42 of port 0xC0 0002) resets the interface and the
// FIFO.  A read of port 0xC0 0003 (data_rd) removes the head word.
// stat is PMD[47:40]: {0, ~BitErr, ~HF, ~Irq, ~OvrFlw, ~EF, ~FF, CMD_ENA};
// the three FIFOs' flags are ORed as on the board.  Register layout and
// behaviour follow the board; the bit order, the clock edge and the grouping
// of three bytes per word are this design's reading.
module cmd_if
  import scproc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // link from the MDP (asynchronous)
  input  logic       cmd_ena,
  input  logic       cmd_clk,
  input  logic       cmd_data,
  // register access
  input  logic       ctl_wr,
  input  logic [7:0] ctl_wdata,
  input  logic       data_rd,
  output logic [7:0] stat,
  // command FIFO (three IDT7204 side by side)
  output logic       fifo_rst,
  output logic       fifo_wr,
  output cmd_word_t  fifo_din,
  output logic       fifo_rd,
  input  logic [2:0] fifo_ef_n,
  input  logic [2:0] fifo_ff_n,
  input  logic [2:0] fifo_hf_n,
  output logic       irq_n
);
  logic [2:0] ena_s, clk_s, dat_s;  // [0],[1] synchroniser, [2] previous
  logic       rise, fall;
  logic [6:0] sh;
  logic [2:0] bitcnt;
  logic       pend_v;
  logic [7:0] pend_b;
  cmd_word_t  wbuf;
  logic [1:0] wcnt;
  logic       biterr_n, ovr_n;
  logic       soft_rst, irst, full;

  assign soft_rst = ctl_wr && !ctl_wdata[CMD_RST];
  assign irst     = rst || soft_rst;
  assign fifo_rst = irst;
  assign fifo_rd  = data_rd;
  assign full     = ~&fifo_ff_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      ena_s <= '0;
      clk_s <= '0;
      dat_s <= '0;
    end else begin
      ena_s <= {ena_s[1:0], cmd_ena};
      clk_s <= {clk_s[1:0], cmd_clk};
      dat_s <= {dat_s[1:0], cmd_data};
    end
  end

  assign rise = ena_s[1] && clk_s[1] && !clk_s[2];
  assign fall = ena_s[2] && !ena_s[1];

  // Adds byte b to the word buffer; returns the updated buffer.
  function automatic cmd_word_t add_seg(cmd_word_t w, logic [1:0] n, logic [7:0] b, logic eop);
    cmd_word_t r = w;
    r[2 - n] = '{eop: eop, data: b};
    return r;
  endfunction

  always_ff @(posedge clk) begin
    cmd_word_t  nw;
    logic [1:0] nc;
    logic       flush;
    if (irst) begin
      sh       <= '0;
      bitcnt   <= '0;
      pend_v   <= 1'b0;
      pend_b   <= '0;
      wbuf     <= '0;
      wcnt     <= '0;
      biterr_n <= 1'b1;
      ovr_n    <= 1'b1;
      irq_n    <= 1'b1;
      fifo_wr  <= 1'b0;
      fifo_din <= '0;
    end else begin
      nw    = wbuf;
      nc    = wcnt;
      flush = 1'b0;
      fifo_wr <= 1'b0;

      if (ctl_wr) begin
        if (!ctl_wdata[CMD_BITERR]) biterr_n <= 1'b1;
        if (!ctl_wdata[CMD_IRQ])    irq_n    <= 1'b1;
        if (!ctl_wdata[CMD_OVR])    ovr_n    <= 1'b1;
      end

      if (rise) begin
        sh     <= {sh[5:0], dat_s[1]};
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == 3'd7) begin
          if (pend_v) begin
            nw = add_seg(nw, nc, pend_b, 1'b0);
            nc = nc + 1'b1;
          end
          pend_b <= {sh, dat_s[1]};
          pend_v <= 1'b1;
        end
      end else if (fall) begin
        if (pend_v) begin
          nw = add_seg(nw, nc, pend_b, 1'b1);
          nc = nc + 1'b1;
        end
        flush  = (nc != 2'd0);
        if (bitcnt != 3'd0) biterr_n <= 1'b0;
        irq_n  <= 1'b0;
        bitcnt <= '0;
        pend_v <= 1'b0;
      end

      if (nc == 2'd3 || flush) begin
        if (full) ovr_n <= 1'b0;
        else begin
          fifo_wr  <= 1'b1;
          fifo_din <= nw;
        end
        wbuf <= '0;
        wcnt <= '0;
      end else begin
        wbuf <= nw;
        wcnt <= nc;
      end
    end
  end

  always_comb begin
    stat             = '0;
    stat[CMD_BITERR] = biterr_n;
    stat[CMD_HF]     = |fifo_hf_n;
    stat[CMD_IRQ]    = irq_n;
    stat[CMD_OVR]    = ovr_n;
    stat[CMD_EF]     = |fifo_ef_n;
    stat[CMD_FF]     = |fifo_ff_n;
    stat[CMD_ENA]    = ena_s[1];
  end

endmodule
