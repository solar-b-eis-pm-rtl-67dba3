// md_if: mission data interface, sends mission data packets of 16-bit words
// to the mission data processor (MDP).
//
// The mission data FIFO is two external 4k x 9 FIFOs in width expansion:
// software writes 16-bit words to port 0xC0 0007 (PMD[31:16]); the low byte
// goes to FIFO 0 and the high byte to FIFO 1.  A packet may be longer than
// the FIFO, so it is sent as sub-packets.  For each sub-packet software fills
// the FIFO and writes 0 to ~GO (PMD41 of port 0xC0 0006), with ~EOP (PMD42)
// written 1 if more sub-packets follow and 0 for the last one.  ~EOP is a
// plain register bit rewritten by every control write.
//   - The first sub-packet starts only when the MDP's BUSY input is low; the
//     interface then raises MD_ENA and shifts the words out MSB first on
//     md_clk/md_data (see ser_tx for the bit format).
//   - When the FIFO runs empty and the last bit has gone, ~GO returns to 1.
//     If ~EOP is 1 the interface holds MD_ENA high and waits for the next ~GO;
//     if ~EOP is 0 MD_ENA falls, and that falling edge latches the interrupt
//     ~IRQ (PMD43, the DSP's ~IRQ0) until software writes 0 to ~ClrIrq.
// Writing 0 to ~RST (PMD47) empties the FIFOs and stops the interface.  stat
// is PMD[47:40]: {0, ~FF, ~EF, BSY, ~IRQ, ~EOP, ~GO, 0}; the flags of the two
// FIFOs are ORed as on the board.  The register layout and sub-packet scheme
// follow the board; checking BUSY only before the first sub-packet, the byte
// placement and the serial format are this design's choices.
module md_if
  import scproc_pkg::*;
#(
  parameter int unsigned BIT_HALF = 10
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ctl_wr,
  input  logic [7:0]             ctl_wdata,
  input  logic                   data_wr,
  input  logic [15:0]            data_wdata,
  output logic [7:0]             stat,
  // mission data FIFO, [0] = low byte, [1] = high byte
  output logic                   fifo_rst,
  output logic                   fifo_wr,
  output logic [1:0][FIFO_W-1:0] fifo_din,
  output logic                   fifo_rd,
  input  logic [1:0][FIFO_W-1:0] fifo_dout,
  input  logic [1:0]             fifo_ef_n,
  input  logic [1:0]             fifo_ff_n,
  // link to the MDP
  input  logic                   md_busy,
  output logic                   md_ena,
  output logic                   md_clk,
  output logic                   md_data,
  output logic                   irq_n
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_HOLD} state_e;

  state_e     state;
  logic       go, eop_n, soft_rst, irst;
  logic [1:0] busy_sync;
  logic       tx_busy, tx_done, have_data;

  assign soft_rst = ctl_wr && !ctl_wdata[MD_RST];
  assign irst     = rst || soft_rst;
  assign fifo_rst = irst;
  assign fifo_wr  = data_wr;
  assign fifo_din = {{1'b0, data_wdata[15:8]}, {1'b0, data_wdata[7:0]}};

  // ~EF of the pair is the OR of the two active-low flags
  assign have_data = &fifo_ef_n;
  assign fifo_rd   = !irst && state == S_SEND && have_data && !tx_busy;

  always_ff @(posedge clk) begin
    if (rst) busy_sync <= '0;
    else     busy_sync <= {busy_sync[0], md_busy};
  end

  always_ff @(posedge clk) begin
    if (irst) begin
      state  <= S_IDLE;
      go     <= 1'b0;
      eop_n  <= 1'b1;
      md_ena <= 1'b0;
      irq_n  <= 1'b1;
    end else begin
      if (ctl_wr) begin
        eop_n <= ctl_wdata[MD_EOP];
        if (!ctl_wdata[MD_GO])  go    <= 1'b1;
        if (!ctl_wdata[MD_IRQ]) irq_n <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (go && !busy_sync[1]) begin
          state  <= S_SEND;
          md_ena <= 1'b1;
        end
        S_SEND: if (!tx_busy && !have_data) begin
          go <= 1'b0;
          if (!eop_n) begin
            state  <= S_IDLE;
            md_ena <= 1'b0;
            irq_n  <= 1'b0;
          end else begin
            state <= S_HOLD;
          end
        end
        S_HOLD: if (go) state <= S_SEND;
        default: state <= S_IDLE;
      endcase
    end
  end

  ser_tx #(.WIDTH(16), .BIT_HALF(BIT_HALF)) u_tx (
    .clk, .rst(irst), .load(fifo_rd), .din({fifo_dout[1][7:0], fifo_dout[0][7:0]}),
    .busy(tx_busy), .done(tx_done), .sclk(md_clk), .sdata(md_data)
  );

  always_comb begin
    stat         = '0;
    stat[MD_FF]  = |fifo_ff_n;
    stat[MD_EF]  = |fifo_ef_n;
    stat[MD_BSY] = busy_sync[1];
    stat[MD_IRQ] = irq_n;
    stat[MD_EOP] = eop_n;
    stat[MD_GO]  = !go;
  end

endmodule
