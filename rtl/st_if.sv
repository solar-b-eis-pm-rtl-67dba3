// st_if: status interface, sends status packets to the mission data
// processor (MDP).
//
// Software writes the packet a byte at a time to the status FIFO (port
// 0xC0 0005, byte on PMD[23:16]) and then writes 0 to ~ST_GO (PMD47 of port
// 0xC0 0004).  The interface raises ST_ENA, takes the bytes from the FIFO one
// by one and shifts each out on st_clk/st_data (see ser_tx for the bit
// format).  When the FIFO is empty and the last bit has gone, ST_ENA falls
// and ~ST_GO returns to 1 by itself.  No interrupt is raised: a status
// packet only ever answers a command.  Writing 0 to ~RST (PMD42) empties the
// FIFO and stops the interface.  stat is the status byte on PMD[47:40]:
// {~ST_GO, 0, 0, 0, 0, ~EF, ~FF, ST_ENA}.  The FIFO is an external 4k x 9
// part reached through the fifo_* ports; only its low 8 bits are used.
// Register layout and behaviour follow the board; the serial format is this
// design's choice.
module st_if
  import scproc_pkg::*;
#(
  parameter int unsigned BIT_HALF = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ctl_wr,
  input  logic [7:0]        ctl_wdata,
  input  logic              data_wr,
  input  logic [7:0]        data_wdata,
  output logic [7:0]        stat,
  // status FIFO
  output logic              fifo_rst,
  output logic              fifo_wr,
  output logic [FIFO_W-1:0] fifo_din,
  output logic              fifo_rd,
  input  logic [FIFO_W-1:0] fifo_dout,
  input  logic              fifo_ef_n,
  input  logic              fifo_ff_n,
  // link to the MDP
  output logic              st_ena,
  output logic              st_clk,
  output logic              st_data
);
  typedef enum logic [0:0] {S_IDLE, S_SEND} state_e;

  state_e state;
  logic   go, soft_rst, irst;
  logic   tx_busy, tx_done;

  assign soft_rst = ctl_wr && !ctl_wdata[ST_RST];
  assign irst     = rst || soft_rst;
  assign fifo_rst = irst;
  assign fifo_wr  = data_wr;
  assign fifo_din = {1'b0, data_wdata};

  // take the next byte whenever the transmitter is free
  assign fifo_rd = !irst && fifo_ef_n && !tx_busy &&
                   ((state == S_IDLE && go) || state == S_SEND);

  always_ff @(posedge clk) begin
    if (irst) begin
      state  <= S_IDLE;
      go     <= 1'b0;
      st_ena <= 1'b0;
    end else begin
      if (ctl_wr && !ctl_wdata[ST_GO]) go <= 1'b1;
      unique case (state)
        S_IDLE: if (go) begin
          if (fifo_ef_n) begin
            state  <= S_SEND;
            st_ena <= 1'b1;
          end else begin
            go <= 1'b0;  // nothing to send
          end
        end
        S_SEND: if (!tx_busy && !fifo_ef_n) begin
          state  <= S_IDLE;
          st_ena <= 1'b0;
          go     <= 1'b0;
        end
      endcase
    end
  end

  ser_tx #(.WIDTH(8), .BIT_HALF(BIT_HALF)) u_tx (
    .clk, .rst(irst), .load(fifo_rd), .din(fifo_dout[7:0]),
    .busy(tx_busy), .done(tx_done), .sclk(st_clk), .sdata(st_data)
  );

  always_comb begin
    stat         = '0;
    stat[ST_GO]  = !go;
    stat[ST_EF]  = fifo_ef_n;
    stat[ST_FF]  = fifo_ff_n;
    stat[ST_ENA] = st_ena;
  end

endmodule
