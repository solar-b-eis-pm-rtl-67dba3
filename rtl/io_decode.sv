// io_decode: address decoder for program-memory bank 1 of the DSP.
//
// When the DSP selects bank 1 (~PMS1 low), PMA[23:21] chooses the target:
// 100 the camera/MHC control card, 101 the PSU monitor card, 110 the SC_PROC
// I/O ports and 111 the boot PROM.  Within the SC_PROC block PMA[3:0] picks
// one of sixteen ports and PMA[20:4] are ignored.  The decoder is purely
// combinational: rd_sel/wr_sel are one-hot copies of the DSP's read and write
// strobes, indexed by port number (see scproc_pkg::io_port_e), and the three
// card selects are active low for the whole access.  The address map is the
// board's; where its two tables differ on the I/O base (110 against 11x) the
// map that places the PROM at 111 is followed.
module io_decode
  import scproc_pkg::*;
(
  input  logic             pms1_n,
  input  logic [PMA_W-1:0] pm_addr,
  input  logic             pm_rd,
  input  logic             pm_wr,
  output logic [15:0]      rd_sel,
  output logic [15:0]      wr_sel,
  output logic             cm_sel_n,
  output logic             mon_sel_n,
  output logic             prom_sel_n
);
  logic [2:0] bank;
  logic       io_hit;

  assign bank = pm_addr[23:21];

  always_comb begin
    cm_sel_n   = !(!pms1_n && bank == BANK_CM_CTL);
    mon_sel_n  = !(!pms1_n && bank == BANK_MON);
    prom_sel_n = !(!pms1_n && bank == BANK_PROM);
    io_hit     = !pms1_n && bank == BANK_SC_IO;
    rd_sel     = '0;
    wr_sel     = '0;
    if (io_hit) begin
      rd_sel[pm_addr[3:0]] = pm_rd;
      wr_sel[pm_addr[3:0]] = pm_wr;
    end
  end

  // at most one port is strobed at a time
  always_comb begin
    a_one_port: assert final ($onehot0(rd_sel) && $onehot0(wr_sel));
  end

endmodule
