// twib_ctl: the SC_PROC board's control FPGA (Time, Watchdog, Interfaces and
// Boot control).
//
// It holds every I/O port the DSP reaches at 0xC0 000x, the three serial
// links to the mission data processor, spacecraft time, the watchdog, the
// reset circuit and the boot controller, and routes the four interrupts:
//   ~IRQ3 command packet received (cmd_if)     ~IRQ2 MHC UART (input)
//   ~IRQ1 ROE UART (input)                     ~IRQ0 mission data sent (md_if)
// The six interface FIFOs are separate parts on the board and are reached
// through the cmd_fifo_*, st_fifo_* and md_fifo_* ports.
//
// DSP bus: pm_rd and pm_wr are one-clock strobes in the board clock domain,
// qualified by ~PMS1 and the address; io_decode turns them into per-port
// strobes.  pm_rdata is combinational in the cycle of pm_rd and is zero
// except for the port read.  Status/control registers sit on PMD[47:40],
// spacecraft time on PMD[47:16], command FIFO words on PMD[47:21], status
// bytes on PMD[23:16] and mission data words on PMD[31:16].  A write to port
// 8 or 9 pulses ~OD0 or ~OD1 for one clock to latch PMD[31:16] or PMD[47:32]
// on the test port.
//
// Resets: por (power-on) clears the watchdog register and the 1.9 ms time
// base; sys_rst (power-on or watchdog trip) clears everything else and
// restarts the boot copy, during which dsp_rst_n is low and boot_busy tells
// the board to hand the program bus to the boot_* signals.
// The port map, flags and interrupt routing follow the board; the strobe
// timing of the DSP bus is this design's choice.
module twib_ctl
  import scproc_pkg::*;
#(
  parameter int unsigned TICK_DIV    = 38000,
  parameter int unsigned WD_TC_SHORT = 4096,
  parameter int unsigned WD_TC_LONG  = 8192,
  parameter int unsigned RST_STRETCH = 16,
  parameter int unsigned ST_BIT_HALF = 10,
  parameter int unsigned MD_BIT_HALF = 10,
  parameter int unsigned BOOT_WORDS  = 256,
  parameter int unsigned PROM_ACC    = 6
) (
  input  logic                   clk,
  input  logic                   por_n,
  input  logic                   v_fail_n,
  input  logic                   dc_rst_req,
  // DSP program-memory bus
  input  logic                   pms1_n,
  input  logic [PMA_W-1:0]       pm_addr,
  input  logic [PMD_W-1:0]       pm_wdata,
  input  logic                   pm_rd,
  input  logic                   pm_wr,
  output logic [PMD_W-1:0]       pm_rdata,
  output logic                   dsp_rst_n,
  output logic [3:0]             irq_n,
  input  logic                   mhc_irq_n,
  input  logic                   roe_irq_n,
  // selects for the other cards and the PROM
  output logic                   cm_sel_n,
  output logic                   mon_sel_n,
  output logic                   prom_sel_n,
  // test port
  output logic                   od0_n,
  output logic                   od1_n,
  output logic                   wrm_rst_n,
  // boot copy
  output logic                   boot_busy,
  output logic [14:0]            boot_prom_addr,
  output logic                   boot_prom_rd,
  input  logic [7:0]             boot_prom_data,
  output logic [16:0]            boot_pram_addr,
  output logic [47:0]            boot_pram_wdata,
  output logic                   boot_pram_wr,
  // MDP links
  input  logic                   cmd_ena,
  input  logic                   cmd_clk,
  input  logic                   cmd_data,
  output logic                   st_ena,
  output logic                   st_clk,
  output logic                   st_data,
  input  logic                   md_busy,
  output logic                   md_ena,
  output logic                   md_clk,
  output logic                   md_data,
  // command FIFO (3 parts)
  output logic                   cmd_fifo_rst,
  output logic                   cmd_fifo_wr,
  output cmd_word_t              cmd_fifo_din,
  output logic                   cmd_fifo_rd,
  input  cmd_word_t              cmd_fifo_dout,
  input  logic [2:0]             cmd_fifo_ef_n,
  input  logic [2:0]             cmd_fifo_ff_n,
  input  logic [2:0]             cmd_fifo_hf_n,
  // status FIFO (1 part)
  output logic                   st_fifo_rst,
  output logic                   st_fifo_wr,
  output logic [FIFO_W-1:0]      st_fifo_din,
  output logic                   st_fifo_rd,
  input  logic [FIFO_W-1:0]      st_fifo_dout,
  input  logic                   st_fifo_ef_n,
  input  logic                   st_fifo_ff_n,
  // mission data FIFO (2 parts)
  output logic                   md_fifo_rst,
  output logic                   md_fifo_wr,
  output logic [1:0][FIFO_W-1:0] md_fifo_din,
  output logic                   md_fifo_rd,
  input  logic [1:0][FIFO_W-1:0] md_fifo_dout,
  input  logic [1:0]             md_fifo_ef_n,
  input  logic [1:0]             md_fifo_ff_n
);
  logic        por, sys_rst, trip, tick;
  logic [15:0] rd_sel, wr_sel;
  logic [7:0]  wd_stat, cmd_stat, st_stat, md_stat;
  logic [7:0]  ctl_byte;
  logic [31:0] sc_time;
  logic        cmd_irq_n, md_irq_n;

  assign ctl_byte = pm_wdata[47:40];

  reset_ctl #(.STRETCH(RST_STRETCH)) u_rst (
    .clk, .por_n, .trip, .por, .sys_rst, .wrm_rst_n
  );

  tick_gen #(.DIV(TICK_DIV)) u_tick (.clk, .rst(por), .tick);

  io_decode u_dec (
    .pms1_n, .pm_addr, .pm_rd, .pm_wr, .rd_sel, .wr_sel,
    .cm_sel_n, .mon_sel_n, .prom_sel_n
  );

  sctime u_time (
    .clk, .rst(sys_rst), .tick, .load(wr_sel[PORT_SCTIME]),
    .load_val(pm_wdata[47:16]), .time_o(sc_time)
  );

  watchdog #(.TC_SHORT(WD_TC_SHORT), .TC_LONG(WD_TC_LONG)) u_wd (
    .clk, .por, .sys_rst, .tick, .ctl_wr(wr_sel[PORT_WD]), .ctl_wdata(ctl_byte),
    .stat(wd_stat), .v_fail_n, .dc_rst_req, .trip
  );

  cmd_if u_cmd (
    .clk, .rst(sys_rst), .cmd_ena, .cmd_clk, .cmd_data,
    .ctl_wr(wr_sel[PORT_CMD_CTL]), .ctl_wdata(ctl_byte), .data_rd(rd_sel[PORT_CMD_DAT]),
    .stat(cmd_stat), .fifo_rst(cmd_fifo_rst), .fifo_wr(cmd_fifo_wr), .fifo_din(cmd_fifo_din),
    .fifo_rd(cmd_fifo_rd), .fifo_ef_n(cmd_fifo_ef_n), .fifo_ff_n(cmd_fifo_ff_n),
    .fifo_hf_n(cmd_fifo_hf_n), .irq_n(cmd_irq_n)
  );

  st_if #(.BIT_HALF(ST_BIT_HALF)) u_st (
    .clk, .rst(sys_rst), .ctl_wr(wr_sel[PORT_ST_CTL]), .ctl_wdata(ctl_byte),
    .data_wr(wr_sel[PORT_ST_DAT]), .data_wdata(pm_wdata[23:16]), .stat(st_stat),
    .fifo_rst(st_fifo_rst), .fifo_wr(st_fifo_wr), .fifo_din(st_fifo_din), .fifo_rd(st_fifo_rd),
    .fifo_dout(st_fifo_dout), .fifo_ef_n(st_fifo_ef_n), .fifo_ff_n(st_fifo_ff_n),
    .st_ena, .st_clk, .st_data
  );

  md_if #(.BIT_HALF(MD_BIT_HALF)) u_md (
    .clk, .rst(sys_rst), .ctl_wr(wr_sel[PORT_MD_CTL]), .ctl_wdata(ctl_byte),
    .data_wr(wr_sel[PORT_MD_DAT]), .data_wdata(pm_wdata[31:16]), .stat(md_stat),
    .fifo_rst(md_fifo_rst), .fifo_wr(md_fifo_wr), .fifo_din(md_fifo_din), .fifo_rd(md_fifo_rd),
    .fifo_dout(md_fifo_dout), .fifo_ef_n(md_fifo_ef_n), .fifo_ff_n(md_fifo_ff_n),
    .md_busy, .md_ena, .md_clk, .md_data, .irq_n(md_irq_n)
  );

  boot_ctl #(.BOOT_WORDS(BOOT_WORDS), .PROM_ACC(PROM_ACC)) u_boot (
    .clk, .rst(sys_rst), .prom_addr(boot_prom_addr), .prom_rd(boot_prom_rd),
    .prom_data(boot_prom_data), .pram_addr(boot_pram_addr), .pram_wdata(boot_pram_wdata),
    .pram_wr(boot_pram_wr), .busy(boot_busy), .dsp_rst_n
  );

  // DSP bus rule: a single access is either a read or a write
  a_rd_wr_excl: assert property (@(posedge clk) disable iff (sys_rst) !(pm_rd && pm_wr));

  assign irq_n = {cmd_irq_n, mhc_irq_n, roe_irq_n, md_irq_n};
  assign od0_n = !wr_sel[PORT_OD0];
  assign od1_n = !wr_sel[PORT_OD1];

  // register read multiplexer
  always_comb begin
    pm_rdata = '0;
    unique case (1'b1)
      rd_sel[PORT_SCTIME]:  pm_rdata[47:16] = sc_time;
      rd_sel[PORT_WD]:      pm_rdata[47:40] = wd_stat;
      rd_sel[PORT_CMD_CTL]: pm_rdata[47:40] = cmd_stat;
      rd_sel[PORT_CMD_DAT]: pm_rdata[47:21] = cmd_fifo_dout;
      rd_sel[PORT_ST_CTL]:  pm_rdata[47:40] = st_stat;
      rd_sel[PORT_MD_CTL]:  pm_rdata[47:40] = md_stat;
      default: ;
    endcase
  end

endmodule
