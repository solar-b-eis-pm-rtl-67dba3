// sc_proc_top: the logic of the SC_PROC processor board of the EIS
// instrument control unit: the TWIB_CTL control FPGA, the six 4k x 9 FIFOs
// that buffer its links to the mission data processor (MDP), and the
// program-bus multiplexer used during boot.
//
// The DSP (a 21020 at 20 MHz), its program, data and working RAMs and the
// boot PROM are separate parts; their buses are ports here.  While the boot
// controller runs, the DSP is held in reset and the board program bus
// (mem_*) carries the boot copy: PROM reads at 0xE0 0000 + byte address with
// prom_cs_n low, and program-RAM writes at word addresses 0x00 0000 up with
// mem_pms0_n low.  Afterwards the bus follows the DSP's own signals and
// prom_cs_n follows the decoded PROM select.
//
// FIFOs: command = three parts written and read in parallel (27-bit words);
// status = one part (8 bits used); mission data = two parts in width
// expansion (16 bits).  The DSP bus strobes pm_rd/pm_wr are one clock wide
// in the board clock domain; pm_rdata returns I/O register data in the same
// clock.  The parameters are passed to twib_ctl (time base, watchdog
// time-outs, reset stretch, serial bit rates, boot length and PROM access
// time) and to the FIFOs (FIFO_DEPTH).  The board structure follows the
// design; the single clock domain and strobe timing are this design's
// choices.
module sc_proc_top
  import scproc_pkg::*;
#(
  parameter int unsigned TICK_DIV    = 38000,
  parameter int unsigned WD_TC_SHORT = 4096,
  parameter int unsigned WD_TC_LONG  = 8192,
  parameter int unsigned RST_STRETCH = 16,
  parameter int unsigned ST_BIT_HALF = 10,
  parameter int unsigned MD_BIT_HALF = 10,
  parameter int unsigned BOOT_WORDS  = 256,
  parameter int unsigned PROM_ACC    = 6,
  parameter int unsigned FIFO_DEPTH  = 4096
) (
  input  logic             clk,
  input  logic             por_n,
  input  logic             v_fail_n,
  input  logic             dc_rst_req,
  // DSP side
  input  logic             pms0_n,
  input  logic             pms1_n,
  input  logic [PMA_W-1:0] pm_addr,
  input  logic [PMD_W-1:0] pm_wdata,
  input  logic             pm_rd,
  input  logic             pm_wr,
  output logic [PMD_W-1:0] pm_rdata,
  output logic             dsp_rst_n,
  output logic [3:0]       irq_n,
  input  logic             mhc_irq_n,
  input  logic             roe_irq_n,
  // board program bus to program RAM and PROM
  output logic [PMA_W-1:0] mem_addr,
  output logic [PMD_W-1:0] mem_wdata,
  output logic             mem_rd,
  output logic             mem_wr,
  output logic             mem_pms0_n,
  output logic             prom_cs_n,
  input  logic [7:0]       prom_rdata,
  // other cards
  output logic             cm_sel_n,
  output logic             mon_sel_n,
  // test port
  output logic [31:0]      od_data,
  output logic             od0_n,
  output logic             od1_n,
  output logic             wrm_rst_n,
  // MDP links
  input  logic             cmd_ena,
  input  logic             cmd_clk,
  input  logic             cmd_data,
  output logic             st_ena,
  output logic             st_clk,
  output logic             st_data,
  input  logic             md_busy,
  output logic             md_ena,
  output logic             md_clk,
  output logic             md_data
);
  logic                   boot_busy, boot_prom_rd, boot_pram_wr, prom_sel_n;
  logic [14:0]            boot_prom_addr;
  logic [16:0]            boot_pram_addr;
  logic [47:0]            boot_pram_wdata;

  logic                   cmd_fifo_rst, cmd_fifo_wr, cmd_fifo_rd;
  cmd_word_t              cmd_fifo_din, cmd_fifo_dout;
  logic [2:0]             cmd_fifo_ef_n, cmd_fifo_ff_n, cmd_fifo_hf_n;
  logic                   st_fifo_rst, st_fifo_wr, st_fifo_rd, st_fifo_ef_n, st_fifo_ff_n;
  logic                   st_fifo_hf_n;
  logic [FIFO_W-1:0]      st_fifo_din, st_fifo_dout;
  logic                   md_fifo_rst, md_fifo_wr, md_fifo_rd;
  logic [1:0][FIFO_W-1:0] md_fifo_din, md_fifo_dout;
  logic [1:0]             md_fifo_ef_n, md_fifo_ff_n, md_fifo_hf_n;

  twib_ctl #(
    .TICK_DIV(TICK_DIV), .WD_TC_SHORT(WD_TC_SHORT), .WD_TC_LONG(WD_TC_LONG),
    .RST_STRETCH(RST_STRETCH), .ST_BIT_HALF(ST_BIT_HALF), .MD_BIT_HALF(MD_BIT_HALF),
    .BOOT_WORDS(BOOT_WORDS), .PROM_ACC(PROM_ACC)
  ) u_twib (
    .clk, .por_n, .v_fail_n, .dc_rst_req,
    .pms1_n, .pm_addr, .pm_wdata, .pm_rd(pm_rd && !boot_busy), .pm_wr(pm_wr && !boot_busy),
    .pm_rdata, .dsp_rst_n, .irq_n, .mhc_irq_n, .roe_irq_n,
    .cm_sel_n, .mon_sel_n, .prom_sel_n, .od0_n, .od1_n, .wrm_rst_n,
    .boot_busy, .boot_prom_addr, .boot_prom_rd, .boot_prom_data(prom_rdata),
    .boot_pram_addr, .boot_pram_wdata, .boot_pram_wr,
    .cmd_ena, .cmd_clk, .cmd_data, .st_ena, .st_clk, .st_data,
    .md_busy, .md_ena, .md_clk, .md_data,
    .cmd_fifo_rst, .cmd_fifo_wr, .cmd_fifo_din, .cmd_fifo_rd, .cmd_fifo_dout,
    .cmd_fifo_ef_n, .cmd_fifo_ff_n, .cmd_fifo_hf_n,
    .st_fifo_rst, .st_fifo_wr, .st_fifo_din, .st_fifo_rd, .st_fifo_dout,
    .st_fifo_ef_n, .st_fifo_ff_n,
    .md_fifo_rst, .md_fifo_wr, .md_fifo_din, .md_fifo_rd, .md_fifo_dout,
    .md_fifo_ef_n, .md_fifo_ff_n
  );

  // command FIFO: three parts side by side
  for (genvar i = 0; i < 3; i++) begin : g_cmd_fifo
    fifo_idt7204 #(.DEPTH(FIFO_DEPTH), .WIDTH(FIFO_W)) u_fifo (
      .clk, .rst(cmd_fifo_rst), .wr(cmd_fifo_wr), .din(cmd_fifo_din[i]),
      .rd(cmd_fifo_rd), .dout(cmd_fifo_dout[i]),
      .ef_n(cmd_fifo_ef_n[i]), .ff_n(cmd_fifo_ff_n[i]), .hf_n(cmd_fifo_hf_n[i])
    );
  end

  // status FIFO: one part; its half-full flag is not used
  fifo_idt7204 #(.DEPTH(FIFO_DEPTH), .WIDTH(FIFO_W)) u_st_fifo (
    .clk, .rst(st_fifo_rst), .wr(st_fifo_wr), .din(st_fifo_din), .rd(st_fifo_rd),
    .dout(st_fifo_dout), .ef_n(st_fifo_ef_n), .ff_n(st_fifo_ff_n), .hf_n(st_fifo_hf_n)
  );

  // mission data FIFO: two parts in width expansion; half-full not used
  for (genvar i = 0; i < 2; i++) begin : g_md_fifo
    fifo_idt7204 #(.DEPTH(FIFO_DEPTH), .WIDTH(FIFO_W)) u_fifo (
      .clk, .rst(md_fifo_rst), .wr(md_fifo_wr), .din(md_fifo_din[i]),
      .rd(md_fifo_rd), .dout(md_fifo_dout[i]),
      .ef_n(md_fifo_ef_n[i]), .ff_n(md_fifo_ff_n[i]), .hf_n(md_fifo_hf_n[i])
    );
  end

  // board program bus: boot copy while the DSP is held in reset
  always_comb begin
    if (boot_busy) begin
      mem_addr   = boot_pram_wr ? {7'b0, boot_pram_addr} : {BANK_PROM, 6'b0, boot_prom_addr};
      mem_wdata  = boot_pram_wdata;
      mem_rd     = boot_prom_rd;
      mem_wr     = boot_pram_wr;
      mem_pms0_n = !boot_pram_wr;
      prom_cs_n  = !boot_prom_rd;
    end else begin
      mem_addr   = pm_addr;
      mem_wdata  = pm_wdata;
      mem_rd     = pm_rd;
      mem_wr     = pm_wr;
      mem_pms0_n = pms0_n;
      prom_cs_n  = prom_sel_n;
    end
  end

  assign od_data = pm_wdata[47:16];

endmodule
