// tb_twib_ctl: checks the control FPGA on its own, with a 4-instruction boot
// loader, 8-deep FIFOs, a 50-clock time base and an 8/16-tick watchdog.
// Checked: the boot copy on its PROM/RAM ports and DSP reset release; the
// read multiplexer (every port returns its register in the right bit
// positions, unused and write-only ports and accesses without ~PMS1 return
// zero); FIFO data placement on the status and mission-data FIFO ports;
// ~OD0/~OD1; the four interrupt lines; and a watchdog trip that pulls
// ~WRM_RST and the DSP reset low and repeats the boot copy.
module tb_twib_ctl;
  import scproc_pkg::*;
  localparam int WORDS = 4, DEPTH = 8, TICK = 50;

  logic clk = 0, por_n = 0, v_fail_n = 1, dc_rst_req = 0;
  logic pms1_n = 1, pm_rd = 0, pm_wr = 0;
  logic [23:0] pm_addr = '0;
  logic [47:0] pm_wdata = '0, pm_rdata;
  logic dsp_rst_n, mhc_irq_n = 1, roe_irq_n = 1;
  logic [3:0] irq_n;
  logic cm_sel_n, mon_sel_n, prom_sel_n, od0_n, od1_n, wrm_rst_n;
  logic boot_busy, boot_prom_rd, boot_pram_wr;
  logic [14:0] boot_prom_addr;
  logic [7:0] boot_prom_data;
  logic [16:0] boot_pram_addr;
  logic [47:0] boot_pram_wdata;
  logic cmd_ena = 0, cmd_clk = 0, cmd_data = 0, st_ena, st_clk, st_data;
  logic md_busy = 0, md_ena, md_clk, md_data;
  logic cmd_fifo_rst, cmd_fifo_wr, cmd_fifo_rd;
  cmd_word_t cmd_fifo_din, cmd_fifo_dout;
  logic [2:0] cmd_fifo_ef_n, cmd_fifo_ff_n, cmd_fifo_hf_n;
  logic st_fifo_rst, st_fifo_wr, st_fifo_rd, st_fifo_ef_n, st_fifo_ff_n, st_fifo_hf_n;
  logic [8:0] st_fifo_din, st_fifo_dout;
  logic md_fifo_rst, md_fifo_wr, md_fifo_rd;
  logic [1:0][8:0] md_fifo_din, md_fifo_dout;
  logic [1:0] md_fifo_ef_n, md_fifo_ff_n, md_fifo_hf_n;
  int checks = 0, failures = 0;
  int boot_writes = 0;

  twib_ctl #(.TICK_DIV(TICK), .WD_TC_SHORT(8), .WD_TC_LONG(16), .ST_BIT_HALF(2),
             .MD_BIT_HALF(2), .BOOT_WORDS(WORDS)) dut (.*);

  for (genvar i = 0; i < 3; i++) begin : g_c
    fifo_idt7204 #(.DEPTH(DEPTH)) u_f (.clk, .rst(cmd_fifo_rst), .wr(cmd_fifo_wr),
      .din(cmd_fifo_din[i]), .rd(cmd_fifo_rd), .dout(cmd_fifo_dout[i]),
      .ef_n(cmd_fifo_ef_n[i]), .ff_n(cmd_fifo_ff_n[i]), .hf_n(cmd_fifo_hf_n[i]));
  end
  fifo_idt7204 #(.DEPTH(DEPTH)) u_sf (.clk, .rst(st_fifo_rst), .wr(st_fifo_wr), .din(st_fifo_din),
    .rd(st_fifo_rd), .dout(st_fifo_dout), .ef_n(st_fifo_ef_n), .ff_n(st_fifo_ff_n), .hf_n(st_fifo_hf_n));
  for (genvar i = 0; i < 2; i++) begin : g_m
    fifo_idt7204 #(.DEPTH(DEPTH)) u_f (.clk, .rst(md_fifo_rst), .wr(md_fifo_wr),
      .din(md_fifo_din[i]), .rd(md_fifo_rd), .dout(md_fifo_dout[i]),
      .ef_n(md_fifo_ef_n[i]), .ff_n(md_fifo_ff_n[i]), .hf_n(md_fifo_hf_n[i]));
  end

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign boot_prom_data = 8'(boot_prom_addr * 3 + 1);
  always @(posedge clk) if (boot_pram_wr) begin
    logic [47:0] e;
    for (int k = 0; k < 6; k++) e = {e[39:0], 8'((6 * int'(boot_pram_addr) + k) * 3 + 1)};
    check(boot_pram_wdata == e && !dsp_rst_n && boot_busy, $sformatf("boot word %0d", boot_pram_addr));
    boot_writes++;
  end

  task automatic io_wr(input logic [23:0] a, input logic [47:0] d);
    @(negedge clk); pms1_n = 0; pm_addr = a; pm_wdata = d; pm_wr = 1;
    @(negedge clk); pms1_n = 1; pm_wr = 0;
  endtask

  task automatic io_rd(input logic [23:0] a, output logic [47:0] d, input bit sel = 1);
    @(negedge clk); pms1_n = !sel; pm_addr = a; pm_rd = 1;
    #1 d = pm_rdata;
    @(negedge clk); pms1_n = 1; pm_rd = 0;
  endtask

  task automatic wait_boot();
    int t;
    boot_writes = 0;
    t = 0;
    while (!dsp_rst_n && t < 2000) begin @(negedge clk); t++; end
    check(dsp_rst_n && !boot_busy && boot_writes == WORDS, $sformatf("boot copied %0d words", boot_writes));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] d;
    repeat (3) @(negedge clk);
    #1 check(!dsp_rst_n && !wrm_rst_n, "reset at power-on");
    por_n = 1;
    wait_boot();
    // read multiplexer
    io_rd(24'hC0_0001, d); check(d == {8'hE8, 40'h0}, $sformatf("WD status %h", d));
    io_rd(24'hC0_0002, d); check(d == {8'h7A, 40'h0}, $sformatf("CMD status %h", d));
    io_rd(24'hC0_0003, d); check(d[20:0] == 0, "CMD data low bits zero");
    io_rd(24'hC0_0004, d); check(d == {8'h82, 40'h0}, $sformatf("ST status %h", d));
    io_rd(24'hC0_0006, d); check(d == {8'h4E, 40'h0}, $sformatf("MD status %h", d));
    for (int p = 5; p < 16; p++) if (p != 6) begin
      io_rd({3'b110, 17'h0, 4'(p)}, d); check(d == 0, $sformatf("port %0d reads zero", p));
    end
    io_rd(24'hC0_0001, d, 0); check(d == 0, "no read without ~PMS1");
    io_rd(24'hE0_0001, d); check(d == 0 && prom_sel_n, "PROM space is not an I/O port");
    io_wr(24'hCF_FFF0, {32'hCAFE_F00D, 16'h1234});
    io_rd(24'hC0_0000, d);
    check(d[15:0] == 0 && (d[47:16] == 32'hCAFE_F00D || d[47:16] == 32'hCAFE_F00E), $sformatf("time %h", d));
    begin
      logic [31:0] t0;
      t0 = d[47:16];
      repeat (4 * TICK - 2) @(negedge clk);
      io_rd(24'hC0_0000, d); check(d[47:16] - t0 == 4, $sformatf("time advanced by %0d", d[47:16] - t0));
    end
    // FIFO data placement
    @(negedge clk); pms1_n = 0; pm_addr = 24'hC0_0005; pm_wdata = 48'hFFFF_FF5A_FFFF; pm_wr = 1;
    #1 check(st_fifo_wr && st_fifo_din == 9'h05A, "status byte from PMD[23:16]");
    pm_addr = 24'hC0_0007; pm_wdata = 48'hFFFF_BEEF_FFFF;
    #1 check(md_fifo_wr && md_fifo_din[1] == 9'h0BE && md_fifo_din[0] == 9'h0EF, "mission word from PMD[31:16]");
    pm_addr = 24'hC0_0008; pm_wdata = 48'h0;
    #1 check(!od0_n && od1_n, "~OD0");
    pm_addr = 24'hC0_0009;
    #1 check(od0_n && !od1_n, "~OD1");
    @(negedge clk); pm_wr = 0; pms1_n = 1;
    #1 check(od0_n && od1_n, "OD strobes end");
    // interrupt lines: send the loaded mission word as a last sub-packet
    io_wr(24'hC0_0006, {8'b1111_1001, 40'h0});
    repeat (100) @(negedge clk);
    check(irq_n == 4'b1110, $sformatf("~IRQ0 from MD_IF, irq %b", irq_n));
    io_wr(24'hC0_0006, {8'b1111_0111, 40'h0});
    // an empty command packet still raises ~IRQ3
    cmd_ena = 1; repeat (6) @(negedge clk); cmd_ena = 0; repeat (6) @(negedge clk);
    check(irq_n == 4'b0111, $sformatf("~IRQ3 from CMD_IF, irq %b", irq_n));
    io_wr(24'hC0_0002, {8'b1110_1111, 40'h0});
    mhc_irq_n = 0; #1 check(irq_n == 4'b1011, "~IRQ2 from MHC");
    mhc_irq_n = 1; roe_irq_n = 0; #1 check(irq_n == 4'b1101, "~IRQ1 from ROE");
    roe_irq_n = 1;
    // watchdog trip reboots
    io_wr(24'hC0_0001, {8'b1011_1111, 40'h0});
    begin
      int t;
      t = 0;
      while (dsp_rst_n && t < 20 * TICK) begin @(negedge clk); t++; end
      check(!dsp_rst_n && !wrm_rst_n, "watchdog trip resets the DSP");
      check(t >= 7 * TICK && t <= 8 * TICK + 2, $sformatf("trip after %0d clocks", t));
    end
    wait_boot();
    io_rd(24'hC0_0001, d); check(d[47:40] == 8'h28, $sformatf("WD status after trip %h", d[47:40]));
    io_rd(24'hC0_0000, d); check(d[47:16] < 6, "time reset by warm reboot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
