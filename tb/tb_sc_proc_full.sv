// tb_sc_proc_full: the end-to-end test of tb_sc_proc_top run on the board
// logic with every parameter at its default: 1.9 ms time base (38000
// clocks), 7.78 s / 15.56 s watchdog (4096 / 8192 ticks), 256-instruction
// boot loader, 4k-deep FIFOs and 10-clock half bits.  It boots the board,
// loads and advances spacecraft time, receives command packets (including a
// full FIFO and overflow), sends a status packet and a two-sub-packet
// mission data packet (the first a full 4096 words), exercises the
// interrupts, test port and card selects, lets the watchdog run out once
// after one kick (about 16 s of board time, some 300 million clocks), and
// checks the warm reboots from the watchdog, ~V_FAIL and the direct reset
// command and a final power-on reset.  Each mechanism is counted as in
// tb_sc_proc_top.
module tb_sc_proc_full;
  import scproc_pkg::*;
  localparam int TICK_DIV = 38000, WD_S = 4096, WD_L = 8192, BH = 10, WORDS = 256, ACC = 6, DEPTH = 4096;
  localparam int KICKS = 1, LIMIT = 400_000_000, WAIT = 4_000_000;

  logic clk = 0, por_n = 0, v_fail_n = 1, dc_rst_req = 0;
  logic pms0_n = 1, pms1_n = 1, pm_rd = 0, pm_wr = 0;
  logic [23:0] pm_addr = '0;
  logic [47:0] pm_wdata = '0, pm_rdata;
  logic dsp_rst_n, mhc_irq_n = 1, roe_irq_n = 1;
  logic [3:0] irq_n;
  logic [23:0] mem_addr;
  logic [47:0] mem_wdata;
  logic mem_rd, mem_wr, mem_pms0_n, prom_cs_n;
  logic [7:0] prom_rdata;
  logic cm_sel_n, mon_sel_n, od0_n, od1_n, wrm_rst_n;
  logic [31:0] od_data;
  logic cmd_ena = 0, cmd_clk = 0, cmd_data = 0;
  logic st_ena, st_clk, st_data, md_busy = 0, md_ena, md_clk, md_data;

  int checks = 0, failures = 0;

  sc_proc_top dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    M_BOOT, M_TIME_LOAD, M_TIME_TICK, M_CMD_IRQ, M_BITERR, M_HALF_FULL, M_OVERFLOW,
    M_CMD_RST, M_ST_PACKET, M_MD_BUSY_WAIT, M_MD_HOLD, M_MD_IRQ, M_EXT_IRQ, M_OD,
    M_CARD_SEL, M_WD_TRIP, M_VFAIL, M_DC_RST, M_WARM_REBOOT, M_POR, M_NUM
  } mech_e;
  int mech [M_NUM];

  // ------------------------------------------------------------ memories
  logic [47:0] pram [int];
  int          pram_writes = 0;

  function automatic logic [7:0] prom_byte(int a);
    return 8'((a * 13) ^ (a >> 8) * 7 ^ 8'hA5);
  endfunction

  assign prom_rdata = prom_cs_n ? 8'h00 : prom_byte(int'(mem_addr[14:0]));

  always @(posedge clk) begin
    if (mem_wr && !mem_pms0_n) begin
      pram[int'(mem_addr[16:0])] = mem_wdata;
      pram_writes++;
    end
  end

  // ------------------------------------------------------------ DSP bus
  function automatic logic [23:0] io_addr(int port);
    return {BANK_SC_IO, 17'h1_2340, 4'(port)};  // middle bits are don't care
  endfunction

  task automatic io_wr(input int port, input logic [47:0] d);
    @(negedge clk); pms1_n = 0; pm_addr = io_addr(port); pm_wdata = d; pm_wr = 1;
    @(negedge clk); pms1_n = 1; pm_wr = 0;
  endtask

  task automatic io_rd(input int port, output logic [47:0] d);
    @(negedge clk); pms1_n = 0; pm_addr = io_addr(port); pm_rd = 1;
    #1 d = pm_rdata;
    @(negedge clk); pms1_n = 1; pm_rd = 0;
  endtask

  task automatic rd_stat(input int port, output logic [7:0] s);
    logic [47:0] d;
    io_rd(port, d);
    s = d[47:40];
  endtask

  task automatic wr_ctl(input int port, input logic [7:0] c);
    io_wr(port, {c, 40'h0});
  endtask

  // ------------------------------------------------------------ boot
  task automatic wait_boot(input string why);
    int cyc;
    pram.delete(); pram_writes = 0;
    cyc = 0;
    while (dsp_rst_n && cyc < 100) begin @(negedge clk); cyc++; end
    cyc = 0;
    while (!dsp_rst_n && cyc < WAIT) begin @(negedge clk); cyc++; end
    check(dsp_rst_n, {"DSP released after boot: ", why});
    check(pram_writes == WORDS, $sformatf("%s: %0d program words written", why, pram_writes));
    for (int w = 0; w < WORDS; w++) begin
      logic [47:0] e;
      for (int k = 0; k < 6; k++) e = {e[39:0], prom_byte(6 * w + k)};
      check(pram.exists(w) && pram[w] == e, $sformatf("%s: program word %0d", why, w));
    end
    mech[M_BOOT]++;
  endtask

  // ------------------------------------------------------------ CMD link
  task automatic send_bit(input bit b);
    cmd_data = b;
    repeat (3) @(negedge clk);
    cmd_clk = 1;
    repeat (3) @(negedge clk);
    cmd_clk = 0;
  endtask

  task automatic send_cmd(input byte unsigned b[], input int extra);
    @(negedge clk) cmd_ena = 1;
    repeat (3) @(negedge clk);
    foreach (b[i]) for (int k = 7; k >= 0; k--) send_bit(b[i][k]);
    for (int k = 0; k < extra; k++) send_bit(1'b0);
    repeat (3) @(negedge clk);
    cmd_ena = 0;
    repeat (8) @(negedge clk);
  endtask

  // Reads the command FIFO through the bus and compares with b[0..n-1].
  task automatic read_cmd(input byte unsigned b[], input int nwords);
    int i;
    i = 0;
    for (int w = 0; w < nwords; w++) begin
      logic [47:0] d;
      io_rd(PORT_CMD_DAT, d);
      for (int s = 0; s < 3; s++) begin
        logic [8:0] seg;
        seg = d[47 - 9*s -: 9];
        if (i < b.size()) begin
          check(seg == {1'(i == b.size() - 1), b[i]},
                $sformatf("command byte %0d got %h exp %h", i, seg, {1'(i == b.size() - 1), b[i]}));
          i++;
        end
      end
    end
  endtask

  // ------------------------------------------------------------ ST and MD links
  logic st_v, md_v;
  logic [7:0] st_w;
  logic [15:0] md_w;
  int st_bad, st_words, md_bad, md_words;
  byte unsigned st_exp[$];
  logic [15:0] md_exp[$];

  tb_ser_rx #(.WIDTH(8), .PERIOD(2 * BH)) u_st_rx (.clk, .ena(st_ena), .sclk(st_clk),
    .sdata(st_data), .valid(st_v), .word(st_w), .bad_period(st_bad), .words(st_words));
  tb_ser_rx #(.WIDTH(16), .PERIOD(2 * BH)) u_md_rx (.clk, .ena(md_ena), .sclk(md_clk),
    .sdata(md_data), .valid(md_v), .word(md_w), .bad_period(md_bad), .words(md_words));

  always @(posedge clk) begin
    if (st_v) begin
      byte unsigned e;
      e = st_exp.size() ? st_exp.pop_front() : 8'h00;
      check(st_w == e, $sformatf("status byte %h expected %h", st_w, e));
    end
    if (md_v) begin
      logic [15:0] e;
      e = md_exp.size() ? md_exp.pop_front() : 16'hDEAD;
      check(md_w == e, $sformatf("mission word %h expected %h", md_w, e));
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (LIMIT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] d;
    logic [7:0] s;
    byte unsigned b[];
    int t;

    foreach (mech[i]) mech[i] = 0;
    repeat (4) @(negedge clk);
    por_n = 1;
    wait_boot("power-on");
    rd_stat(PORT_WD, s);
    check(s == 8'hE8, $sformatf("watchdog power-on status %h", s));

    // ---- spacecraft time
    io_wr(PORT_SCTIME, {32'h1234_5678, 16'h0});
    io_rd(PORT_SCTIME, d);
    check(d[47:16] == 32'h1234_5678 && d[15:0] == 0, "time loads");
    mech[M_TIME_LOAD]++;
    repeat (3 * TICK_DIV) @(negedge clk);
    io_rd(PORT_SCTIME, d);
    check(d[47:16] == 32'h1234_567B, $sformatf("time after 3 ticks %h", d[47:16]));
    if (d[47:16] != 32'h1234_5678) mech[M_TIME_TICK]++;

    // ---- command packets
    b = new[7];
    foreach (b[i]) b[i] = 8'(8'h31 + i * 17);
    send_cmd(b, 0);
    check(!irq_n[3], "~IRQ3 after a command packet");
    if (!irq_n[3]) mech[M_CMD_IRQ]++;
    rd_stat(PORT_CMD_CTL, s);
    check(s[CMD_EF] && !s[CMD_IRQ] && s[CMD_BITERR], $sformatf("command status %h", s));
    read_cmd(b, 3);
    rd_stat(PORT_CMD_CTL, s);
    check(!s[CMD_EF], "command FIFO empty after reading");
    wr_ctl(PORT_CMD_CTL, 8'b1110_1111);
    check(irq_n[3], "~IRQ3 cleared");

    b = new[2]; b[0] = 8'hC3; b[1] = 8'h3C;
    send_cmd(b, 5);
    rd_stat(PORT_CMD_CTL, s);
    check(!s[CMD_BITERR], "bit error");
    if (!s[CMD_BITERR]) mech[M_BITERR]++;
    read_cmd(b, 1);
    wr_ctl(PORT_CMD_CTL, 8'b1010_1111);

    b = new[3 * (DEPTH + 2)];
    foreach (b[i]) b[i] = 8'(i * 7 + 1);
    fork
      begin
        send_cmd(b, 0);
      end
      begin
        // watch half-full rise during reception
        t = 0;
        while (t < WAIT * 4) begin
          @(negedge clk); t++;
          if (dut.u_twib.u_cmd.stat[CMD_HF] == 0) begin mech[M_HALF_FULL]++; break; end
        end
      end
    join
    rd_stat(PORT_CMD_CTL, s);
    check(!s[CMD_OVR] && !s[CMD_FF] && !s[CMD_HF], $sformatf("overflow status %h", s));
    if (!s[CMD_OVR]) mech[M_OVERFLOW]++;
    read_cmd(b, 1);  // first word intact
    wr_ctl(PORT_CMD_CTL, 8'b1110_1011);  // ~RST
    rd_stat(PORT_CMD_CTL, s);
    check(!s[CMD_EF] && s[CMD_OVR] && s[CMD_IRQ], "command interface reset");
    if (!s[CMD_EF] && s[CMD_OVR]) mech[M_CMD_RST]++;

    // ---- status packet
    for (int i = 0; i < 6; i++) begin
      io_wr(PORT_ST_DAT, {24'hFFFFFF, 8'(8'hA0 + i), 16'hFFFF});
      st_exp.push_back(8'(8'hA0 + i));
    end
    wr_ctl(PORT_ST_CTL, 8'b0111_1111);
    t = 0;
    do begin rd_stat(PORT_ST_CTL, s); t++; end while (!s[ST_GO] && t < WAIT);
    repeat (4 * BH + 4) @(negedge clk);
    check(st_exp.size() == 0 && st_words == 6 && !st_ena, "status packet sent");
    if (st_words == 6) mech[M_ST_PACKET]++;

    // ---- mission data: two sub-packets, BUSY at first
    md_busy = 1;
    for (int i = 0; i < DEPTH; i++) begin
      io_wr(PORT_MD_DAT, {16'h0, 16'(16'h1000 + i * 3), 16'h0});
      md_exp.push_back(16'(16'h1000 + i * 3));
    end
    rd_stat(PORT_MD_CTL, s);
    check(!s[MD_FF], "mission FIFO full");
    wr_ctl(PORT_MD_CTL, 8'b1111_1101);  // ~GO, more sub-packets follow
    repeat (40) @(negedge clk);
    rd_stat(PORT_MD_CTL, s);
    check(!md_ena && s[MD_BSY] && !s[MD_GO], "waiting for BUSY");
    if (!md_ena && s[MD_BSY]) mech[M_MD_BUSY_WAIT]++;
    md_busy = 0;
    t = 0;
    do begin rd_stat(PORT_MD_CTL, s); t++; end while (!s[MD_GO] && t < WAIT);
    repeat (5) @(negedge clk);
    check(md_ena && irq_n[0] && md_exp.size() == 0, "held between sub-packets");
    if (md_ena && irq_n[0]) mech[M_MD_HOLD]++;
    for (int i = 0; i < 5; i++) begin
      io_wr(PORT_MD_DAT, {16'h0, 16'(16'h2000 + i), 16'h0});
      md_exp.push_back(16'(16'h2000 + i));
    end
    wr_ctl(PORT_MD_CTL, 8'b1111_1001);  // ~GO, last sub-packet
    t = 0;
    while (irq_n[0] && t < WAIT) begin @(negedge clk); t++; end
    check(!irq_n[0] && !md_ena && md_exp.size() == 0 && md_words == DEPTH + 5, "mission packet sent, ~IRQ0");
    if (!irq_n[0]) mech[M_MD_IRQ]++;
    wr_ctl(PORT_MD_CTL, 8'b1111_0111);
    check(irq_n[0], "~IRQ0 cleared");

    // ---- pass-through interrupts, test port, card selects
    mhc_irq_n = 0; #1 check(irq_n == 4'b1011, "MHC interrupt on ~IRQ2");
    mhc_irq_n = 1; roe_irq_n = 0; #1 check(irq_n == 4'b1101, "ROE interrupt on ~IRQ1");
    if (irq_n == 4'b1101) mech[M_EXT_IRQ]++;
    roe_irq_n = 1; #1 check(irq_n == 4'b1111, "no interrupt pending");
    @(negedge clk); pms1_n = 0; pm_addr = io_addr(PORT_OD0); pm_wdata = 48'hABCD_1234_0000; pm_wr = 1;
    #1 check(!od0_n && od1_n && od_data == 32'hABCD_1234, "~OD0 strobe");
    @(negedge clk); pm_addr = io_addr(PORT_OD1);
    #1 check(od0_n && !od1_n, "~OD1 strobe");
    if (od0_n && !od1_n) mech[M_OD]++;
    @(negedge clk); pm_wr = 0; pm_addr = 24'h80_0003; pm_rd = 1;
    #1 check(!cm_sel_n && mon_sel_n && prom_cs_n, "CM_Ctl select");
    @(negedge clk); pm_addr = 24'hA0_0001;
    #1 check(cm_sel_n && !mon_sel_n, "MON select");
    @(negedge clk); pm_addr = 24'hE0_0006;
    #1 check(!prom_cs_n && mem_rd && prom_rdata == prom_byte(6), "PROM read by the DSP");
    if (!prom_cs_n) mech[M_CARD_SEL]++;
    @(negedge clk); pm_rd = 0; pms1_n = 1;

    // ---- watchdog: kicked, then left to trip
    wr_ctl(PORT_WD, 8'b1011_1111);
    for (int k = 0; k < KICKS; k++) begin
      repeat ((WD_S - 2) * TICK_DIV) @(negedge clk);
      check(dsp_rst_n, "kicked watchdog does not trip");
      wr_ctl(PORT_WD, 8'b1010_1111);
    end
    io_wr(PORT_SCTIME, {32'h0000_0100, 16'h0});
    t = 2;  // clocks since the last kick
    while (dsp_rst_n && t < (WD_S + 2) * TICK_DIV) begin @(negedge clk); t++; end
    check(!dsp_rst_n, "unkicked watchdog trips");
    // the time-out is WD_S ticks, the first of which may come at any point
    check(t > (WD_S - 1) * TICK_DIV && t <= WD_S * TICK_DIV + 4,
          $sformatf("watchdog tripped %0d clocks after the kick, time-out %0d", t, WD_S * TICK_DIV));
    if (!dsp_rst_n) mech[M_WD_TRIP]++;
    check(!wrm_rst_n, "~WRM_RST during warm reboot");
    wait_boot("watchdog trip");
    mech[M_WARM_REBOOT]++;
    rd_stat(PORT_WD, s);
    check(s == 8'h28, $sformatf("watchdog status after trip %h", s));
    io_rd(PORT_SCTIME, d);
    check(d[47:16] < 32'h100, "time cleared by the warm reboot");
    wr_ctl(PORT_WD, 8'b0111_1111);  // clear flags, disable
    rd_stat(PORT_WD, s);
    check(s == 8'hE8, "watchdog flags cleared and disabled");

    // ---- voltage fail
    @(negedge clk) v_fail_n = 0;
    repeat (3) @(negedge clk);
    v_fail_n = 1;
    check(!dsp_rst_n, "~V_FAIL resets the DSP");
    if (!dsp_rst_n) mech[M_VFAIL]++;
    wait_boot("voltage fail");
    mech[M_WARM_REBOOT]++;
    rd_stat(PORT_WD, s);
    check(!s[WD_TRIP] && s[WD_DCRST], "~WDTrip after voltage fail");

    // ---- direct reset command
    @(negedge clk) dc_rst_req = 1;
    @(negedge clk) dc_rst_req = 0;
    check(!dsp_rst_n, "direct command resets the DSP");
    if (!dsp_rst_n) mech[M_DC_RST]++;
    wait_boot("direct reset");
    mech[M_WARM_REBOOT]++;
    rd_stat(PORT_WD, s);
    check(!s[WD_TRIP] && !s[WD_DCRST], $sformatf("~DC_RST set %h", s));

    // ---- power-on reset clears the flags
    @(negedge clk) por_n = 0;
    repeat (3) @(negedge clk);
    por_n = 1;
    wait_boot("power-on again");
    rd_stat(PORT_WD, s);
    check(s == 8'hE8, "power-on clears the watchdog flags");
    if (s == 8'hE8) mech[M_POR]++;

    check(st_bad == 0 && md_bad == 0, "serial bit periods");
    foreach (mech[i]) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-16s happened %0d times", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
