// tb_md_if: checks the mission data interface with two 8-deep FIFOs and
// BIT_HALF = 3.  A receiver model compares every 16-bit word and the bit
// period.  Checked: a single-sub-packet packet and its interrupt, waiting
// for BUSY to go inactive, a packet of three sub-packets held together by
// ~EOP with MD_ENA high throughout and one interrupt at its end, ~GO
// returning to 1 after each sub-packet, the status flags, ~ClrIrq and ~RST.
module tb_md_if;
  import scproc_pkg::*;
  localparam int BH = 3, DEPTH = 8;
  logic clk = 0, rst = 1, ctl_wr = 0, data_wr = 0;
  logic [7:0] ctl_wdata = '1, stat;
  logic [15:0] data_wdata = '0;
  logic fifo_rst, fifo_wr, fifo_rd;
  logic [1:0][8:0] fifo_din, fifo_dout;
  logic [1:0] fifo_ef_n, fifo_ff_n, fifo_hf_n;
  logic md_busy = 0, md_ena, md_clk, md_data, irq_n;
  logic rx_valid;
  logic [15:0] rx_word;
  int bad_period, words;
  int checks = 0, failures = 0;
  logic [15:0] expq[$];
  int ena_falls = 0;
  logic ena_q = 0;

  md_if #(.BIT_HALF(BH)) dut (.*);
  for (genvar i = 0; i < 2; i++) begin : g_f
    fifo_idt7204 #(.DEPTH(DEPTH)) u_f (.clk, .rst(fifo_rst), .wr(fifo_wr), .din(fifo_din[i]),
      .rd(fifo_rd), .dout(fifo_dout[i]), .ef_n(fifo_ef_n[i]), .ff_n(fifo_ff_n[i]), .hf_n(fifo_hf_n[i]));
  end
  tb_ser_rx #(.WIDTH(16), .PERIOD(2 * BH)) u_rx (.clk, .ena(md_ena), .sclk(md_clk),
    .sdata(md_data), .valid(rx_valid), .word(rx_word), .bad_period, .words);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    ena_q <= md_ena;
    if (ena_q && !md_ena && !rst) ena_falls++;
    if (rx_valid) begin
      logic [15:0] e;
      e = (expq.size() > 0) ? expq.pop_front() : 16'hDEAD;
      check(rx_word == e, $sformatf("received %h expected %h", rx_word, e));
    end
  end

  task automatic ctl(input logic [7:0] d);
    @(negedge clk); ctl_wr = 1; ctl_wdata = d; @(negedge clk); ctl_wr = 0; ctl_wdata = '1;
  endtask

  task automatic fill(input int n, input int seed);
    for (int i = 0; i < n; i++) begin
      logic [15:0] v;
      v = 16'(i * 4099 + seed * 77);
      @(negedge clk); data_wr = 1; data_wdata = v; @(negedge clk); data_wr = 0;
      expq.push_back(v);
    end
  endtask

  task automatic wait_go_done(output int t);
    t = 0;
    do begin @(negedge clk); t++; end while (!stat[MD_GO] && t < 20000);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, w0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(stat == 8'h4E, $sformatf("idle status %h", stat));
    // one sub-packet, last (~GO = 0, ~EOP = 0)
    fill(5, 1);
    w0 = words;
    ctl(8'b1111_1001);
    wait_go_done(t);
    repeat (3) @(negedge clk);
    check(words - w0 == 5 && expq.size() == 0, "5 words received");
    check(!md_ena && !irq_n && !stat[MD_IRQ] && ena_falls == 1, $sformatf("MD_ENA fell and raised ~IRQ %0d %0d %0d", md_ena, irq_n, ena_falls));
    check(t >= 5 * 32 * BH && t <= 5 * (32 * BH + 3) + 6, $sformatf("5 words took %0d clocks", t));
    ctl(8'b1111_0111);
    check(irq_n && stat[MD_IRQ], "~ClrIrq clears the interrupt");
    // BUSY holds the start
    md_busy = 1;
    fill(2, 2);
    ctl(8'b1111_1001);
    repeat (50) @(negedge clk);
    check(!md_ena && stat[MD_BSY] && !stat[MD_GO], "waiting for BUSY");
    md_busy = 0;
    wait_go_done(t);
    repeat (3) @(negedge clk);
    check(expq.size() == 0 && !irq_n && ena_falls == 2, "sent after BUSY fell");
    ctl(8'b1111_0111);
    // three sub-packets of DEPTH words
    for (int s = 0; s < 3; s++) begin
      fill(DEPTH, 10 + s);
      check(!stat[MD_FF], "FIFO full");
      ctl(s < 2 ? 8'b1111_1101 : 8'b1111_1001);
      wait_go_done(t);
      repeat (3) @(negedge clk);
      if (s < 2) check(md_ena && irq_n && stat[MD_EOP] && !stat[MD_EF], "held between sub-packets");
    end
    check(expq.size() == 0 && !md_ena && !irq_n && ena_falls == 3, "one interrupt for the whole packet");
    check(bad_period == 0, $sformatf("%0d words with a wrong bit period", bad_period));
    // reset
    fill(3, 5);
    ctl(8'b0111_1111);
    check(!stat[MD_EF] && stat[MD_IRQ] && stat[MD_GO], "~RST empties and clears");
    expq.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
