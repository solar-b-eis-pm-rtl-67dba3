// tb_st_if: checks the status interface with a 16-deep FIFO and BIT_HALF =
// 3.  Packets written byte by byte are sent after ~ST_GO; a receiver model
// compares every byte and the bit period.  Also checked: ST_ENA covering the
// packet and only the packet, ~ST_GO returning to 1 by itself, the status
// register, the packet duration, the full flag, and ~RST.
module tb_st_if;
  import scproc_pkg::*;
  localparam int BH = 3, DEPTH = 16;
  logic clk = 0, rst = 1, ctl_wr = 0, data_wr = 0;
  logic [7:0] ctl_wdata = '1, data_wdata = '0, stat;
  logic fifo_rst, fifo_wr, fifo_rd, fifo_ef_n, fifo_ff_n, fifo_hf_n;
  logic [8:0] fifo_din, fifo_dout;
  logic st_ena, st_clk, st_data;
  logic rx_valid;
  logic [7:0] rx_word;
  int bad_period, words;
  int checks = 0, failures = 0;
  byte unsigned expq[$];
  int ena_cycles = 0;

  st_if #(.BIT_HALF(BH)) dut (.*);
  fifo_idt7204 #(.DEPTH(DEPTH)) u_f (.clk, .rst(fifo_rst), .wr(fifo_wr), .din(fifo_din),
    .rd(fifo_rd), .dout(fifo_dout), .ef_n(fifo_ef_n), .ff_n(fifo_ff_n), .hf_n(fifo_hf_n));
  tb_ser_rx #(.WIDTH(8), .PERIOD(2 * BH)) u_rx (.clk, .ena(st_ena), .sclk(st_clk),
    .sdata(st_data), .valid(rx_valid), .word(rx_word), .bad_period, .words);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (st_ena) ena_cycles++;
    if (rx_valid) begin
      byte unsigned e;
      e = (expq.size() > 0) ? expq.pop_front() : 8'hxx;
      check(rx_word == e, $sformatf("received %h expected %h", rx_word, e));
    end
  end

  task automatic ctl(input logic [7:0] d);
    @(negedge clk); ctl_wr = 1; ctl_wdata = d; @(negedge clk); ctl_wr = 0; ctl_wdata = '1;
  endtask

  task automatic put(input logic [7:0] d);
    @(negedge clk); data_wr = 1; data_wdata = d; @(negedge clk); data_wr = 0;
  endtask

  task automatic send(input int n, input int seed);
    int w0, t;
    for (int i = 0; i < n; i++) begin
      byte unsigned v;
      v = 8'(i * 53 + seed);
      put(v); expq.push_back(v);
    end
    check(!stat[ST_ENA] && stat[ST_GO] && stat[ST_EF], "loaded, not started");
    w0 = words; ena_cycles = 0;
    ctl(8'b0111_1111);
    check(!stat[ST_GO], "~ST_GO low while sending");
    t = 0;
    while (!st_ena && t < 10) begin @(negedge clk); t++; end
    check(st_ena, "ST_ENA rises");
    t = 0;
    while (st_ena && t < 100000) begin @(negedge clk); t++; end
    check(words - w0 == n, $sformatf("%0d bytes received of %0d", words - w0, n));
    check(expq.size() == 0, "all bytes received");
    check(stat[ST_GO] && !stat[ST_EF] && !stat[ST_ENA], $sformatf("idle after packet %h", stat));
    // each byte is 8 bit periods plus a 2-clock reload gap
    check(ena_cycles >= n * 16 * BH && ena_cycles <= n * (16 * BH + 3) + 2,
          $sformatf("packet of %0d bytes took %0d clocks", n, ena_cycles));
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(stat == 8'h82, $sformatf("idle status %h", stat));
    send(1, 1);
    send(5, 17);
    send(DEPTH, 3);
    check(bad_period == 0, $sformatf("%0d bytes with a wrong bit period", bad_period));
    // GO with an empty FIFO sends nothing
    ctl(8'b0111_1111);
    repeat (5) @(negedge clk);
    check(stat[ST_GO] && !st_ena, "GO on empty FIFO ignored");
    // full flag and reset
    for (int i = 0; i < DEPTH; i++) put(8'(i));
    check(!stat[ST_FF], "full flag");
    ctl(8'b1111_1011);
    check(!stat[ST_EF] && stat[ST_FF], "~RST empties FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
