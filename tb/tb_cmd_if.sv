// tb_cmd_if: checks the command interface with three 8-deep FIFOs.
// A bit-level model of the MDP sends packets of various lengths; every
// FIFO word read back is compared with words built independently from the
// sent bytes (three per word, first byte in the top segment, EOP on the last
// byte).  Also checked: CMD_ENA status, the interrupt and its clear, the
// bit-error flag for a packet that is not whole bytes, half-full, overflow
// with loss of the extra words, and the software reset.
module tb_cmd_if;
  import scproc_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  logic cmd_ena = 0, cmd_clk = 0, cmd_data = 0;
  logic ctl_wr = 0, data_rd = 0;
  logic [7:0] ctl_wdata = '1, stat;
  logic fifo_rst, fifo_wr, fifo_rd, irq_n;
  cmd_word_t fifo_din, fifo_dout;
  logic [2:0] fifo_ef_n, fifo_ff_n, fifo_hf_n;
  int checks = 0, failures = 0;
  cmd_word_t expq[$];

  cmd_if dut (.*);

  for (genvar i = 0; i < 3; i++) begin : g_f
    fifo_idt7204 #(.DEPTH(DEPTH)) u_f (
      .clk, .rst(fifo_rst), .wr(fifo_wr), .din(fifo_din[i]), .rd(fifo_rd),
      .dout(fifo_dout[i]), .ef_n(fifo_ef_n[i]), .ff_n(fifo_ff_n[i]), .hf_n(fifo_hf_n[i]));
  end

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_bit(input bit b);
    cmd_data = b;
    repeat (4) @(negedge clk);
    cmd_clk = 1;
    repeat (4) @(negedge clk);
    cmd_clk = 0;
  endtask

  // sends a packet; extra = stray bits after the bytes
  task automatic send_packet(input byte unsigned b[], input int extra);
    @(negedge clk) cmd_ena = 1;
    repeat (4) @(negedge clk);
    check(stat[CMD_ENA], "CMD_ENA visible while a packet is sent");
    foreach (b[i]) for (int k = 7; k >= 0; k--) send_bit(b[i][k]);
    for (int k = 0; k < extra; k++) send_bit(1'b1);
    repeat (4) @(negedge clk);
    cmd_ena = 0;
    repeat (8) @(negedge clk);
  endtask

  // expected FIFO words for a packet
  task automatic expect_words(input byte unsigned b[]);
    cmd_word_t w;
    int n;
    w = '0; n = 0;
    foreach (b[i]) begin
      w[2 - n] = '{eop: (i == b.size() - 1), data: b[i]};
      n++;
      if (n == 3 || i == b.size() - 1) begin expq.push_back(w); w = '0; n = 0; end
    end
  endtask

  task automatic reg_wr(input logic [7:0] d);
    @(negedge clk); ctl_wr = 1; ctl_wdata = d; @(negedge clk); ctl_wr = 0; ctl_wdata = '1;
  endtask

  task automatic drain_and_compare(input int limit);
    int n;
    n = 0;
    while (stat[CMD_EF] && n < limit) begin
      cmd_word_t e;
      e = (expq.size() > 0) ? expq.pop_front() : '1;
      check(fifo_dout == e, $sformatf("word %0d got %h exp %h", n, fifo_dout, e));
      @(negedge clk) data_rd = 1; @(negedge clk) data_rd = 0;
      n++;
    end
    check(expq.size() == 0, $sformatf("%0d expected words never arrived", expq.size()));
    expq.delete();
  endtask

  function automatic void make_bytes(ref byte unsigned b[], input int n, input int seed);
    b = new[n];
    foreach (b[i]) b[i] = 8'((i * 29 + seed) ^ 8'h5A);
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned b[];
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(stat == 8'h7A, $sformatf("idle status %h", stat));
    // packets of 1..7 bytes, each read back
    for (int len = 1; len <= 7; len++) begin
      make_bytes(b, len, len);
      send_packet(b, 0);
      expect_words(b);
      check(!irq_n && !stat[CMD_IRQ], $sformatf("interrupt after %0d-byte packet", len));
      check(stat[CMD_BITERR] && stat[CMD_OVR], "no error flags");
      drain_and_compare(10);
      reg_wr(8'b1110_1111);  // ~ClrIrq
      check(irq_n, "interrupt cleared");
    end
    // bit error: 2 bytes and 3 stray bits
    make_bytes(b, 2, 99);
    send_packet(b, 3);
    expect_words(b);
    check(!stat[CMD_BITERR], "bit error flagged");
    drain_and_compare(4);
    reg_wr(8'b1011_1111);
    check(stat[CMD_BITERR], "bit error cleared");
    // half full and overflow: 30 bytes = 10 words into 8-deep FIFO
    make_bytes(b, 30, 7);
    send_packet(b, 0);
    expect_words(b);
    expq = expq[0:DEPTH-1];
    check(!stat[CMD_HF] && !stat[CMD_FF], "half-full and full flags");
    check(!stat[CMD_OVR], "overflow flagged");
    drain_and_compare(20);
    reg_wr(8'b1111_0111);
    check(stat[CMD_OVR], "overflow cleared");
    // software reset empties the FIFO
    make_bytes(b, 6, 3);
    send_packet(b, 0);
    check(stat[CMD_EF], "data present before reset");
    reg_wr(8'b1111_1011);
    check(!stat[CMD_EF] && irq_n, "~RST empties FIFO and clears interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
