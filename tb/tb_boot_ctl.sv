// tb_boot_ctl: checks the boot copy at its default size (256 instructions,
// 6 clocks per PROM byte).  A PROM model returns valid data only once its
// address has been stable for 250 ns (5 clocks at 20 MHz) and garbage before;
// a program-RAM model records every write.  Checked: the DSP is held in
// reset until the copy ends, every word's address and contents against
// instructions assembled from the PROM pattern (byte 6n is the most
// significant byte of word n), the total copy time, and a restart from
// address 0 when reset is applied part way through.
module tb_boot_ctl;
  localparam int WORDS = 256, ACC = 6;
  logic clk = 0, rst = 1;
  logic [14:0] prom_addr;
  logic prom_rd, pram_wr, busy, dsp_rst_n;
  logic [7:0] prom_data;
  logic [16:0] pram_addr;
  logic [47:0] pram_wdata;
  int checks = 0, failures = 0;
  logic [47:0] pram [int];
  int stable = 0, nwr = 0;
  logic [14:0] last_addr = '0;

  boot_ctl dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] prom_byte(int a);
    return 8'((a * 13) ^ (a >> 8) * 7 ^ 8'hA5);
  endfunction

  // PROM: data valid after 5 stable clocks
  always @(posedge clk) begin
    if (prom_addr != last_addr) stable <= 1; else stable <= stable + 1;
    last_addr <= prom_addr;
  end
  assign prom_data = (stable >= 5 && prom_addr == last_addr) ? prom_byte(int'(prom_addr)) : 8'hEE;

  always @(posedge clk) begin
    if (pram_wr && !rst) begin
      pram[int'(pram_addr)] = pram_wdata;
      nwr++;
      check(!dsp_rst_n && busy, "DSP held in reset during copy");
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    // a partial copy, then reset again
    rst = 0;
    repeat (2000) @(negedge clk);
    check(nwr > 0 && nwr < WORDS, "copy under way");
    rst = 1; nwr = 0; pram.delete();
    repeat (3) @(negedge clk);
    check(!dsp_rst_n && prom_addr == 0 && pram_addr == 0, "reset restarts the copy");
    rst = 0;
    cyc = 0;
    while (!dsp_rst_n && cyc < 20000) begin @(negedge clk); cyc++; end
    check(cyc == WORDS * (6 * ACC + 1), $sformatf("copy took %0d clocks, expected %0d", cyc, WORDS * (6 * ACC + 1)));
    check(nwr == WORDS, $sformatf("%0d words written", nwr));
    for (int w = 0; w < WORDS; w++) begin
      logic [47:0] e;
      for (int k = 0; k < 6; k++) e = {e[39:0], prom_byte(6 * w + k)};
      check(pram.exists(w) && pram[w] == e, $sformatf("word %0d = %h expected %h", w, pram.exists(w) ? pram[w] : 48'h0, e));
    end
    repeat (100) @(negedge clk);
    check(nwr == WORDS && dsp_rst_n && !busy && !prom_rd, "idle after the copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
