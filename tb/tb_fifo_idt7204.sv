// tb_fifo_idt7204: self-checking test of the 4k x 9 FIFO at its full depth.
// Fills it completely with a known pattern, checking the empty, half-full
// and full flags at each boundary, tries a write when full and a read when
// empty, drains it comparing every word against a reference queue, and
// checks that rst empties it.
module tb_fifo_idt7204;
  localparam int DEPTH = 4096;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [8:0] din = '0, dout;
  logic ef_n, ff_n, hf_n;
  int checks = 0, failures = 0;
  logic [8:0] q[$];

  fifo_idt7204 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [8:0] pat(int i);
    return 9'((i * 37 + 5) ^ (i >> 3));
  endfunction

  task automatic push(input logic [8:0] d);
    @(negedge clk); wr = 1; din = d; @(negedge clk); wr = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(ef_n == 0 && ff_n == 1 && hf_n == 1, "flags after reset");
    for (int i = 0; i < DEPTH; i++) begin
      push(pat(i)); q.push_back(pat(i));
      if (i == 0) check(ef_n == 1, "not empty after one write");
      if (i == DEPTH/2 - 1) check(hf_n == 1, "half-full clear at DEPTH/2");
      if (i == DEPTH/2) check(hf_n == 0, "half-full set above DEPTH/2");
      if (i == DEPTH - 2) check(ff_n == 1, "not full at DEPTH-1");
    end
    check(ff_n == 0, "full at DEPTH");
    push(9'h1FF);  // ignored
    check(ff_n == 0 && dout == pat(0), "write when full ignored");
    for (int i = 0; i < DEPTH; i++) begin
      logic [8:0] e;
      e = q.pop_front();
      @(negedge clk);
      check(dout == e, $sformatf("data %0d got %h exp %h", i, dout, e));
      rd = 1; @(negedge clk); rd = 0;
      if (i == 0) check(ff_n == 1, "not full after one read");
    end
    check(ef_n == 0, "empty after drain");
    @(negedge clk); rd = 1; @(negedge clk); rd = 0;
    check(ef_n == 0 && ff_n == 1, "read when empty ignored");
    push(9'h0AA); push(9'h055);
    @(negedge clk); rd = 1; wr = 1; din = 9'h123; @(negedge clk); rd = 0; wr = 0;
    check(dout == 9'h055, "simultaneous read and write");
    rst = 1; @(negedge clk); rst = 0;
    check(ef_n == 0, "rst empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
