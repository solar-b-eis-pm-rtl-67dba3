// tb_io_decode: exhaustive check of the bank-1 address decoder over every
// bank code, every port number, a sample of don't-care middle address bits
// and both bank-select levels, against the address map.
module tb_io_decode;
  import scproc_pkg::*;
  logic pms1_n, pm_rd, pm_wr;
  logic [23:0] pm_addr;
  logic [15:0] rd_sel, wr_sel;
  logic cm_sel_n, mon_sel_n, prom_sel_n;
  int checks = 0, failures = 0;

  io_decode dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 8; b++)
        for (int p = 0; p < 16; p++)
          for (int m = 0; m < 4; m++)
            for (int rw = 0; rw < 4; rw++) begin
              logic [15:0] er, ew;
              pms1_n  = s[0];
              pm_addr = {b[2:0], 17'($urandom), p[3:0]};
              pm_rd   = rw[0];
              pm_wr   = rw[1];
              #1;
              er = '0; ew = '0;
              if (s == 0 && b == 6) begin er[p] = rw[0]; ew[p] = rw[1]; end
              check(rd_sel == er && wr_sel == ew,
                    $sformatf("port strobes s=%0d b=%0d p=%0d rw=%0d", s, b, p, rw));
              check(cm_sel_n == !(s == 0 && b == 4), "cm select");
              check(mon_sel_n == !(s == 0 && b == 5), "mon select");
              check(prom_sel_n == !(s == 0 && b == 7), "prom select");
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
