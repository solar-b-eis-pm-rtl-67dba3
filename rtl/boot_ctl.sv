// boot_ctl: boot controller, copies the boot loader from the byte-wide PROM
// into the 48-bit program RAM while the DSP is held in reset.
//
// After the global reset (power-on or a warm reboot) ends, the controller
// keeps dsp_rst_n low and reads the PROM one byte at a time from byte
// address 0, holding prom_rd high and each address for PROM_ACC clocks (6
// clocks = 300 ns suits a 250 ns EEPROM) before taking prom_data.  Six bytes
// make one instruction, the first byte being the most significant; the
// instruction is then written to program RAM with a one-clock pram_wr, word
// n coming from PROM bytes 6n..6n+5.  After BOOT_WORDS instructions busy
// falls and dsp_rst_n is released, so the DSP starts executing the copied
// loader from address 0.  The whole copy takes BOOT_WORDS * (6*PROM_ACC + 1)
// clocks from the end of reset.  The scheme (six bytes per instruction,
// both address counters starting at 0, DSP held in reset) follows the
// board; the loader length, the byte order and the access time are this
// design's choices.
module boot_ctl #(
  parameter int unsigned BOOT_WORDS = 256,
  parameter int unsigned PROM_ACC   = 6
) (
  input  logic        clk,
  input  logic        rst,
  output logic [14:0] prom_addr,
  output logic        prom_rd,
  input  logic [7:0]  prom_data,
  output logic [16:0] pram_addr,
  output logic [47:0] pram_wdata,
  output logic        pram_wr,
  output logic        busy,
  output logic        dsp_rst_n
);
  localparam int unsigned AW = (PROM_ACC > 1) ? $clog2(PROM_ACC) : 1;

  typedef enum logic [1:0] {B_READ, B_WRITE, B_DONE} state_e;

  state_e        state;
  logic [AW-1:0] acc;
  logic [2:0]    byte_i;

  initial begin
    assert (BOOT_WORDS * 6 <= 32768) else $error("boot loader larger than the PROM");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= B_READ;
      acc        <= AW'(PROM_ACC - 1);
      byte_i     <= '0;
      prom_addr  <= '0;
      pram_addr  <= '0;
      pram_wdata <= '0;
    end else begin
      unique case (state)
        B_READ: begin
          if (acc != '0) acc <= acc - 1'b1;
          else begin
            acc        <= AW'(PROM_ACC - 1);
            pram_wdata <= {pram_wdata[39:0], prom_data};
            prom_addr  <= prom_addr + 1'b1;
            if (byte_i == 3'd5) begin
              byte_i <= '0;
              state  <= B_WRITE;
            end else begin
              byte_i <= byte_i + 1'b1;
            end
          end
        end
        B_WRITE: begin
          pram_addr <= pram_addr + 1'b1;
          state     <= (pram_addr == 17'(BOOT_WORDS - 1)) ? B_DONE : B_READ;
        end
        B_DONE: ;
        default: state <= B_DONE;
      endcase
    end
  end

  // the boot bus either reads the PROM or writes program RAM, never both
  a_bus_excl: assert property (@(posedge clk) !(prom_rd && pram_wr));

  assign prom_rd   = state == B_READ && !rst;
  assign pram_wr   = state == B_WRITE && !rst;
  assign busy      = rst || state != B_DONE;
  assign dsp_rst_n = !busy;

endmodule
