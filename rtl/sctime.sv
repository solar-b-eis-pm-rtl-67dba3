// sctime: the 32-bit spacecraft time counter.
//
// The counter advances by one on every 1.9 ms tick.  Software loads a new
// value, sent by the mission data processor in a command, by writing the
// 32-bit time to I/O port 0xC0 0000 (load/load_val, one clock), and reads the
// running value from the same port at any time (time_o).  A load in the
// same clock as a tick wins; the counter wraps at 2^32.  It is cleared by
// the global reset.  Width, clocking and the port follow the board; the reset
// value and load priority are this design's choice.
module sctime (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        load,
  input  logic [31:0] load_val,
  output logic [31:0] time_o
);
  always_ff @(posedge clk) begin
    if (rst)       time_o <= '0;
    else if (load) time_o <= load_val;
    else if (tick) time_o <= time_o + 32'd1;
  end

endmodule
