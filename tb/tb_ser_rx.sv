// tb_ser_rx: receiver model of the mission data processor's end of a
// status or mission-data link, for testbenches.  While ena is high it
// samples sdata on each rising edge of sclk, MSB first, and after WIDTH bits
// presents the word on word with valid high for one clock.  It measures the
// clocks between rising edges inside a word and counts words in which that
// spacing differs from PERIOD in bad_period.
module tb_ser_rx #(
  parameter int WIDTH  = 8,
  parameter int PERIOD = 20
) (
  input  logic             clk,
  input  logic             ena,
  input  logic             sclk,
  input  logic             sdata,
  output logic             valid,
  output logic [WIDTH-1:0] word,
  output int               bad_period,
  output int               words
);
  logic prev = 1'b1;
  int   nbits = 0, since = 0;
  bit   bad = 0;
  logic [WIDTH-1:0] sh = '0;

  initial begin valid = 0; word = '0; bad_period = 0; words = 0; end

  always @(posedge clk) begin
    valid <= 1'b0;
    since <= since + 1;
    prev  <= sclk;
    if (!ena) begin
      nbits <= 0;
    end else if (sclk && !prev) begin
      logic [WIDTH-1:0] nsh;
      nsh = {sh[WIDTH-2:0], sdata};
      sh    <= nsh;
      since <= 1;
      if (nbits != 0 && since != PERIOD) bad = 1;
      if (nbits == WIDTH - 1) begin
        valid <= 1'b1;
        word  <= nsh;
        words <= words + 1;
        if (bad) bad_period <= bad_period + 1;
        bad = 0;
        nbits <= 0;
      end else begin
        nbits <= nbits + 1;
      end
    end
  end
endmodule
