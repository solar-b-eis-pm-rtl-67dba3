// fifo_idt7204: a 4k x 9 first-in first-out buffer standing in for the
// IDT7204 parts that buffer the command, status and mission-data links.
//
// The board uses six of them: three side by side for the 27-bit command
// FIFO, one for the status bytes and two in width expansion for the 16-bit
// mission data.  The real part is asynchronous; this version is clocked by the
// board clock and keeps the part's behaviour as the rest of the logic sees
// it: a write stores din, a read removes the head word, and three active-low
// flags report empty (ef_n), full (ff_n) and more-than-half-full (hf_n).
// The head word is visible on dout before the read strobe, so a register
// read of the FIFO returns dout in the cycle the read strobe is high and the
// word is removed at the end of that cycle.  A write to a full FIFO and a read
// of an empty one are ignored.  rst (the part's ~RS) empties it.
// Depth and width follow the part (4096 x 9); the half-full threshold of more
// than DEPTH/2 words is this design's choice.
module fifo_idt7204 #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             ef_n,
  output logic             ff_n,
  output logic             hf_n
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign do_wr = wr && (count < (AW+1)'(DEPTH));
  assign do_rd = rd && (count != '0);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assign dout = mem[rptr];
  assign ef_n = (count != '0);
  assign ff_n = (count != (AW+1)'(DEPTH));
  assign hf_n = (count <= (AW+1)'(DEPTH / 2));

endmodule
