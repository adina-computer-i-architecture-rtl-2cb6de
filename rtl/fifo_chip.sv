// fifo_chip: one fall-through FIFO chip, DEPTH words of WIDTH bits (64 x 4 by default,
// the size of the 2841 part used in the trial machine; two of them make one buffer memory).
//
// A word shifted in appears at the output as soon as the FIFO was empty (fall-through), so
// data go through "without staying". in_ready is the chip's input-ready flag (not full),
// out_ready its output-ready flag (not empty). shift_in is accepted when there is room, or
// when a word leaves in the same cycle; shift_out when a word is there. The two sides are
// independent, as the document requires. Storage is a plain array with read and write
// pointers and a word count; all on one clock, which is this design's choice (the real chip
// is asynchronous on its two sides). Reset empties the FIFO.
module fifo_chip #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_in,
  input  logic [WIDTH-1:0] din,
  output logic             in_ready,
  input  logic             shift_out,
  output logic [WIDTH-1:0] dout,
  output logic             out_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_in, do_out;

  assign out_ready = (count != '0);
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign do_out    = shift_out && out_ready;
  assign do_in     = shift_in && (in_ready || do_out);
  assign dout      = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_in) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_in)  wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_out) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_in) - (AW+1)'(do_out);
    end
  end

endmodule
