// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the 256 x 32 transmit buffer of the PDFP-CTRL (its default size)
// and, smaller, as the reply queue of the PDFP. The head word is always
// visible on rdata while empty is low (show-ahead); pop removes it at the
// next clock edge. A push into a full FIFO is ignored, as is a pop from an
// empty one. half is high while the FIFO holds DEPTH/2 words or more, which
// is the "half (or more) full" flag of the controller. srst empties it.
// The size and the three flags are those of the controller's FIFO; the
// show-ahead read and the handling of overrun are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             srst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             half,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (srst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assign rdata = mem[rd_ptr];
  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign half  = (count >= (AW+1)'(DEPTH / 2));

`ifndef SYNTHESIS
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
`endif
endmodule
