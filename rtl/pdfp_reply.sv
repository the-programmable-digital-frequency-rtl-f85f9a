// pdfp_reply: forms the words the PDFP sends back to its controller.
//
// Three kinds of word (see reply_e): a status word after a status request
// (code 0, status in D07..D00); a copy of the correction input connector
// (code 6); a copy of the output connector (code 7). Input and output copies
// are sent at each B pulse when entry 0 of the trigger table has IB or OB
// set, with DIR = 1 for a B-down pulse, and at each strobe pulse when it has
// IS or OS set, with DIR = 0. With both bits of a pair set both words are
// sent, input first. The connector value is taken in the clock of the event
// (the caller delays the B event until the output has settled). Each kind
// has one holding slot; slots move one per clock, status first, into a
// QDEPTH-word queue that feeds the link transmitter through a valid/ready
// handshake. A word whose slot is still occupied when the next one of its
// kind arrives replaces it and lost pulses; so does a word that finds the
// queue full. Holding slots, queue and priorities are this design's own.
module pdfp_reply #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned QDEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  status_req,
  input  pdfp_pkg::pdfp_status_t status,
  input  logic                  b_evt,
  input  logic                  b_dir,
  input  logic                  stb_evt,
  input  pdfp_pkg::trig_entry_t cfg0,
  input  logic [DATA_W-1:0]     in_val,
  input  logic [DATA_W-1:0]     out_val,
  output logic [31:0]           tx_word,
  output logic                  tx_valid,
  input  logic                  tx_ready,
  output logic                  lost
);
  import pdfp_pkg::*;

  logic        st_p, in_p, out_p;
  logic [31:0] st_w, in_w, out_w;
  logic        push, q_full, q_empty, q_half;
  logic [31:0] push_w;
  logic [$clog2(QDEPTH):0] q_count;
  logic        take_st, take_in, take_out;
  logic        new_in, new_out;
  logic        in_dir;

  assign new_in  = (b_evt && cfg0.ib) || (stb_evt && cfg0.is);
  assign new_out = (b_evt && cfg0.ob) || (stb_evt && cfg0.os);
  assign in_dir  = b_evt ? b_dir : 1'b0;

  // one slot per clock into the queue
  always_comb begin
    take_st  = 1'b0;
    take_in  = 1'b0;
    take_out = 1'b0;
    push_w   = st_w;
    if (st_p)       begin take_st  = 1'b1; push_w = st_w;  end
    else if (in_p)  begin take_in  = 1'b1; push_w = in_w;  end
    else if (out_p) begin take_out = 1'b1; push_w = out_w; end
  end
  assign push = take_st || take_in || take_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_p  <= 1'b0;
      in_p  <= 1'b0;
      out_p <= 1'b0;
      st_w  <= '0;
      in_w  <= '0;
      out_w <= '0;
      lost  <= 1'b0;
    end else begin
      lost <= (push && q_full) ||
              (status_req && st_p && !take_st) ||
              (new_in && in_p && !take_in) ||
              (new_out && out_p && !take_out);
      if (take_st)  st_p  <= 1'b0;
      if (take_in)  in_p  <= 1'b0;
      if (take_out) out_p <= 1'b0;
      if (status_req) begin
        st_p <= 1'b1;
        st_w <= make_word(RPL_STATUS, 1'b0, PARAM_W'(status));
      end
      if (new_in) begin
        in_p <= 1'b1;
        in_w <= make_word(RPL_INPUT, in_dir, PARAM_W'(in_val));
      end
      if (new_out) begin
        out_p <= 1'b1;
        out_w <= make_word(RPL_OUTPUT, in_dir, PARAM_W'(out_val));
      end
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n, .srst(1'b0),
    .push, .wdata(push_w),
    .pop(tx_valid && tx_ready),
    .rdata(tx_word),
    .empty(q_empty), .half(q_half), .full(q_full), .count(q_count)
  );
  assign tx_valid = !q_empty;
endmodule
