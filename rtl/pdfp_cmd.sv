// pdfp_cmd: command decoder of the PDFP.
//
// Takes each good word from the link receiver and splits it by its command
// code C3..C0 into one-clock strobes, registered one clock after the word:
//   0 status request, 1 clear link error, 2 set fill pointer (D26..D00),
//   3 fill table word (data in the low DATA_W bits), 5 set mode,
//   8 write trigger table entry (T2..T0 in D14..D12, entry in D10..D00).
// Codes 4, 6, 7 and 9..15 are ignored. The mode register lives here: bit 0
// selects the sum of table and correction on the output and is set out of
// reset, as the default mode; bit 1 is stored but drives nothing.
// Codes, fields and the default mode follow the PDFP description; the
// registered strobes are this design's own.
module pdfp_cmd #(
  parameter int unsigned DATA_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  word_valid,
  input  logic [31:0]           word,
  output logic                  status_req,
  output logic                  clr_link,
  output logic                  set_addr,
  output logic                  fill,
  output logic [pdfp_pkg::PARAM_W-1:0] param,
  output logic [DATA_W-1:0]     fill_data,
  output logic                  trig_wr,
  output logic [2:0]            trig_idx,
  output pdfp_pkg::trig_entry_t trig_entry,
  output logic [1:0]            mode
);
  import pdfp_pkg::*;

  cmd_e code;
  assign code = cmd_e'(word[31:28]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status_req <= 1'b0;
      clr_link   <= 1'b0;
      set_addr   <= 1'b0;
      fill       <= 1'b0;
      trig_wr    <= 1'b0;
      param      <= '0;
      fill_data  <= '0;
      trig_idx   <= '0;
      trig_entry <= '0;
      mode       <= 2'b01;
    end else begin
      status_req <= 1'b0;
      clr_link   <= 1'b0;
      set_addr   <= 1'b0;
      fill       <= 1'b0;
      trig_wr    <= 1'b0;
      if (word_valid) begin
        param      <= word[PARAM_W-1:0];
        fill_data  <= word[DATA_W-1:0];
        trig_idx   <= word[14:12];
        trig_entry <= trig_entry_t'(word[10:0]);
        case (code)
          CMD_STATUS:   status_req <= 1'b1;
          CMD_CLR_LINK: clr_link   <= 1'b1;
          CMD_SET_ADDR: set_addr   <= 1'b1;
          CMD_FILL:     fill       <= 1'b1;
          CMD_MODE:     mode       <= word[1:0];
          CMD_TRIG:     trig_wr    <= 1'b1;
          default: ;
        endcase
      end
    end
  end
endmodule
