// out_adder: drives the PDFP's 34-pin output connector.
//
// With add_en low (mode bit D00 cleared) the output is the table word
// addressed by the B counter; with add_en high (the default mode) it is the
// table word plus the correction word on the 34-pin input connector. The
// result is registered, one clock after its inputs. The sum is taken modulo
// 2^DATA_W: how an overflowing sum is treated is not known, so this is
// this design's choice; the two modes follow the PDFP description.
module out_adder #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              add_en,
  input  logic [DATA_W-1:0] table_word,
  input  logic [DATA_W-1:0] corr,
  output logic [DATA_W-1:0] out_value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      out_value <= '0;
    else if (add_en) out_value <= table_word + corr;
    else             out_value <= table_word;
  end
endmodule
