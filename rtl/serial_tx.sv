// serial_tx: transmitter of the 10 Mbit/s PDFP serial link.
//
// Sends one 32-bit word per frame on a single line that idles high: a start
// bit (0), the 32 data bits most significant first, an odd parity bit and a
// stop bit (1), each CLKS_PER_BIT clocks long, so a word takes
// 35 * CLKS_PER_BIT clocks (3.5 us at 10 Mbit/s). The link rate is the
// published one; the frame format is this design's choice, since only the
// rate and the 32-bit word size are given. A word is taken when valid and
// ready are both high; ready is high only while the line is idle. srst (the
// controller's TxR bit) aborts a frame and returns the line to idle.
module serial_tx #(
  parameter int unsigned CLKS_PER_BIT = pdfp_pkg::CLKS_PER_BIT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        srst,
  input  logic [31:0] data,
  input  logic        valid,
  output logic        ready,
  output logic        txd
);
  localparam int unsigned FRAME_BITS = 35;
  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic [FRAME_BITS-1:0] shreg;   // bits still to send, LSB next
  logic [5:0]            bits_left;
  logic [CW-1:0]         clk_cnt;

  assign ready = (bits_left == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
      txd       <= 1'b1;
    end else if (srst) begin
      shreg     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
      txd       <= 1'b1;
    end else if (bits_left == 0) begin
      txd <= 1'b1;
      if (valid) begin
        // frame, LSB first in time: start, d31..d0, parity, stop
        shreg     <= {1'b1, ~(^data), bit_reverse(data), 1'b0};
        bits_left <= 6'(FRAME_BITS);
        clk_cnt   <= '0;
      end
    end else begin
      txd <= shreg[0];
      if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
        clk_cnt   <= '0;
        shreg     <= {1'b1, shreg[FRAME_BITS-1:1]};
        bits_left <= bits_left - 1'b1;
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end

  function automatic logic [31:0] bit_reverse(input logic [31:0] d);
    for (int i = 0; i < 32; i++) bit_reverse[i] = d[31-i];
  endfunction
endmodule
