// serial_rx: receiver of the 10 Mbit/s PDFP serial link.
//
// The line is first passed through a two-flop synchroniser, since the two
// ends of the link run from separate clocks. A falling edge on the idle line
// starts a frame; each bit is sampled in its middle, CLKS_PER_BIT clocks
// apart. The frame is the one serial_tx sends: start bit, 32 data bits most
// significant first, odd parity, stop bit. At the end of a good frame valid
// pulses for one clock with the word on data; a frame whose parity is wrong
// or whose stop bit is low pulses err instead and is discarded. These error
// checks are this design's reading of the "receiver error" flags at both
// ends of the link. srst (the controller's RxR bit) returns to idle.
module serial_rx #(
  parameter int unsigned CLKS_PER_BIT = pdfp_pkg::CLKS_PER_BIT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        srst,
  input  logic        rxd,
  output logic [31:0] data,
  output logic        valid,
  output logic        err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic        rxd_m, rxd_s;
  logic        busy;
  logic [5:0]  bit_idx;     // 0 = start, 1..32 data, 33 parity, 34 stop
  logic [CW-1:0] clk_cnt;
  logic [31:0] shreg;
  logic        par;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      bit_idx <= '0;
      clk_cnt <= '0;
      shreg   <= '0;
      par     <= 1'b0;
      data    <= '0;
      valid   <= 1'b0;
      err     <= 1'b0;
    end else begin
      valid <= 1'b0;
      err   <= 1'b0;
      if (srst) begin
        busy <= 1'b0;
      end else if (!busy) begin
        if (!rxd_s) begin
          busy    <= 1'b1;
          bit_idx <= '0;
          // first sample in the middle of the start bit
          clk_cnt <= CW'(CLKS_PER_BIT / 2);
        end
      end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
        clk_cnt <= '0;
        bit_idx <= bit_idx + 1'b1;
        if (bit_idx == 0) begin
          if (rxd_s) busy <= 1'b0;   // glitch, not a start bit
          par <= 1'b0;
        end else if (bit_idx <= 32) begin
          shreg <= {shreg[30:0], rxd_s};
          par   <= par ^ rxd_s;
        end else if (bit_idx == 33) begin
          par <= par ^ rxd_s;
        end else begin
          busy <= 1'b0;
          if (rxd_s && par) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            err <= 1'b1;
          end
        end
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end
endmodule
