// pdfp_nim: the PDFP look-up table module.
//
// Holds tables of words giving the RF cavity frequency as a function of the
// magnetic field B. A counter follows B by counting the B-up and B-down
// pulses; the word it addresses in the selected table, optionally plus the
// correction word on the input connector, is presented on the output
// connector. All set-up arrives as 32-bit command words on the serial link
// from the controller (pdfp_cmd); six trigger inputs fire trigger table
// entries that select another table or clear the counter (trigger_table);
// replies (status, input and output copies) go back on the return link
// (pdfp_reply).
//
// Timing: a B pulse edge reaches the counter after the three-clock
// synchroniser; the table word follows one clock later and the registered
// output one more, five clocks after the edge. The B-pulse reply is delayed
// by the same three clocks so that it carries the settled output. Command
// words act one clock after they have been received. Everything runs on one
// clock; the front-panel pulse inputs are synchronised here, the correction
// word is used as it is and must be stable when it is sampled. The block
// structure and all the behaviour named above follow the PDFP description;
// the synchronisers, the reply delay and the queueing are this design's own.
module pdfp_nim #(
  parameter int unsigned DATA_W       = 16,
  parameter int unsigned NBANKS       = 4,
  parameter int unsigned CLKS_PER_BIT = pdfp_pkg::CLKS_PER_BIT,
  parameter int unsigned QDEPTH       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // serial link
  input  logic              link_rxd,    // from the controller
  output logic              link_txd,    // to the controller
  // front panel
  input  logic              b_up,
  input  logic              b_down,
  input  logic [6:1]        trig,
  input  logic              stb,
  input  logic [DATA_W-1:0] corr_in,     // 34-pin input connector
  output logic [DATA_W-1:0] out_value    // 34-pin output connector
);
  import pdfp_pkg::*;

  // link receive and command decoding
  logic [31:0] rx_word;
  logic        rx_valid, rx_err;
  logic        status_req, clr_link, set_addr, fill, trig_wr;
  logic [PARAM_W-1:0] param;
  logic [DATA_W-1:0]  fill_data;
  logic [2:0]         trig_idx;
  trig_entry_t        trig_entry, cfg0;
  logic [1:0]         mode;
  logic               rxep;

  serial_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .srst(1'b0), .rxd(link_rxd),
    .data(rx_word), .valid(rx_valid), .err(rx_err)
  );

  pdfp_cmd #(.DATA_W(DATA_W)) u_cmd (
    .clk, .rst_n, .word_valid(rx_valid), .word(rx_word),
    .status_req, .clr_link, .set_addr, .fill, .param, .fill_data,
    .trig_wr, .trig_idx, .trig_entry, .mode
  );

  // receiver error flag: set by a bad frame, cleared by command 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rxep <= 1'b0;
    else if (rx_err)   rxep <= 1'b1;
    else if (clr_link) rxep <= 1'b0;
  end

  // front-panel pulses
  logic b_up_p, b_down_p, stb_p;
  logic [6:1] trig_p;

  pulse_sync #(.N(9)) u_sync (
    .clk, .rst_n,
    .in_async({stb, trig, b_down, b_up}),
    .pulse({stb_p, trig_p, b_down_p, b_up_p})
  );

  // trigger actions
  logic       act, act_bclr, act_ts;
  logic [4:0] act_tb;
  logic [2:0] act_src;
  logic [4:0] table_sel;

  trigger_table u_trig (
    .clk, .rst_n, .wr(trig_wr), .wr_idx(trig_idx), .wr_entry(trig_entry),
    .trig(trig_p), .act, .act_bclr, .act_ts, .act_tb, .act_src, .cfg0
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                table_sel <= '0;
    else if (act && act_ts)    table_sel <= act_tb;
  end

  // B counter, table and output
  logic [BANK_AW-1:0] bcount;
  logic               b_dir, b_enabled, bof, merr;
  logic [DATA_W-1:0]  table_word;
  logic [PARAM_W-1:0] fill_ptr;

  b_counter #(.W(BANK_AW)) u_bcnt (
    .clk, .rst_n, .up(b_up_p), .down(b_down_p),
    .clr(act && act_bclr), .en(act && !act_bclr),
    .count(bcount), .dir(b_dir), .enabled(b_enabled), .bof
  );

  lut_mem #(.DATA_W(DATA_W), .NBANKS(NBANKS)) u_lut (
    .clk, .rst_n, .set_addr, .addr_val(param), .fill, .fill_data, .fill_ptr,
    .table_sel, .bcount, .rdata(table_word), .merr
  );

  out_adder #(.DATA_W(DATA_W)) u_add (
    .clk, .rst_n, .add_en(mode[0]), .table_word, .corr(corr_in), .out_value
  );

  // B-pulse reply waits until the output shows the new count:
  // count (1) + memory read (1) + adder (1)
  logic [2:0] b_dly;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_dly <= '0;
    else        b_dly <= {b_dly[1:0], (b_up_p ^ b_down_p) && b_enabled};
  end

  // replies
  pdfp_status_t status;
  logic [31:0]  tx_word;
  logic         tx_valid, tx_ready, lost;

  assign status = '{rxep: rxep, merr: merr, bof: bof, tb: table_sel};

  pdfp_reply #(.DATA_W(DATA_W), .QDEPTH(QDEPTH)) u_reply (
    .clk, .rst_n, .status_req, .status,
    .b_evt(b_dly[2]), .b_dir, .stb_evt(stb_p), .cfg0,
    .in_val(corr_in), .out_val(out_value),
    .tx_word, .tx_valid, .tx_ready, .lost
  );

  serial_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .srst(1'b0), .data(tx_word), .valid(tx_valid),
    .ready(tx_ready), .txd(link_txd)
  );
endmodule
