// pdfp_ctrl: the PDFP-CTRL, the VME module that drives a PDFP.
//
// Words written to its fifo register collect in a 256 x 32 FIFO and are
// sent one by one over the serial link to the PDFP; words coming back are
// sorted into status (shown in the ctrl register), input copies (stored in
// the 128 kWord receive memory, readable in VME standard space) and output
// copies (sent to the front-panel dual-port RAM port). The ctrl register's
// TxR and RxR bits reset the link transmitter and receiver, PCLR clears the
// receive pointer and CDE lets the returned DIR bit steer it.
// See ctrl_vme_regs for the register map and bus timing and serial_tx for
// the link frame. A word written to the empty FIFO starts on the line two
// clocks after the bus write is decoded.
// The parts and what they do follow the PDFP-CTRL description; the way they
// are joined (the transmitter pops the FIFO whenever it is idle) is this
// design's own.
module pdfp_ctrl #(
  parameter int unsigned FIFO_DEPTH   = 256,
  parameter int unsigned MEM_WORDS    = 32'h2_0000,
  parameter int unsigned DATA_W       = 16,
  parameter int unsigned CLKS_PER_BIT = pdfp_pkg::CLKS_PER_BIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [6:0]        base_jumpers,
  // VMEbus
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [5:0]        vme_am,
  input  logic [23:1]       vme_a,
  input  logic              vme_lword_n,
  input  logic [15:0]       vme_dh_i,
  input  logic [15:0]       vme_d_i,
  output logic [15:0]       vme_d_o,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  input  logic              vme_iack_n,
  input  logic              vme_iackin_n,
  output logic              vme_iackout_n,
  output logic [7:1]        vme_irq_n,
  // serial link
  output logic              link_txd,
  input  logic              link_rxd,
  // front-panel dual-port RAM port
  output logic              dp_we,
  output logic [DATA_W-1:0] dp_data,
  output logic              dp_dir
);
  localparam int unsigned MEM_AW = $clog2(MEM_WORDS);

  logic        fifo_push, fifo_empty, fifo_half, fifo_full;
  logic [31:0] fifo_wdata, fifo_rdata;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;
  logic        tx_rst, rx_rst, ptr_clr, cde, tx_ready;
  logic [31:0] rx_word;
  logic        rx_valid, rx_err, stat_new;
  logic [7:0]  pdfp_status;
  logic [MEM_AW-1:0] mem_addr, ptr;
  logic [15:0] mem_rdata;

  ctrl_vme_regs #(.MEM_AW(MEM_AW)) u_regs (
    .clk, .rst_n, .base_jumpers,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a, .vme_lword_n, .vme_dh_i, .vme_d_i,
    .vme_d_o, .vme_d_oe, .vme_dtack_n, .vme_iack_n, .vme_iackin_n,
    .vme_iackout_n, .vme_irq_n,
    .fifo_push, .fifo_wdata, .fifo_empty, .fifo_half, .fifo_full,
    .tx_rst, .rx_rst, .ptr_clr, .cde, .pdfp_status, .stat_new, .rx_err,
    .mem_addr, .mem_rdata, .ptr
  );

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .srst(1'b0), .push(fifo_push), .wdata(fifo_wdata),
    .pop(tx_ready && !fifo_empty), .rdata(fifo_rdata),
    .empty(fifo_empty), .half(fifo_half), .full(fifo_full), .count(fifo_count)
  );

  serial_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .srst(tx_rst), .data(fifo_rdata), .valid(!fifo_empty),
    .ready(tx_ready), .txd(link_txd)
  );

  serial_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .srst(rx_rst), .rxd(link_rxd),
    .data(rx_word), .valid(rx_valid), .err(rx_err)
  );

  ctrl_rx_mem #(.DATA_W(DATA_W), .MEM_WORDS(MEM_WORDS)) u_rxmem (
    .clk, .rst_n, .rx_valid, .rx_word, .ptr_clr, .cde, .ptr,
    .status(pdfp_status), .stat_new, .dp_we, .dp_data, .dp_dir,
    .rd_addr(mem_addr), .rd_data(mem_rdata)
  );
endmodule
