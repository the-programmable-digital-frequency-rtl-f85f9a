// pdfp_top: a PDFP look-up table module and its PDFP-CTRL VME controller,
// joined by the serial link (controller to PDFP on one line, PDFP back to
// controller on the other).
//
// The controller faces a VMEbus (see ctrl_vme_regs); the PDFP faces the
// accelerator: B-up/B-down pulses, six trigger inputs, a strobe, the
// correction input connector and the frequency output connector. The
// controller's front-panel dual-port RAM port is brought out. The two
// modules have their own clocks and resets; the link is asynchronous and
// both ends must run at the same CLKS_PER_BIT clocks per bit for 10 Mbit/s.
// The split into two modules and the link follow the PDFP description;
// separate clocks are this design's choice.
module pdfp_top #(
  parameter int unsigned DATA_W       = 16,
  parameter int unsigned NBANKS       = 4,
  parameter int unsigned FIFO_DEPTH   = 256,
  parameter int unsigned MEM_WORDS    = 32'h2_0000,
  parameter int unsigned CLKS_PER_BIT = pdfp_pkg::CLKS_PER_BIT
) (
  // controller (VME crate)
  input  logic              ctrl_clk,
  input  logic              ctrl_rst_n,
  input  logic [6:0]        base_jumpers,
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
  output logic              dp_we,
  output logic [DATA_W-1:0] dp_data,
  output logic              dp_dir,
  // PDFP (NIM crate)
  input  logic              nim_clk,
  input  logic              nim_rst_n,
  input  logic              b_up,
  input  logic              b_down,
  input  logic [6:1]        trig,
  input  logic              stb,
  input  logic [DATA_W-1:0] corr_in,
  output logic [DATA_W-1:0] out_value
);
  logic link_down, link_up;   // controller -> PDFP, PDFP -> controller

  pdfp_ctrl #(
    .FIFO_DEPTH(FIFO_DEPTH), .MEM_WORDS(MEM_WORDS), .DATA_W(DATA_W),
    .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_ctrl (
    .clk(ctrl_clk), .rst_n(ctrl_rst_n), .base_jumpers,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a, .vme_lword_n, .vme_dh_i, .vme_d_i,
    .vme_d_o, .vme_d_oe, .vme_dtack_n, .vme_iack_n, .vme_iackin_n,
    .vme_iackout_n, .vme_irq_n,
    .link_txd(link_down), .link_rxd(link_up),
    .dp_we, .dp_data, .dp_dir
  );

  pdfp_nim #(
    .DATA_W(DATA_W), .NBANKS(NBANKS), .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_nim (
    .clk(nim_clk), .rst_n(nim_rst_n),
    .link_rxd(link_down), .link_txd(link_up),
    .b_up, .b_down, .trig, .stb, .corr_in, .out_value
  );
endmodule
