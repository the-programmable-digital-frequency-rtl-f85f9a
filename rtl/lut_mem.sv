// lut_mem: the PDFP look-up table memory.
//
// NBANKS tables of 0x20000 words each lie one after another in one
// contiguous memory; a table's first word is at table * 0x20000. The
// controller fills it through a fill pointer: set_addr loads the pointer
// (command 2), fill writes a word at the pointer and then increments it
// (command 3). Writes at out-of-range pointers are dropped. The read port
// gives the word at {table, bcount} one clock after the address, and merr
// is high while the selected table does not exist; the fill pointer does
// not affect it. The memory size is not published: NBANKS is this design's
// choice, and DATA_W follows a 16-bit word on the front-panel connectors.
module lut_mem #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned NBANKS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // fill side
  input  logic              set_addr,
  input  logic [pdfp_pkg::PARAM_W-1:0] addr_val,
  input  logic              fill,
  input  logic [DATA_W-1:0] fill_data,
  output logic [pdfp_pkg::PARAM_W-1:0] fill_ptr,
  // read side
  input  logic [pdfp_pkg::TABLE_SEL_W-1:0] table_sel,
  input  logic [pdfp_pkg::BANK_AW-1:0]     bcount,
  output logic [DATA_W-1:0] rdata,
  output logic              merr
);
  import pdfp_pkg::*;
  localparam int unsigned WORDS = NBANKS << BANK_AW;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];
  logic [AW-1:0]     raddr;

  // word address of the read port; only meaningful while merr is low
  assign raddr = AW'({table_sel, bcount});
  assign merr  = (32'(table_sel) >= NBANKS);

  always_ff @(posedge clk) begin
    if (fill && (32'(fill_ptr) < WORDS)) mem[AW'(fill_ptr)] <= fill_data;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        fill_ptr <= '0;
    else if (set_addr) fill_ptr <= addr_val;
    else if (fill)     fill_ptr <= fill_ptr + 1'b1;
  end
endmodule
