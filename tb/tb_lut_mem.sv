// tb_lut_mem: self-checking test of the look-up table memory at its default
// size (four tables of 0x20000 words). Loads the fill pointer at the start
// of each table and at random places, fills words, checks the pointer
// increments after every fill, that out-of-range fills are dropped, and
// reads words back through the {table, B count} port one clock later,
// including merr for a table that does not exist.
module tb_lut_mem;
  import pdfp_pkg::*;
  localparam int W = 16, NB = 4;
  logic clk = 0, rst_n = 0, set_addr = 0, fill = 0;
  logic [PARAM_W-1:0] addr_val = '0, fill_ptr;
  logic [W-1:0] fill_data = '0, rdata;
  logic [4:0] table_sel = '0;
  logic [BANK_AW-1:0] bcount = '0;
  logic merr;
  int checks = 0, failures = 0;
  logic [W-1:0] model [int];

  lut_mem #(.DATA_W(W), .NBANKS(NB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_ptr(input int a);
    set_addr <= 1; addr_val <= PARAM_W'(a);
    @(posedge clk); set_addr <= 0; #1;
    check(fill_ptr == PARAM_W'(a), "pointer loaded");
  endtask

  task automatic fill_word(input logic [W-1:0] d);
    int p;
    p = int'(fill_ptr);
    fill <= 1; fill_data <= d;
    @(posedge clk); fill <= 0; #1;
    if (p < NB * 'h20000) model[p] = d;
    check(fill_ptr == PARAM_W'(p + 1), "pointer increments after fill");
  endtask

  task automatic read_check(input int tbl, input int b);
    table_sel <= 5'(tbl); bcount <= BANK_AW'(b);
    @(posedge clk); #1;
    check(merr == (tbl >= NB), "merr");
    if (tbl < NB && model.exists(tbl * 'h20000 + b))
      check(rdata == model[tbl * 'h20000 + b],
            $sformatf("read t%0d b%h: %h exp %h", tbl, b, rdata, model[tbl * 'h20000 + b]));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < NB; t++) begin
      set_ptr(t * 'h20000);
      for (int i = 0; i < 16; i++) fill_word($urandom);
    end
    set_ptr('h1FFFE);          // crossing from table 0 into table 1
    for (int i = 0; i < 4; i++) fill_word($urandom);
    for (int i = 0; i < 50; i++) begin
      set_ptr($urandom_range(0, NB * 'h20000 - 1));
      fill_word($urandom);
    end
    set_ptr(NB * 'h20000);     // beyond the memory: dropped
    fill_word(16'hDEAD);
    foreach (model[a]) read_check(a / 'h20000, a % 'h20000);
    read_check(NB, 0);
    read_check(31, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
