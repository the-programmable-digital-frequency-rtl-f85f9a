// tb_pdfp_cmd: self-checking test of the command decoder. Feeds the example
// command words of the PDFP description and random words of every code, and
// checks that exactly the right strobe fires one clock later with the right
// fields, that unused codes do nothing, and the mode register's reset value.
module tb_pdfp_cmd;
  import pdfp_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, word_valid = 0;
  logic [31:0] word = '0;
  logic status_req, clr_link, set_addr, fill, trig_wr;
  logic [PARAM_W-1:0] param;
  logic [W-1:0] fill_data;
  logic [2:0] trig_idx;
  trig_entry_t trig_entry;
  logic [1:0] mode;
  int checks = 0, failures = 0;
  logic [1:0] m_mode = 2'b01;

  pdfp_cmd #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (word %h)", what, word); end
  endtask

  task automatic send(input logic [31:0] w);
    int c;
    c = int'(w[31:28]);
    word <= w; word_valid <= 1;
    @(posedge clk); word_valid <= 0; #1;
    if (c == 5) m_mode = w[1:0];
    check(status_req == (c == 0), "status strobe");
    check(clr_link == (c == 1), "clear strobe");
    check(set_addr == (c == 2), "set address strobe");
    check(fill == (c == 3), "fill strobe");
    check(trig_wr == (c == 8), "trigger strobe");
    check(mode == m_mode, "mode");
    if (c == 2 || c == 3) check(param == w[26:0], "parameter field");
    if (c == 3) check(fill_data == w[15:0], "fill data");
    if (c == 8) check(trig_idx == w[14:12] && trig_entry == w[10:0], "trigger fields");
    @(posedge clk); #1;
    check(!(status_req || clr_link || set_addr || fill || trig_wr), "strobes last one clock");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(mode == 2'b01, "default mode adds correction");
    // example words from the description
    send(32'h1000_0000);
    send(32'h0000_0000);
    send(32'h8000_0060);
    check(trig_idx == 0 && trig_entry.bclr && trig_entry.ts && trig_entry.tb == 0, "0x80000060");
    send(32'h8000_1020);
    check(trig_idx == 1 && !trig_entry.bclr && trig_entry.ts && trig_entry.tb == 0, "0x80001020");
    send(32'h8000_2021);
    check(trig_idx == 2 && trig_entry.ts && trig_entry.tb == 1, "0x80002021");
    send(32'h2002_0000);
    check(param == 27'h002_0000, "0x20020000");
    send(32'h37ff_ffff);
    check(fill_data == 16'hFFFF, "0x37ffffff");
    for (int i = 0; i < 500; i++) send($urandom);
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
