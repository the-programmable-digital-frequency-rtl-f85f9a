// tb_pdfp_nim: self-checking test of the PDFP module at its default sizes.
// The testbench plays the controller on the serial link and drives the
// front panel. It fills parts of tables 0 and 1 (commands 2 and 3), moves
// the B counter with B-up and B-down pulses and checks the output connector
// against the filled words, with and without the correction input (command
// 5; also over a 300-step random walk with a new correction at each step).
// It runs the trigger table examples of the description (immediate
// clear and disable, enable and table 0 at trigger 1, table 1 at trigger 2),
// requests status and checks table number, MERR for a missing table, BOF
// after counting below zero and RxEP after a corrupted frame and its
// clearing by command 1, and checks the words sent back at B pulses (IB,
// OB, with DIR) and at strobes (IS, OS).
module tb_pdfp_nim;
  import pdfp_pkg::*;
  localparam int LINK_CPB = 4;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic link_rxd = 1, link_txd;
  logic b_up = 0, b_down = 0, stb = 0;
  logic [6:1] trig = '0;
  logic [W-1:0] corr_in = '0, out_value;
  int checks = 0, failures = 0;
  logic [31:0] replies [$];
  logic [W-1:0] tbl [int];
  int bpos = 0;

  pdfp_nim dut (.*);

  always #5 clk = ~clk;

  `include "link_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] w;
    bit ok;
    forever begin
      link_recv(link_txd, w, ok);
      if (!ok) begin checks++; failures++; $display("FAIL: bad reply frame"); end
      replies.push_back(w);
    end
  end

  task automatic cmd(input logic [31:0] w);
    link_send(link_rxd, w);
    repeat (6) @(negedge clk);
  endtask

  // which: 0 B up, 1 B down, 2 strobe, 3..8 trigger 1..6
  task automatic pulse(input int which);
    for (int lvl = 1; lvl >= 0; lvl--) begin
      case (which)
        0: b_up = 1'(lvl);
        1: b_down = 1'(lvl);
        2: stb = 1'(lvl);
        default: trig[which - 2] = 1'(lvl);
      endcase
      repeat (3) @(negedge clk);
    end
  endtask

  task automatic b_step(input bit up);
    pulse(up ? 0 : 1);
    repeat (4) @(negedge clk);
  endtask

  function automatic logic [W-1:0] word_at(input int t, input int b);
    return tbl.exists(t * 'h20000 + b) ? tbl[t * 'h20000 + b] : 'x;
  endfunction

  task automatic expect_out(input int t, input int b, input logic [W-1:0] c, input string what);
    check(out_value == W'(word_at(t, b) + c),
          $sformatf("%s: out %h exp %h (t%0d b%0d)", what, out_value, word_at(t, b) + c, t, b));
  endtask

  task automatic get_status(output logic [7:0] st);
    replies.delete();
    cmd(32'h0000_0000);
    repeat (40 * LINK_CPB) @(negedge clk);
    check(replies.size() == 1 && replies[0][31:28] == 4'h0, "status word returned");
    st = replies.size() > 0 ? replies[0][7:0] : 8'h00;
  endtask

  initial begin
    logic [7:0] st;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // fill words 0..7 of tables 0 and 1
    for (int t = 0; t < 2; t++) begin
      cmd(32'h2000_0000 | (t * 'h20000));
      for (int b = 0; b < 8; b++) begin
        logic [W-1:0] v;
        v = $urandom;
        tbl[t * 'h20000 + b] = v;
        cmd(32'h3000_0000 | v);
      end
    end
    // mode: default adds the correction
    corr_in = 16'h0100;
    cmd(32'h8000_0060);                 // table 0, clear and disable, now
    repeat (4) @(negedge clk);
    expect_out(0, 0, 16'h0100, "table 0 word 0 plus correction");
    b_step(1);
    expect_out(0, 0, 16'h0100, "counter disabled after BCLR");
    cmd(32'h8000_1020);                 // at trigger 1: table 0, enable
    pulse(3);
    repeat (4) @(negedge clk);
    for (int i = 0; i < 5; i++) begin b_step(1); bpos++; end
    expect_out(0, bpos, 16'h0100, "after five B-up pulses");
    b_step(0); bpos--;
    expect_out(0, bpos, 16'h0100, "after a B-down pulse");
    // random walk over the filled words, new correction at every step
    for (int i = 0; i < 300; i++) begin
      bit up;
      up = (bpos == 0) || (bpos < 7 && $urandom_range(1) == 1);
      corr_in = 16'($urandom);
      b_step(up);
      bpos += up ? 1 : -1;
      expect_out(0, bpos, corr_in, "random walk");
    end
    corr_in = 16'h0100;
    repeat (4) @(negedge clk);
    cmd(32'h5000_0000);                 // mode: table only
    repeat (4) @(negedge clk);
    expect_out(0, bpos, 16'h0000, "mode 0: table word alone");
    cmd(32'h8000_2021);                 // at trigger 2: table 1
    expect_out(0, bpos, 16'h0000, "table change waits for trigger 2");
    pulse(4);
    repeat (4) @(negedge clk);
    expect_out(1, bpos, 16'h0000, "table 1 after trigger 2");
    get_status(st);
    check(st == 8'h01, $sformatf("status: table 1, no errors (%h)", st));

    // send-back at B pulses: entry 0 with IB and OB (keeps table 1, no BCLR)
    cmd(32'h8000_0600);
    cmd(32'h5000_0001);                 // add correction again
    corr_in = 16'h0011;
    replies.delete();
    b_step(1); bpos++;
    repeat (80 * LINK_CPB) @(negedge clk);
    check(replies.size() == 2, "two words per B pulse with IB and OB");
    if (replies.size() == 2) begin
      check(replies[0] == {4'h6, 1'b0, 11'h0, 16'h0011}, "input copy, DIR up");
      check(replies[1] == {4'h7, 1'b0, 11'h0, W'(word_at(1, bpos) + 16'h0011)},
            "output copy after the move");
    end
    replies.delete();
    b_step(0); bpos--;
    repeat (80 * LINK_CPB) @(negedge clk);
    check(replies.size() == 2 && replies[0][27] && replies[1][27], "DIR set for B down");
    // strobe: IS and OS
    cmd(32'h8000_0180);
    replies.delete();
    pulse(2);
    repeat (80 * LINK_CPB) @(negedge clk);
    check(replies.size() == 2 && replies[0][31:28] == 4'h6 && replies[1][31:28] == 4'h7,
          "input and output copies at the strobe");
    replies.delete();
    b_step(1); bpos++;
    repeat (80 * LINK_CPB) @(negedge clk);
    check(replies.size() == 0, "nothing sent at B pulses with IB, OB clear");

    // MERR: a table that does not exist
    cmd(32'h8000_0025);
    get_status(st);
    check(st == 8'h45, $sformatf("MERR with table 5 (%h)", st));
    // BOF: clear the counter and count below zero
    cmd(32'h8000_0060);
    cmd(32'h8000_0000);                 // immediate, BCLR clear: enable
    b_step(0);
    get_status(st);
    check(st == 8'h20, $sformatf("BOF after counting below zero (%h)", st));
    // RxEP: corrupted frame, then command 1
    begin
      logic [34:0] f;
      f = {1'b0, 32'h3000_0000, ^32'h3000_0000, 1'b1};
      for (int i = 34; i >= 0; i--) begin
        link_rxd = f[i];
        repeat (LINK_CPB) @(negedge clk);
      end
      link_rxd = 1;
      repeat (6) @(negedge clk);
    end
    get_status(st);
    check(st[7], "RxEP after a bad frame");
    cmd(32'h1000_0000);
    get_status(st);
    check(!st[7], "RxEP cleared by command 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
