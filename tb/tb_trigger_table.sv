// tb_trigger_table: self-checking test of the trigger table. Writes entry 0
// (immediate action, send-back bits), arms entries 1..6 with random actions,
// fires single triggers, several at once and unarmed ones, and checks every
// action (source, BCLR, TS, table) and its one-clock latency against a model
// that serves pending triggers lowest number first. Entry 7 must never fire.
module tb_trigger_table;
  import pdfp_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [2:0] wr_idx = '0;
  trig_entry_t wr_entry = '0, cfg0;
  logic [6:1] trig = '0;
  logic act, act_bclr, act_ts;
  logic [4:0] act_tb;
  logic [2:0] act_src;
  int checks = 0, failures = 0;
  trig_entry_t model [8];
  bit armed [8];
  int n_act = 0;

  trigger_table dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model of the pending triggers, updated from the inputs as
  // the DUT samples them; every action must be the one the model predicts
  bit mpend [7];
  bit mimm;
  always @(posedge clk) if (rst_n) begin
    int s;
    s = -1;
    if (mimm) s = 0;
    else for (int k = 6; k >= 1; k--) if (mpend[k]) s = k;
    if (act) begin
      n_act++;
      check(s >= 0, "unexpected action");
      if (s >= 0) begin
        check(act_src == 3'(s), $sformatf("action source %0d exp %0d", act_src, s));
        check(act_bclr == model[s].bclr && act_ts == model[s].ts && act_tb == model[s].tb,
              "action fields");
      end
      if (s > 0) mpend[s] = 0;
      mimm = 0;
    end else begin
      check(s < 0, "action missing");
    end
    if (wr) begin
      model[wr_idx] = wr_entry;
      armed[wr_idx] = 1;
      if (wr_idx == 0) mimm = 1;
    end
    for (int k = 1; k <= 6; k++) if (trig[k] && armed[k]) mpend[k] = 1;
  end

  task automatic write(input int idx, input trig_entry_t e);
    @(negedge clk);
    wr = 1; wr_idx = 3'(idx); wr_entry = e;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic fire(input logic [6:1] t);
    @(negedge clk);
    trig = t;
    @(negedge clk);
    trig = '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fire(6'b111111);                       // nothing armed yet
    repeat (3) @(posedge clk);
    check(n_act == 0, "unarmed triggers do nothing");
    write(0, '{ib: 1, ob: 0, is: 0, os: 1, bclr: 1, ts: 1, tb: 5'd0});
    @(posedge clk); #1;
    check(cfg0.ib && !cfg0.ob && !cfg0.is && cfg0.os, "send-back bits from entry 0");
    for (int k = 1; k <= 7; k++) write(k, trig_entry_t'($urandom));
    repeat (2) @(posedge clk);
    check(!mimm, "immediate action done within a clock");
    for (int i = 0; i < 300; i++) begin
      fire(6'($urandom) & (($urandom_range(0, 3) == 0) ? 6'h3F : 6'(1 << $urandom_range(0, 5))));
      repeat ($urandom_range(0, 8)) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    check(mpend.sum() with (int'(item)) == 0, "all triggers served");
    check(n_act > 40, $sformatf("actions seen: %0d", n_act));
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
