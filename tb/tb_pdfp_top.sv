// tb_pdfp_top: end-to-end test of a PDFP and its PDFP-CTRL at the default
// sizes (four 128 kWord tables, 256 x 32 FIFO, 128 kWord receive memory).
// The two modules run from clocks 0.5% apart, as two crates would.
// Everything is done as a VME host would do it, through the controller:
//   1. load 300 words of table 0 and 40 of table 1 (the latter with D32
//      transfers) through the fifo register, polling FF so that no word is lost (the FIFO reaches half
//      full and full, and drains empty, raising the FIFO-empty interrupt);
//   2. arm the trigger table as in the description's examples (clear and
//      disable at once, enable with table 0 at trigger 1, table 1 at
//      trigger 2), with IB set so that every B pulse sends the correction
//      input back into the controller's memory and OB so that the output
//      goes to its dual-port RAM port;
//   3. ramp B up and down and check the output connector after every pulse
//      against the loaded table, with and without the correction, and the
//      controller's memory and pointer (steered by DIR with CDE set);
//   4. strobe replies, status requests with the table number, MERR and BOF.
// It counts how often each mechanism happened and fails if one never did.
module tb_pdfp_top;
  import pdfp_pkg::*;
  localparam logic [23:0] SIO = 24'h00_2800;
  localparam logic [23:0] STD = 24'h48_0000;
  localparam int CPB = CLKS_PER_BIT;
  logic clk = 0, nim_clk = 0, rst_n = 0;
  logic [6:0] base_jumpers = 7'h14;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [5:0] vme_am = '0;
  logic [23:1] vme_a = '0;
  logic vme_lword_n = 1;
  logic [15:0] vme_dh_i = '0;
  logic [15:0] vme_d_i = '0, vme_d_o;
  logic vme_d_oe, vme_dtack_n;
  logic vme_iack_n = 1, vme_iackin_n = 1, vme_iackout_n;
  logic [7:1] vme_irq_n;
  logic dp_we, dp_dir;
  logic [15:0] dp_data;
  logic b_up = 0, b_down = 0, stb = 0;
  logic [6:1] trig = '0;
  logic [15:0] corr_in = '0, out_value;
  int checks = 0, failures = 0;
  logic [15:0] tbl [int];
  logic [15:0] dp_q [$];

  // mechanism counters
  int n_fh = 0, n_ff = 0, n_irq = 0, n_up = 0, n_down = 0, n_disabled = 0,
      n_trig = 0, n_imm = 0, n_table_sw = 0, n_mode = 0, n_ib = 0, n_ob = 0,
      n_strobe = 0, n_status = 0, n_merr = 0, n_bof = 0, n_cde = 0, n_d32 = 0;

  pdfp_top dut (
    .ctrl_clk(clk), .ctrl_rst_n(rst_n), .base_jumpers,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a, .vme_lword_n, .vme_dh_i, .vme_d_i, .vme_d_o,
    .vme_d_oe, .vme_dtack_n, .vme_iack_n, .vme_iackin_n, .vme_iackout_n,
    .vme_irq_n, .dp_we, .dp_data, .dp_dir,
    .nim_clk, .nim_rst_n(rst_n), .b_up, .b_down, .trig, .stb, .corr_in, .out_value
  );

  always #5 clk = ~clk;
  always #5.025 nim_clk = ~nim_clk;
  always @(posedge clk) if (rst_n && dp_we) dp_q.push_back(dp_data);

  `include "vme_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd_ctrl(output logic [15:0] d);
    bit ack;
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    if (d[11]) n_fh++;
  endtask

  // one command word through the fifo register; waits while FF is set
  task automatic put(input logic [31:0] w, input bit long = 0);
    logic [15:0] d;
    bit ack, was_full;
    was_full = 0;
    forever begin
      rd_ctrl(d);
      if (!d[12]) break;
      was_full = 1;
      repeat (50) @(negedge clk);
    end
    if (was_full) n_ff++;
    if (long) begin
      vme_wr32(AM_SHORT, SIO + 0, w, ack);
      n_d32++;
    end else begin
      vme_wr(AM_SHORT, SIO + 0, w[31:16], ack);
      vme_wr(AM_SHORT, SIO + 2, w[15:0], ack);
    end
  endtask

  // wait until the FIFO is empty and the last word has reached the PDFP
  task automatic drain();
    logic [15:0] d;
    do begin
      repeat (20) @(negedge clk);
      rd_ctrl(d);
    end while (!d[10]);
    repeat (40 * CPB) @(negedge clk);
  endtask

  task automatic nim_pulse(input int which);
    for (int lvl = 1; lvl >= 0; lvl--) begin
      case (which)
        0: b_up = 1'(lvl);
        1: b_down = 1'(lvl);
        2: stb = 1'(lvl);
        default: trig[which - 2] = 1'(lvl);
      endcase
      repeat (3) @(negedge nim_clk);
    end
  endtask

  function automatic logic [15:0] word_at(input int t, input int b);
    return tbl.exists(t * 'h20000 + b) ? tbl[t * 'h20000 + b] : 16'h0;
  endfunction

  task automatic get_status(output logic [7:0] st);
    logic [15:0] d;
    put(32'h0000_0000);
    drain();
    repeat (40 * CPB) @(negedge clk);
    rd_ctrl(d);
    check(d[13], "Stat set by returned status");
    n_status++;
    st = d[7:0];
  endtask

  initial begin
    logic [15:0] d;
    logic [7:0] st;
    bit ack;
    int bpos, ptr_exp, n_stored;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    vme_wr(AM_SHORT, SIO + 6, 16'h0089, ack);   // memory window at 0x480000
    vme_wr(AM_SHORT, SIO + 8, 16'h0040, ack);   // vector 0x40
    vme_wr(AM_SHORT, SIO + 10, 16'h0005, ack);  // level 5
    vme_wr(AM_SHORT, SIO + 4, 16'h0041, ack);   // FEIE, CDE

    // 1. load the tables
    put(32'h2000_0000);
    for (int b = 0; b < 300; b++) begin
      logic [15:0] v;
      v = 16'(1000 + 7 * b + (b * b) % 13);
      tbl[b] = v;
      put({16'h3000, v});
    end
    put(32'h2002_0000);
    for (int b = 0; b < 40; b++) begin
      tbl['h20000 + b] = 16'($urandom);
      put({16'h3000, tbl['h20000 + b]}, 1);   // D32 transfers
    end
    drain();
    if (vme_irq_n == 7'b1101111) begin
      logic [15:0] v;
      vme_iack_cycle(3'd5, v, ack);
      check(ack && v[7:0] == 8'h40, "FIFO-empty interrupt vector");
      n_irq++;
    end
    vme_wr(AM_SHORT, SIO + 4, 16'h0040, ack);   // FEIE off, CDE on

    // 2. trigger table
    corr_in = 16'h0020;
    put(32'h8000_0660);    // now: table 0, clear and disable, IB and OB
    drain();
    n_imm++;
    repeat (10) @(negedge nim_clk);
    check(out_value == word_at(0, 0) + 16'h0020, "output at B = 0 plus correction");
    nim_pulse(0);
    repeat (10) @(negedge nim_clk);
    check(out_value == word_at(0, 0) + 16'h0020, "B pulse ignored while disabled");
    n_disabled++;
    put(32'h8000_1020);    // trigger 1: table 0, enable
    put(32'h8000_2021);    // trigger 2: table 1
    drain();
    nim_pulse(3);
    n_trig++;
    repeat (10) @(negedge nim_clk);

    // 3. ramp B up, then down, checking the output and the returned words
    vme_wr(AM_SHORT, SIO + 4, 16'h0050, ack);   // PCLR, CDE
    dp_q.delete();
    bpos = 0; ptr_exp = 0; n_stored = 0;
    for (int i = 0; i < 270; i++) begin
      bit up;
      up = (i < 150) || (bpos == 0) ? 1'b1 : 1'b0;
      corr_in = 16'(i);
      nim_pulse(up ? 0 : 1);
      if (up) begin bpos++; n_up++; end else begin bpos--; n_down++; end
      repeat (8) @(negedge nim_clk);
      check(out_value == word_at(0, bpos) + 16'(i),
            $sformatf("ramp %0d: out %h exp %h", i, out_value, word_at(0, bpos) + 16'(i)));
      repeat (2 * 36 * CPB) @(negedge nim_clk);  // two reply words
      // IB: the correction word is in the controller memory at the pointer
      vme_rd(AM_STD, STD + 24'(2 * ptr_exp), d, ack);
      check(d == 16'(i), $sformatf("memory word %0d: %h exp %h", ptr_exp, d, 16'(i)));
      n_ib++;
      ptr_exp = up ? ptr_exp + 1 : ptr_exp - 1;
      if (!up) n_cde++;
      vme_rd(AM_STD, STD + 24'h7_FFFE, d, ack);
      check(d == 16'(ptr_exp), "pointer follows DIR");
      // OB: the output word on the dual-port RAM port
      if (dp_q.size() > 0) begin
        check(dp_q[$] == word_at(0, bpos) + 16'(i), "output copy on the dual-port RAM port");
        n_ob++;
      end
    end
    // mode switch: table word alone
    put(32'h5000_0000);
    drain();
    n_mode++;
    repeat (10) @(negedge nim_clk);
    check(out_value == word_at(0, bpos), "mode 0 drops the correction");
    // trigger 2: table 1
    nim_pulse(4);
    n_trig++;
    repeat (10) @(negedge nim_clk);
    check(out_value == word_at(1, bpos), "table 1 after trigger 2");
    n_table_sw++;
    get_status(st);
    check(st == 8'h01, $sformatf("status table 1 (%h)", st));

    // 4. strobe with IS and OS
    put(32'h8000_0180);
    drain();
    dp_q.delete();
    vme_rd(AM_STD, STD + 24'h7_FFFE, d, ack);
    ptr_exp = int'(d);
    corr_in = 16'h5A5A;
    nim_pulse(2);
    repeat (3 * 36 * CPB) @(negedge clk);
    vme_rd(AM_STD, STD + 24'(2 * ptr_exp), d, ack);
    check(d == 16'h5A5A, "strobe input copy stored");
    check(dp_q.size() == 1 && dp_q[0] == word_at(1, bpos), "strobe output copy");
    if (d == 16'h5A5A && dp_q.size() == 1) n_strobe++;
    // MERR and BOF
    put(32'h8000_0027);    // table 7 does not exist
    get_status(st);
    check(st[6] && st[4:0] == 5'd7, $sformatf("MERR (%h)", st));
    if (st[6]) n_merr++;
    put(32'h8000_0060);
    put(32'h8000_0000);
    drain();
    nim_pulse(1);
    get_status(st);
    check(st[5], $sformatf("BOF (%h)", st));
    if (st[5]) n_bof++;

    // every mechanism must have happened
    check(n_fh > 0, "FIFO half full");
    check(n_ff > 0, "FIFO full");
    check(n_irq > 0, "interrupt");
    check(n_up > 0 && n_down > 0, "B up and down");
    check(n_disabled > 0, "counter disabled");
    check(n_trig > 1 && n_imm > 0, "triggered and immediate actions");
    check(n_table_sw > 0, "table switch");
    check(n_mode > 0, "mode switch");
    check(n_ib > 0 && n_ob > 0, "B-pulse replies");
    check(n_strobe > 0, "strobe replies");
    check(n_status > 0 && n_merr > 0 && n_bof > 0, "status, MERR, BOF");
    check(n_cde > 0, "pointer steered down by DIR");
    check(n_d32 > 0, "D32 fifo writes");
    $display("mechanisms: fh=%0d ff=%0d irq=%0d up=%0d down=%0d trig=%0d ib=%0d ob=%0d strobe=%0d status=%0d",
             n_fh, n_ff, n_irq, n_up, n_down, n_trig, n_ib, n_ob, n_strobe, n_status);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
