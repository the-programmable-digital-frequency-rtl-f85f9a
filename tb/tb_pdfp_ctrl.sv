// tb_pdfp_ctrl: self-checking test of the whole PDFP-CTRL at its default
// sizes (256-word FIFO, 128 kWord memory). The testbench is the VME master
// and plays the PDFP at the far end of the serial link. It checks that
// words written to the fifo register leave on the link intact and in order
// at the link rate (35 bit times per word when back to back), random words
// written as D16 halves or as one D32 transfer among them, that the FIFO
// flags FE, FH and FF and the TxEERR overrun flag appear in ctrl when the
// host writes faster than the link, and that returned words land in the
// right place: status in ctrl (with Stat), input copies in the memory at
// the pointer (read back over VME), output copies on the dual-port RAM
// port, and a corrupted frame in RxEV.
module tb_pdfp_ctrl;
  localparam int LINK_CPB = 4;
  localparam logic [23:0] SIO = 24'h00_2800;
  localparam logic [23:0] STD = 24'h48_0000;
  logic clk = 0, rst_n = 0;
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
  logic link_txd, link_rxd = 1;
  logic dp_we, dp_dir;
  logic [15:0] dp_data;
  int checks = 0, failures = 0;
  logic [31:0] got [$];
  longint t_frame [$];
  longint cyc = 0;
  int n_dp = 0;
  logic [15:0] last_dp;

  pdfp_ctrl dut (.clk, .rst_n, .base_jumpers, .vme_as_n, .vme_ds_n, .vme_write_n,
    .vme_am, .vme_a, .vme_lword_n, .vme_dh_i, .vme_d_i, .vme_d_o, .vme_d_oe, .vme_dtack_n, .vme_iack_n,
    .vme_iackin_n, .vme_iackout_n, .vme_irq_n, .link_txd, .link_rxd,
    .dp_we, .dp_data, .dp_dir);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dp_we) begin n_dp++; last_dp = dp_data; end
  end

  `include "vme_tasks.svh"
  `include "link_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put_word(input logic [31:0] w);
    bit ack;
    vme_wr(AM_SHORT, SIO + 0, w[31:16], ack);
    vme_wr(AM_SHORT, SIO + 2, w[15:0], ack);
  endtask

  // far end of the link: collect every frame the controller sends
  initial begin
    logic [31:0] w;
    bit ok;
    forever begin
      link_recv(link_txd, w, ok);
      t_frame.push_back(cyc);
      if (!ok) begin checks++; failures++; $display("FAIL: bad frame on link"); end
      got.push_back(w);
    end
  end

  initial begin
    logic [15:0] d;
    bit ack, saw_fh, saw_ff;
    int n_sent;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);

    // a few command words, checked in order
    put_word(32'h1000_0000);
    put_word(32'h8000_0060);
    put_word(32'h3123_4567);
    repeat (4 * 35 * LINK_CPB) @(posedge clk);
    check(got.size() == 3, "three words sent");
    if (got.size() == 3)
      check(got[0] == 32'h1000_0000 && got[1] == 32'h8000_0060 && got[2] == 32'h3123_4567,
            "words intact and in order");
    if (t_frame.size() == 3)
      check(t_frame[2] - t_frame[1] == 35 * LINK_CPB + 1, "back-to-back frame spacing");
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    check(d[10] && !d[11] && !d[12], "FE after draining");

    // flood the FIFO faster than the link drains it
    got.delete();
    saw_fh = 0; saw_ff = 0; n_sent = 0;
    for (int i = 0; i < 330; i++) begin
      put_word(32'h3000_0000 | i);
      n_sent++;
      if (i % 16 == 0) begin
        vme_rd(AM_SHORT, SIO + 4, d, ack);
        if (d[11]) saw_fh = 1;
        if (d[12]) saw_ff = 1;
      end
    end
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    check(saw_fh, "FH seen");
    check(saw_ff || d[12], "FF seen");
    check(d[9], "TxEERR after writes into the full FIFO");
    repeat (260 * 35 * LINK_CPB) @(posedge clk);
    check(got.size() >= 256 && got.size() < 330, $sformatf("%0d words sent", got.size()));
    begin
      bit in_order = 1;
      foreach (got[i]) if (i > 0 && got[i][15:0] <= got[i-1][15:0]) in_order = 0;
      check(in_order && got[0] == 32'h3000_0000, "flooded words in order");
      for (int i = 0; i < 256; i++) if (got[i] != (32'h3000_0000 | i)) in_order = 0;
      check(in_order, "first 256 words intact");
    end

    // random words, alternately written as two D16 halves and as one D32 transfer
    got.delete();
    begin
      logic [31:0] sent [$];
      for (int i = 0; i < 60; i++) begin
        logic [31:0] w;
        w = $urandom;
        sent.push_back(w);
        if (i % 2 == 1) vme_wr32(AM_SHORT, SIO + 0, w, ack);
        else put_word(w);
        if (i % 8 == 7) repeat (8 * 35 * LINK_CPB) @(posedge clk);
      end
      repeat (70 * 35 * LINK_CPB) @(posedge clk);
      check(got.size() == 60, $sformatf("60 random words sent (%0d)", got.size()));
      foreach (sent[i])
        if (i < got.size()) check(got[i] == sent[i], $sformatf("random word %0d", i));
    end

    // returned words: status, input copies, output copies, a bad frame
    vme_wr(AM_SHORT, SIO + 6, 16'h0089, ack);          // window at 0x480000
    vme_wr(AM_SHORT, SIO + 4, 16'h0010, ack);          // PCLR
    link_send(link_rxd, 32'h0000_00A3);
    repeat (10) @(posedge clk);
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    check(d[13] && d[7:0] == 8'hA3, "status returned into ctrl with Stat");
    for (int i = 0; i < 5; i++) link_send(link_rxd, 32'h6000_1000 + i);
    link_send(link_rxd, 32'h7800_BEEF);
    repeat (10) @(posedge clk);
    check(n_dp == 1 && last_dp == 16'hBEEF, "output copy on the dual-port RAM port");
    for (int i = 0; i < 5; i++) begin
      vme_rd(AM_STD, STD + 24'(2 * i), d, ack);
      check(ack && d == 16'h1000 + i, $sformatf("memory word %0d = %h", i, d));
    end
    // random input copies after them, read back from the memory
    begin
      logic [15:0] v [40];
      for (int i = 0; i < 40; i++) begin
        v[i] = 16'($urandom);
        link_send(link_rxd, {16'h6000, v[i]});
      end
      repeat (10) @(posedge clk);
      for (int i = 0; i < 40; i++) begin
        vme_rd(AM_STD, STD + 24'(2 * (5 + i)), d, ack);
        check(ack && d == v[i], $sformatf("memory word %0d = %h", 5 + i, d));
      end
    end
    vme_rd(AM_STD, STD + 24'h7_FFFE, d, ack);
    check(d == 16'd45, "pointer after 45 words");
    // corrupted frame: parity inverted
    begin
      logic [34:0] f;
      f = {1'b0, 32'h6000_0001, ^32'h6000_0001, 1'b1};
      for (int i = 34; i >= 0; i--) begin
        link_rxd = f[i];
        repeat (LINK_CPB) @(negedge clk);
      end
      link_rxd = 1;
    end
    repeat (10) @(posedge clk);
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    check(d[8], "RxEV after a bad frame");
    vme_rd(AM_STD, STD + 24'h7_FFFE, d, ack);
    check(d == 16'd45, "bad frame not stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
