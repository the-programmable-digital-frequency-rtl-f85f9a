// tb_ctrl_vme_regs: self-checking test of the PDFP-CTRL's VME slave. With
// the jumpers at the preferred short I/O base 0x2800 and the memory window
// at the preferred standard address 0x480000, it checks: the 32-bit fifo
// word (fixed ones and 50 random ones) assembled from two 16-bit writes and
// pushed once, or written in one D32 transfer; TxEERR on a write into a full
// FIFO and its clearing by TxR; the pulses of TxR, RxR and
// PCLR and the stored FEIE, FHIE and CDE; the ctrl read-back layout, Stat
// set by a new status and cleared by reading; RxEV; no DTACK* for a wrong
// base, a wrong address modifier, or a disabled window; memory reads with
// their wait states and the pointer at the top of the window; and the
// interrupter (FIFO empty and half-full events, IRQ* level, vector, the
// IACK daisy chain).
module tb_ctrl_vme_regs;
  logic clk = 0, rst_n = 0;
  logic [6:0] base_jumpers = 7'h14;   // 0x2800 >> 9
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [5:0] vme_am = '0;
  logic [23:1] vme_a = '0;
  logic vme_lword_n = 1;
  logic [15:0] vme_dh_i = '0;
  logic [15:0] vme_d_i = '0, vme_d_o;
  logic vme_d_oe, vme_dtack_n;
  logic vme_iack_n = 1, vme_iackin_n = 1, vme_iackout_n;
  logic [7:1] vme_irq_n;
  logic fifo_push;
  logic [31:0] fifo_wdata;
  logic fifo_empty = 1, fifo_half = 0, fifo_full = 0;
  logic tx_rst, rx_rst, ptr_clr, cde;
  logic [7:0] pdfp_status = '0;
  logic stat_new = 0, rx_err = 0;
  logic [16:0] mem_addr, ptr = 17'h0_1234;
  logic [15:0] mem_rdata;
  int checks = 0, failures = 0;
  int n_push = 0, n_txr = 0, n_rxr = 0, n_pclr = 0;
  logic [31:0] last_push;

  localparam logic [23:0] SIO = 24'h00_2800;
  localparam logic [23:0] STD = 24'h48_0000;

  ctrl_vme_regs #(.MEM_AW(17)) dut (.*);

  always #5 clk = ~clk;

  // memory stand-in: word = address pattern, one-clock read
  always_ff @(posedge clk) mem_rdata <= mem_addr[15:0] ^ 16'hA5A5;

  always @(posedge clk) if (rst_n) begin
    if (fifo_push) begin n_push++; last_push = fifo_wdata; end
    if (tx_rst) n_txr++;
    if (rx_rst) n_rxr++;
    if (ptr_clr) n_pclr++;
  end

  `include "vme_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] d;
    bit ack;
    int n0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // fifo register: two 16-bit halves, pushed on the low half
    n0 = n_push;
    vme_wr(AM_SHORT, SIO + 0, 16'h8000, ack);  check(ack, "fifo high write acked");
    check(n_push == n0, "no push on high half");
    vme_wr(AM_SHORT, SIO + 2, 16'h1020, ack);  check(ack, "fifo low write acked");
    check(n_push == n0 + 1 && last_push == 32'h8000_1020, "fifo word pushed");
    vme_rd(AM_SHORT, SIO + 0, d, ack);
    check(ack && d == 0, "fifo read gives no data but no bus error");
    // one D32 transfer
    n0 = n_push;
    vme_wr32(AM_SHORT, SIO + 0, 32'h3765_4321, ack);
    check(ack && n_push == n0 + 1 && last_push == 32'h3765_4321, "D32 fifo write");
    vme_wr32(AM_SHORT, SIO + 4, 32'h0000_0040, ack);
    check(!ack && !cde, "D32 to ctrl not answered");
    // random words, alternately as two halves and as one D32 transfer
    for (int i = 0; i < 50; i++) begin
      logic [31:0] w;
      w = $urandom;
      n0 = n_push;
      if (i % 2 == 1) vme_wr32(AM_SHORT, SIO + 0, w, ack);
      else begin
        vme_wr(AM_SHORT, SIO + 0, w[31:16], ack);
        vme_wr(AM_SHORT, SIO + 2, w[15:0], ack);
      end
      check(ack && n_push == n0 + 1 && last_push == w, $sformatf("random fifo word %h", w));
    end

    // ctrl write bits
    vme_wr(AM_SHORT, SIO + 4, 16'h005C, ack);   // CDE, PCLR, RxR, TxR
    check(ack && n_txr == 1 && n_rxr == 1 && n_pclr == 1 && cde, $sformatf("ctrl action bits %0d %0d %0d %0d %0d", ack, n_txr, n_rxr, n_pclr, cde));
    vme_wr(AM_SHORT, SIO + 4, 16'h0000, ack);
    check(!cde && n_txr == 1, "actions not repeated, CDE cleared");

    // status from the PDFP, Stat, RxEV, FIFO flags
    @(negedge clk); pdfp_status = 8'hA7; stat_new = 1; rx_err = 1;
    @(negedge clk); stat_new = 0; rx_err = 0;
    fifo_empty = 0; fifo_half = 1; fifo_full = 1;
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    check(ack && d == 16'h39A7, $sformatf("ctrl read %h", d));
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    check(d == 16'h19A7, "Stat cleared by reading");
    // write into a full FIFO: TxEERR
    vme_wr(AM_SHORT, SIO + 2, 16'h0000, ack);
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    check(d[9], "TxEERR after overrun");
    vme_wr(AM_SHORT, SIO + 4, 16'h000C, ack);  // TxR, RxR
    fifo_empty = 1; fifo_half = 0; fifo_full = 0;
    vme_rd(AM_SHORT, SIO + 4, d, ack);
    check(d == 16'h04A7, $sformatf("errors cleared by TxR/RxR %h", d));

    // decoding: wrong base, wrong AM, unused offset, window disabled
    vme_rd(AM_SHORT, 24'h00_2A04, d, ack);   check(!ack, "wrong base: no DTACK");
    vme_rd(AM_STD, SIO + 4, d, ack);         check(!ack, "wrong AM: no DTACK");
    vme_rd(AM_SHORT, SIO + 24'h20, d, ack);  check(!ack, "unused offset: no DTACK");
    vme_rd(AM_STD, STD + 24'h10, d, ack);    check(!ack, "window disabled");

    // memory window at 0x480000
    vme_wr(AM_SHORT, SIO + 6, 16'h0089, ack);   // E, A23..A19 = 0b01001
    for (int i = 0; i < 20; i++) begin
      logic [17:0] w;
      w = (i < 10) ? 18'($urandom_range(0, 'h1FFFF)) : 18'($urandom_range(0, 'h3FFF7));
      vme_rd(AM_STD, STD + {5'h0, w, 1'b0}, d, ack);
      check(ack && d == (16'(w) ^ 16'hA5A5), $sformatf("memory word %h: %h", w, d));
    end
    for (int i = 0; i < 8; i++) begin
      vme_rd(AM_STD, STD + 24'h7_FFF0 + 24'(2 * i), d, ack);
      check(ack && d == 16'h1234, "pointer at the top of the window");
    end
    vme_rd(AM_STD, 24'h50_0000, d, ack);   check(!ack, "other window: no DTACK");

    // interrupter: level 3, vector 0x5C
    vme_wr(AM_SHORT, SIO + 8, 16'h005C, ack);
    vme_wr(AM_SHORT, SIO + 10, 16'h0003, ack);
    check(vme_irq_n == 7'h7F, "no interrupt yet");
    vme_wr(AM_SHORT, SIO + 4, 16'h0002, ack);   // FHIE
    fifo_empty = 0;
    fifo_half = 1;
    repeat (3) @(posedge clk); #1;
    check(vme_irq_n == 7'b1111011, "IRQ3 on half-full crossing");
    vme_iack_cycle(3'd2, d, ack);
    check(!ack, "IACK of another level not answered");
    vme_iack_cycle(3'd3, d, ack);
    check(ack && d[7:0] == 8'h5C, "vector returned");
    repeat (2) @(posedge clk); #1;
    check(vme_irq_n == 7'h7F, "IRQ released after IACK");
    vme_wr(AM_SHORT, SIO + 4, 16'h0001, ack);   // FEIE only
    fifo_half = 0;
    repeat (3) @(posedge clk); #1;
    check(vme_irq_n == 7'h7F, "half-full ignored with FHIE off");
    fifo_empty = 1;
    repeat (3) @(posedge clk); #1;
    check(vme_irq_n == 7'b1111011, "IRQ3 on FIFO empty");
    vme_iack_cycle(3'd3, d, ack);
    check(ack && d[7:0] == 8'h5C, "vector returned again");
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
