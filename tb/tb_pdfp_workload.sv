// tb_pdfp_workload: full-size workload test of a PDFP and its PDFP-CTRL at
// the default sizes, driven only through the VME side and the PDFP front
// panel.
//   1. A whole look-up table (0x20000 words, table 0) is loaded through the
//      fifo register with D32 transfers. The host writes in blocks of 64
//      words and waits while FH is set, so the FIFO never overflows; TxEERR
//      must stay clear. The table words follow a formula,
//      word(b) = (b * 40503) ^ (b >> 5), truncated to 16 bits, so no data
//      file is needed.
//   2. Trigger table entry 0 is written with IB and table 0, and the B
//      counter is stepped up through all 0x20000 positions, ending back at
//      0 with BOF set. After every pulse the output connector must show
//      word(B) plus the correction input, which takes a new random value
//      at every step.
//   3. Each B pulse returns the correction input to the controller, which
//      stores it at its pointer: after the walk, the whole 128 kWord
//      receive memory is read back over VME and compared with the values
//      driven, and the pointer must have wrapped to 0.
//   4. A status request must report table 0 and BOF.
// The pulse spacing (150 PDFP clocks) is just above one reply word on the
// link (35 bit times of 4 clocks), the highest B rate at which every input
// copy can be sent; the FIFO and table sizes are the PDFP-CTRL's and the
// PDFP's defaults. Both clocks run at 100 MHz, 0.5% apart.
module tb_pdfp_workload;
  import pdfp_pkg::*;
  localparam logic [23:0] SIO = 24'h00_2800;
  localparam logic [23:0] STD = 24'h48_0000;
  localparam int CPB = CLKS_PER_BIT;
  localparam int TWORDS = 'h20000;
  localparam int STEP = 150;
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
  logic [15:0] corr_of [TWORDS];
  int n_loaded = 0, n_fh_wait = 0, n_steps = 0, n_wrap = 0, n_read = 0;

  pdfp_top dut (
    .ctrl_clk(clk), .ctrl_rst_n(rst_n), .base_jumpers,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a, .vme_lword_n, .vme_dh_i, .vme_d_i, .vme_d_o,
    .vme_d_oe, .vme_dtack_n, .vme_iack_n, .vme_iackin_n, .vme_iackout_n,
    .vme_irq_n, .dp_we, .dp_data, .dp_dir,
    .nim_clk, .nim_rst_n(rst_n), .b_up, .b_down, .trig, .stb, .corr_in, .out_value
  );

  always #5 clk = ~clk;
  always #5.025 nim_clk = ~nim_clk;

  `include "vme_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] word(input int b);
    return 16'((b * 40503) ^ (b >> 5));
  endfunction

  task automatic rd_ctrl(output logic [15:0] d);
    bit ack;
    vme_rd(AM_SHORT, SIO + 4, d, ack);
  endtask

  task automatic put(input logic [31:0] w);
    bit ack;
    vme_wr32(AM_SHORT, SIO + 0, w, ack);
  endtask

  task automatic drain();
    logic [15:0] d;
    do begin
      repeat (20) @(negedge clk);
      rd_ctrl(d);
    end while (!d[10]);
    repeat (40 * CPB) @(negedge clk);
  endtask

  initial begin
    logic [15:0] d;
    bit ack;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    vme_wr(AM_SHORT, SIO + 6, 16'h0089, ack);   // memory window at 0x480000

    // 1. load the whole of table 0
    put(32'h2000_0000);
    for (int b = 0; b < TWORDS; b++) begin
      if (b % 64 == 0)
        forever begin
          rd_ctrl(d);
          if (!d[11]) break;
          n_fh_wait++;
          repeat (100) @(negedge clk);
        end
      put({16'h3000, word(b)});
      n_loaded++;
    end
    drain();
    rd_ctrl(d);
    check(!d[9], "no FIFO overrun while loading");

    // 2. walk B through every position of the table
    vme_wr(AM_SHORT, SIO + 4, 16'h0010, ack);   // PCLR, pointer counts up
    put(32'h8000_0420);                          // now: table 0, IB
    drain();
    repeat (10) @(negedge nim_clk);
    check(out_value == word(0), $sformatf("B = 0: out %h exp %h", out_value, word(0)));
    for (int k = 0; k < TWORDS; k++) begin
      int pos;
      corr_in = 16'($urandom);
      corr_of[k] = corr_in;
      b_up = 1;
      repeat (3) @(negedge nim_clk);
      b_up = 0;
      repeat (5) @(negedge nim_clk);
      pos = (k + 1) % TWORDS;
      if (pos == 0) n_wrap++;
      check(out_value == 16'(word(pos) + corr_in),
            $sformatf("step %0d: out %h exp %h", k, out_value, 16'(word(pos) + corr_in)));
      n_steps++;
      repeat (STEP - 8) @(negedge nim_clk);
    end
    repeat (2 * 36 * CPB) @(negedge clk);

    // 3. the receive memory holds every correction value, in order
    vme_rd(AM_STD, STD + 24'h7_FFFE, d, ack);
    check(ack && d == 16'h0, $sformatf("pointer wrapped to 0 (%h)", d));
    for (int k = 0; k < TWORDS; k++) begin
      vme_rd(AM_STD, STD + 24'(2 * k), d, ack);
      check(ack && d == corr_of[k], $sformatf("memory word %0d: %h exp %h", k, d, corr_of[k]));
      n_read++;
    end

    // 4. status: table 0, BOF from the wrap
    put(32'h0000_0000);
    drain();
    repeat (40 * CPB) @(negedge clk);
    rd_ctrl(d);
    check(d[13] && d[7:0] == 8'h20, $sformatf("status %h: table 0 with BOF", d[7:0]));

    check(n_loaded == TWORDS && n_fh_wait > 0, "whole table loaded, host held off by FH");
    check(n_steps == TWORDS && n_wrap == 1, "every table position visited once");
    check(n_read == TWORDS, "whole receive memory read back");
    $display("workload: loaded=%0d fh_waits=%0d steps=%0d read=%0d", n_loaded, n_fh_wait,
             n_steps, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
