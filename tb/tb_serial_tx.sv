// tb_serial_tx: self-checking test of the link transmitter. Sends random
// words back to back and decodes the line independently: start bit, 32 bits
// MSB first, odd parity, stop bit, each CLKS_PER_BIT clocks, sampled in the
// middle of the bit. Checks every field, the word-to-word spacing of 35 bit
// periods, and that srst aborts a frame and idles the line.
module tb_serial_tx;
  localparam int CPB = 4;
  logic clk = 0, rst_n = 0, srst = 0, valid = 0, ready, txd;
  logic [31:0] data = '0;
  int checks = 0, failures = 0;
  logic [31:0] sent [$];
  longint t_start [$];

  serial_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // producer
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      data  = $urandom;
      valid = 1;
      sent.push_back(data);
      @(negedge clk);
      valid = 0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 200)) @(posedge clk);
    end
  end

  // line decoder
  initial begin : decoder
    logic [31:0] w;
    logic p, s;
    longint last = -1;
    @(posedge rst_n);
    for (int n = 0; n < 40; n++) begin
      @(negedge txd);
      if (last >= 0 && !(n > 0 && sent.size() == 0))
        t_start.push_back(cyc - last);
      last = cyc;
      repeat (CPB / 2) @(posedge clk);
      check(txd == 0, "start bit");
      for (int b = 31; b >= 0; b--) begin
        repeat (CPB) @(posedge clk);
        w[b] = txd;
      end
      repeat (CPB) @(posedge clk); p = txd;
      repeat (CPB) @(posedge clk); s = txd;
      check(s == 1, "stop bit");
      check((^w ^ p) == 1, "odd parity");
      check(sent.size() > 0 && w == sent[0], $sformatf("word %0d %h", n, w));
      if (sent.size() > 0) void'(sent.pop_front());
    end
    // spacing: words sent back to back are 35 bit periods apart (+1 idle clock)
    begin
      int back_to_back = 0;
      foreach (t_start[i]) if (t_start[i] <= 35 * CPB + 1) begin
        back_to_back++;
        check(t_start[i] == 35 * CPB + 1, "frame spacing");
      end
      check(back_to_back > 5, "back-to-back frames seen");
    end
    // abort by srst
    repeat (10) @(posedge clk);
    data <= 32'h0; valid <= 1; @(posedge clk); valid <= 0;
    repeat (5 * CPB) @(posedge clk);
    check(!ready, "busy in frame");
    srst <= 1; @(posedge clk); srst <= 0; @(posedge clk); #1;
    check(ready && txd, "srst idles line");
    repeat (40 * CPB) @(posedge clk); #1;
    check(txd == 1, "line stays idle after abort");
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
