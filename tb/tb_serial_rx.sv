// tb_serial_rx: self-checking test of the link receiver. An independent
// line driver sends frames (start, 32 bits MSB first, odd parity, stop) with
// random gaps; some frames carry a wrong parity bit or a low stop bit. Good
// frames must come out once on data/valid, within a few clocks of the end
// of the frame; bad ones must pulse err and produce no word. Also checks
// that srst drops a frame in progress.
module tb_serial_rx;
  localparam int CPB = 4;
  logic clk = 0, rst_n = 0, srst = 0, rxd = 1;
  logic [31:0] data;
  logic valid, err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [31:0] last_word;
  longint cyc = 0, t_valid = 0;

  serial_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (valid) begin n_valid++; last_word = data; t_valid = cyc; end
    if (err) n_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [31:0] w, input bit bad_par, input bit bad_stop);
    logic [34:0] f;
    f = {1'b0, w, ~(^w) ^ bad_par, ~bad_stop};
    for (int i = 34; i >= 0; i--) begin
      rxd <= f[i];
      repeat (CPB) @(posedge clk);
    end
    rxd <= 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      logic [31:0] w;
      int kind, v0, e0;
      longint t_end;
      w = $urandom;
      kind = $urandom_range(0, 5);   // 0: bad parity, 1: bad stop, else good
      v0 = n_valid; e0 = n_err;
      send(w, kind == 0, kind == 1);
      t_end = cyc;
      repeat (2 * CPB + 4) @(posedge clk);
      if (kind >= 2) begin
        check(n_valid == v0 + 1 && n_err == e0, "one word for a good frame");
        check(last_word == w, $sformatf("word %h got %h", w, last_word));
        check(t_valid - t_end <= 4, "word out within 4 clocks of frame end");
      end else begin
        check(n_valid == v0 && n_err == e0 + 1, "error pulse for a bad frame");
      end
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    // srst in the middle of a frame: nothing comes out
    begin
      int v0;
      v0 = n_valid;
      fork
        // bits after the reset are all ones, so the receiver stays idle
        send(32'h003F_FFFF, 0, 0);
        begin repeat (13 * CPB) @(posedge clk); srst <= 1; @(posedge clk); srst <= 0; end
      join
      repeat (4 * CPB) @(posedge clk);
      check(n_valid == v0, "srst drops the frame");
      send(32'hCAFE_F00D, 0, 0);
      repeat (2 * CPB + 4) @(posedge clk);
      check(last_word == 32'hCAFE_F00D, "receives again after srst");
    end
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
