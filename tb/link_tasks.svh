// link_tasks.svh: an independent model of one end of the PDFP serial link
// for testbenches (frame: start bit, 32 data bits MSB first, odd parity,
// stop bit, LINK_CPB clocks per bit). Included inside a testbench module
// that declares clk and defines LINK_CPB.

// drive one frame on a line
task automatic link_send(ref logic line, input logic [31:0] w);
  logic [34:0] f;
  f = {1'b0, w, ~(^w), 1'b1};
  for (int i = 34; i >= 0; i--) begin
    line = f[i];
    repeat (LINK_CPB) @(negedge clk);
  end
  line = 1'b1;
endtask

// wait for and decode one frame; ok is 0 on a parity or stop-bit error
task automatic link_recv(ref logic line, output logic [31:0] w, output bit ok);
  logic p, s;
  @(negedge line);
  repeat (LINK_CPB / 2) @(posedge clk);
  for (int b = 31; b >= 0; b--) begin
    repeat (LINK_CPB) @(posedge clk);
    w[b] = line;
  end
  repeat (LINK_CPB) @(posedge clk); p = line;
  repeat (LINK_CPB) @(posedge clk); s = line;
  ok = s && ((^w ^ p) == 1'b1);
endtask
