// tb_sync_fifo: self-checking test of sync_fifo at its default 256 x 32
// size. Fills the FIFO completely with random words, checking the empty,
// half-full and full flags at every level, tries a push into the full FIFO,
// drains it while comparing against a queue model, then runs a random mix of
// pushes and pops, and finally checks srst.
module tb_sync_fifo;
  localparam int W = 32, D = 256;
  logic clk = 0, rst_n = 0, srst = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, half, full;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_flags();
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == D), "full flag");
    check(half == (model.size() >= D/2), "half flag");
    check(count == model.size(), "count");
    if (model.size() > 0) check(rdata == model[0], "head word");
  endtask

  task automatic step(input bit do_push, input bit do_pop);
    push <= do_push;
    pop  <= do_pop;
    wdata <= $urandom;
    @(posedge clk);
    #1;
    begin
      bit acc = do_push && (model.size() < D);
      if (do_pop && model.size() > 0) void'(model.pop_front());
      if (acc) model.push_back(wdata);
    end
    push = 0; pop = 0;
    check_flags();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check_flags();
    for (int i = 0; i < D; i++) step(1, 0);
    check(full, "full after DEPTH pushes");
    step(1, 0);  // ignored
    for (int i = 0; i < D; i++) step(0, 1);
    check(empty, "empty after draining");
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 2) != 0, $urandom_range(0, 1) != 0);
    srst = 1; @(posedge clk); #1; srst = 0;
    model.delete();
    check_flags();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
