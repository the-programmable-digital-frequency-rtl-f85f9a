// tb_b_counter: self-checking test of the B counter. Applies random up,
// down, clear and enable strobes and compares count, direction, enable and
// overflow with a reference model every clock; runs the count through both
// ends of its range to provoke wrap-around and the overflow flag.
module tb_b_counter;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, up = 0, down = 0, clr = 0, en = 0;
  logic [W-1:0] count;
  logic dir, enabled, bof;
  int checks = 0, failures = 0;
  int m_count = 0;
  bit m_dir = 0, m_en = 1, m_bof = 0;
  int n_wrap = 0;

  b_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input bit u, input bit d, input bit c, input bit e);
    up <= u; down <= d; clr <= c; en <= e;
    @(posedge clk);
    if (c) begin m_count = 0; m_en = 0; m_bof = 0; end
    else begin
      if (m_en && u != d) begin
        m_dir = d;
        if (u) begin
          if (m_count == (1 << W) - 1) begin m_bof = 1; m_count = 0; n_wrap++; end
          else m_count++;
        end else begin
          if (m_count == 0) begin m_bof = 1; m_count = (1 << W) - 1; n_wrap++; end
          else m_count--;
        end
      end
      if (e) m_en = 1;
    end
    #1;
    check(count == W'(m_count), $sformatf("count %0d exp %0d", count, m_count));
    check(dir == m_dir && enabled == m_en && bof == m_bof, "dir/enabled/bof");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(enabled && count == 0, "enabled out of reset");
    for (int i = 0; i < 20; i++) step(0, 1, 0, 0);    // wrap below zero
    step(0, 0, 1, 0);                                  // clear and disable
    for (int i = 0; i < 5; i++) step(1, 0, 0, 0);     // ignored
    step(0, 0, 0, 1);                                  // enable
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 2) == 0, $urandom_range(0, 2) == 0,
           $urandom_range(0, 200) == 0, $urandom_range(0, 50) == 0);
    check(n_wrap > 0, "overflow happened");
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
