// tb_ctrl_rx_mem: self-checking test of the controller's receive side at its
// default 128 kWord size. Feeds status (code 0), input copies (code 6) with
// both DIR values and output copies (code 7), with CDE off and on, and
// checks the status latch and its strobe, the pointer movement (up only
// without CDE, steered by DIR with it, wrapping at zero), the dual-port RAM
// port, PCLR, and the memory contents through the read port.
module tb_ctrl_rx_mem;
  localparam int W = 16, MW = 'h20000;
  logic clk = 0, rst_n = 0, rx_valid = 0, ptr_clr = 0, cde = 0;
  logic [31:0] rx_word = '0;
  logic [16:0] ptr, rd_addr = '0;
  logic [7:0] status;
  logic stat_new, dp_we, dp_dir;
  logic [W-1:0] dp_data;
  logic [15:0] rd_data;
  int checks = 0, failures = 0;
  int m_ptr = 0;
  logic [15:0] model [int];

  ctrl_rx_mem #(.DATA_W(W), .MEM_WORDS(MW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rx(input logic [3:0] code, input bit dir, input logic [26:0] d);
    rx_word <= {code, dir, d}; rx_valid <= 1;
    @(posedge clk); rx_valid <= 0; #1;
    check(stat_new == (code == 0), "status strobe");
    check(dp_we == (code == 7), "dual-port RAM strobe");
    if (code == 0) check(status == d[7:0], "status value");
    if (code == 7) check(dp_data == d[15:0] && dp_dir == dir, "dual-port RAM data");
    if (code == 6) begin
      model[m_ptr] = d[15:0];
      m_ptr = (cde && dir) ? (m_ptr + MW - 1) % MW : (m_ptr + 1) % MW;
    end
    check(ptr == 17'(m_ptr), $sformatf("pointer %h exp %h", ptr, m_ptr));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 9);
      if (i == 100) cde <= 1;
      if (i == 200) cde <= 0;
      rx(k == 0 ? 4'h0 : k < 6 ? 4'h6 : k < 8 ? 4'h7 : 4'(k + 1),
         $urandom_range(0, 1), 27'($urandom));
      @(posedge clk);
    end
    // down from zero wraps to the top of the memory
    ptr_clr <= 1; @(posedge clk); ptr_clr <= 0; m_ptr = 0; #1;
    check(ptr == 0, "PCLR");
    cde <= 1;
    rx(4'h6, 1, 27'h1234);
    cde <= 0;
    foreach (model[a]) begin
      rd_addr <= 17'(a);
      @(posedge clk); @(posedge clk); #1;
      check(rd_data == model[a], $sformatf("memory %h: %h exp %h", a, rd_data, model[a]));
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
