// tb_out_adder: self-checking test of the output stage. Random table and
// correction words in both modes; the registered output must equal the
// table word, or the sum modulo 2^16, one clock later.
module tb_out_adder;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, add_en = 0;
  logic [W-1:0] table_word = '0, corr = '0, out_value;
  int checks = 0, failures = 0;

  out_adder #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] t, c;
      logic a;
      int unsigned exp;
      t = $urandom; c = $urandom; a = $urandom_range(0, 1);
      if (i < 20) begin t = 16'hFFFF - 16'(i); c = 16'(i * 7); end  // carries out
      table_word <= t; corr <= c; add_en <= a;
      @(posedge clk); #1;
      exp = a ? (32'(t) + 32'(c)) & 32'hFFFF : 32'(t);
      checks++;
      if (out_value != W'(exp)) begin
        failures++;
        $display("FAIL: t=%h c=%h a=%b out=%h", t, c, a, out_value);
      end
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
