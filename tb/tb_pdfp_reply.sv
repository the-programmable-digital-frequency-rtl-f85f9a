// tb_pdfp_reply: self-checking test of the reply former. Raises status
// requests, B events (both directions) and strobes under random send-back
// settings (IB, OB, IS, OS), with connector values changing every clock,
// and checks the words that leave through the valid/ready port: code,
// DIR bit, data and order (status, then input, then output copy). Then
// stalls the consumer so the queue fills, and checks that words are lost
// with the lost flag raised, not corrupted.
module tb_pdfp_reply;
  import pdfp_pkg::*;
  localparam int W = 16, QD = 16;
  logic clk = 0, rst_n = 0, status_req = 0, b_evt = 0, b_dir = 0, stb_evt = 0;
  pdfp_status_t status = '0;
  trig_entry_t cfg0 = '0;
  logic [W-1:0] in_val = '0, out_val = '0;
  logic [31:0] tx_word;
  logic tx_valid, tx_ready = 0, lost;
  int checks = 0, failures = 0, n_lost = 0, n_words = 0;
  logic [31:0] exp_q [$];

  pdfp_reply #(.DATA_W(W), .QDEPTH(QD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (lost) n_lost++;
    if (tx_valid && tx_ready) begin
      n_words++;
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        check(tx_word == e, $sformatf("word %h exp %h", tx_word, e));
      end
    end
  end

  task automatic event_cycle(input bit st, input bit b, input bit d, input bit s);
    logic [W-1:0] iv, ov;
    pdfp_status_t sv;
    iv = $urandom; ov = $urandom; sv = pdfp_status_t'($urandom);
    status_req <= st; b_evt <= b; b_dir <= d; stb_evt <= s;
    in_val <= iv; out_val <= ov; status <= sv;
    @(posedge clk);
    status_req <= 0; b_evt <= 0; stb_evt <= 0;
    in_val <= $urandom; out_val <= $urandom;
    if (st) exp_q.push_back({4'h0, 1'b0, 19'h0, sv});
    if ((b && cfg0.ib) || (s && cfg0.is)) exp_q.push_back({4'h6, b ? d : 1'b0, 11'h0, iv});
    if ((b && cfg0.ob) || (s && cfg0.os)) exp_q.push_back({4'h7, b ? d : 1'b0, 11'h0, ov});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    tx_ready <= 1;
    for (int i = 0; i < 400; i++) begin
      if (i % 50 == 0) cfg0 <= trig_entry_t'({4'($urandom), 7'h0});
      @(posedge clk);
      event_cycle($urandom_range(0, 3) == 0, $urandom_range(0, 1), $urandom_range(0, 1),
                  $urandom_range(0, 2) == 0);
      repeat (4) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all words sent");
    check(n_lost == 0, "nothing lost while drained");
    // stall the consumer: the queue fills and further words are lost
    tx_ready <= 0;
    cfg0 <= '{ib: 1, ob: 1, is: 0, os: 0, bclr: 0, ts: 0, tb: 0};
    @(posedge clk);
    for (int i = 0; i < QD; i++) begin
      event_cycle(0, 1, 0, 0);
      repeat (3) @(posedge clk);
    end
    check(n_lost > 0, "words lost when the queue is full");
    // the first QD words are still intact
    exp_q = exp_q[0:QD-1];
    tx_ready <= 1;
    repeat (QD + 5) @(posedge clk);
    check(exp_q.size() == 0, "queued words delivered after stall");
    check(n_words > 300, "words sent");
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
