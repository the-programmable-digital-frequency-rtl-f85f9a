// pulse_sync: brings N asynchronous front-panel pulse inputs (B up, B down,
// triggers, strobe) into the clock domain. Each input goes through a
// two-flop synchroniser and a rising-edge detector; the output pulses for
// one clock per input pulse, three clocks after the edge. Pulses must be
// longer than one clock and further apart than two. The synchroniser is
// this design's own; the PDFP description only names the inputs.
module pulse_sync #(
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_async,
  output logic [N-1:0] pulse
);
  logic [N-1:0] s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= in_async;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign pulse = s2 & ~s3;
endmodule
