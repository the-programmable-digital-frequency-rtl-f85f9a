// b_counter: the PDFP's magnetic-field counter.
//
// Counts B-up pulses up and B-down pulses down; the count addresses a word
// within the selected look-up table, so it is as wide as one table
// (0x20000 words, 17 bits). clr (a trigger action with BCLR set) zeroes the
// count and disables counting; en (a trigger action with BCLR clear)
// enables it again. Counting past either end wraps and sets the sticky
// overflow flag bof, which clr clears. dir remembers the direction of the
// last pulse counted (1 = B down). Up and down in the same clock cancel.
// Counting is enabled out of reset. Wrap-around, the clearing of bof and the
// reset state are this design's choices; clearing, disabling and
// re-enabling follow the trigger table description.
module b_counter #(
  parameter int unsigned W = pdfp_pkg::BANK_AW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         up,
  input  logic         down,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         dir,
  output logic         enabled,
  output logic         bof
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      dir     <= 1'b0;
      enabled <= 1'b1;
      bof     <= 1'b0;
    end else if (clr) begin
      count   <= '0;
      enabled <= 1'b0;
      bof     <= 1'b0;
    end else begin
      if (en) enabled <= 1'b1;
      if (enabled && (up != down)) begin
        dir <= down;
        if (up) begin
          count <= count + 1'b1;
          if (&count) bof <= 1'b1;
        end else begin
          count <= count - 1'b1;
          if (count == '0) bof <= 1'b1;
        end
      end
    end
  end
endmodule
