// ctrl_rx_mem: the receive side of the PDFP-CTRL.
//
// Sorts the words coming back from the PDFP by their code C3..C0:
//   0  status: D07..D00 are latched into status and stat_new pulses;
//   6  input copy: the low 16 bits are written into the 128 kWord receive
//      memory at the pointer, after which the pointer moves on by one word,
//      up, or down when cde is set and the word's DIR bit is set;
//   7  output copy: presented for one clock on the front-panel dual-port
//      RAM port (dp_we, dp_data, dp_dir).
// Other codes are dropped. ptr_clr (ctrl bit PCLR) zeroes the pointer. The
// memory has a second, read-only port for the VME bus: rd_data is the word
// at rd_addr one clock later. The codes, the memory size and the pointer
// behaviour follow the PDFP-CTRL description. The dual-port RAM port carries
// no address, since none is known, and the VME side cannot write the memory:
// both are this design's choices.
module ctrl_rx_mem #(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned MEM_WORDS = 32'h2_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  input  logic [31:0]       rx_word,
  input  logic              ptr_clr,
  input  logic              cde,
  output logic [$clog2(MEM_WORDS)-1:0] ptr,
  output logic [7:0]        status,
  output logic              stat_new,
  output logic              dp_we,
  output logic [DATA_W-1:0] dp_data,
  output logic              dp_dir,
  input  logic [$clog2(MEM_WORDS)-1:0] rd_addr,
  output logic [15:0]       rd_data
);
  import pdfp_pkg::*;
  localparam int unsigned AW = $clog2(MEM_WORDS);

  logic [15:0] mem [MEM_WORDS];
  reply_e      code;
  logic        dir, wr_mem;

  assign code   = reply_e'(rx_word[31:28]);
  assign dir    = rx_word[27];
  assign wr_mem = rx_valid && (code == RPL_INPUT);

  always_ff @(posedge clk) begin
    if (wr_mem) mem[ptr] <= rx_word[15:0];
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      status   <= '0;
      stat_new <= 1'b0;
      dp_we    <= 1'b0;
      dp_data  <= '0;
      dp_dir   <= 1'b0;
    end else begin
      stat_new <= 1'b0;
      dp_we    <= 1'b0;
      if (ptr_clr)
        ptr <= '0;
      else if (wr_mem)
        ptr <= (cde && dir) ? ptr - 1'b1 : ptr + 1'b1;
      if (rx_valid && code == RPL_STATUS) begin
        status   <= rx_word[7:0];
        stat_new <= 1'b1;
      end
      if (rx_valid && code == RPL_OUTPUT) begin
        dp_we   <= 1'b1;
        dp_data <= rx_word[DATA_W-1:0];
        dp_dir  <= dir;
      end
    end
  end
endmodule
