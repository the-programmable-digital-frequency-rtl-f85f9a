// vme_tasks.svh: VMEbus master bus-cycle tasks shared by the testbenches of
// the PDFP-CTRL. Included inside a testbench module that declares clk and
// the vme_* signals of ctrl_vme_regs. D16 cycles, and D32 writes with
// vme_wr32; a cycle that gets no DTACK* within 64 clocks ends as a bus
// error (acked = 0).

localparam logic [5:0] AM_SHORT = 6'h29;   // short I/O, non-privileged
localparam logic [5:0] AM_STD   = 6'h39;   // standard, non-privileged data

task automatic vme_cycle(input logic [5:0] am, input logic [23:0] addr,
                         input bit wr, input logic [31:0] wdata,
                         input bit iack, output logic [15:0] rdata,
                         output bit acked, input bit long = 0);
  int n;
  @(negedge clk);
  vme_lword_n = !long;
  vme_dh_i    = wdata[31:16];
  vme_am      = am;
  vme_a       = addr[23:1];
  vme_write_n = !wr;
  vme_iack_n  = !iack;
  vme_iackin_n = !iack;
  vme_d_i     = wdata[15:0];
  vme_as_n    = 0;
  @(negedge clk);
  vme_ds_n    = 0;
  n = 0;
  acked = 0;
  while (n < 64) begin
    @(negedge clk);
    n++;
    if (!vme_dtack_n) begin
      acked = 1;
      break;
    end
  end
  rdata = vme_d_o;
  vme_ds_n = 1;
  vme_as_n = 1;
  vme_iack_n = 1;
  vme_iackin_n = 1;
  vme_lword_n = 1;
  n = 0;
  while (!vme_dtack_n && n < 64) begin
    @(negedge clk);
    n++;
  end
endtask

task automatic vme_wr(input logic [5:0] am, input logic [23:0] addr,
                      input logic [15:0] d, output bit acked);
  logic [15:0] dummy;
  vme_cycle(am, addr, 1, 32'(d), 0, dummy, acked);
endtask

task automatic vme_wr32(input logic [5:0] am, input logic [23:0] addr,
                        input logic [31:0] d, output bit acked);
  logic [15:0] dummy;
  vme_cycle(am, addr, 1, d, 0, dummy, acked, 1);
endtask

task automatic vme_rd(input logic [5:0] am, input logic [23:0] addr,
                      output logic [15:0] d, output bit acked);
  vme_cycle(am, addr, 0, 32'h0, 0, d, acked);
endtask

task automatic vme_iack_cycle(input logic [2:0] level, output logic [15:0] vec,
                              output bit acked);
  vme_cycle(AM_SHORT, {20'h0, level, 1'b0}, 0, 32'h0, 1, vec, acked);
endtask
