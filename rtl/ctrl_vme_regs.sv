// ctrl_vme_regs: VMEbus slave, registers and interrupter of the PDFP-CTRL.
//
// Short I/O space (A16, AM 0x29/0x2D), base set by jumpers on A15..A09
// (an installed jumper reads 1), byte offsets:
//   0/2 fifo  32-bit word for the PDFP, written as two 16-bit transfers:
//             offset 0 holds D31..D16, the write to offset 2 (D15..D00)
//             pushes the whole word into the transmit FIFO; or as one D32
//             transfer (LWORD* low) at offset 0. Reads give 0.
//   4   ctrl  write: D0 FEIE, D1 FHIE, D2 TxR, D3 RxR, D4 PCLR, D5 BCLR,
//             D6 CDE. TxR, RxR and PCLR act once and are not stored.
//             read: D13 Stat, D12 FF, D11 FH, D10 FE, D09 TxEERR, D08 RxEV,
//             D07..D00 last PDFP status. Reading clears Stat.
//   6   base  D7 enables the memory window, D4..D0 give A23..A19
//   8   ivec  interrupt vector;  0xa ilvl  interrupt level (0 = none)
// base, ivec and ilvl read back as 0.
// Standard space (A24, AM 0x39/0x3A/0x3D/0x3E), 512 kbyte window at
// base A23..A19 when base D7 is set: word w of the window reads receive
// memory word w (modulo its size); the top eight words read the receive
// pointer (its low 16 bits). Writes there are acknowledged and ignored.
//
// Bus cycle: AS* and DS* are synchronised (two clocks); address, AM, WRITE*
// and data must be stable while DS* is low. The slave then acts and drives
// DTACK* low (after two more clocks for a memory read) until DS* goes high.
// Addresses nobody decodes get no DTACK*, for the bus timer to end. D32
// (LWORD* low) is accepted only for the fifo register; everything else is
// D16. Byte strobes are not distinguished (DS* stands for DS0* and DS1*).
// Interrupter: an interrupt is raised when the FIFO becomes empty while
// FEIE is set, or when its half-full flag changes while FHIE is set; IRQ*
// at level ilvl stays low until an IACK cycle for that level, in which the
// vector ivec is returned on D07..D00. IACKIN*/IACKOUT* form the daisy chain.
// The register map and bit meanings are the published ones. BCLR is
// accepted but does nothing: no link word for it is known. TxEERR is set
// when a word is written to a full FIFO and cleared by TxR, this design's
// reading of a flag whose meaning is not known.
module ctrl_vme_regs #(
  parameter int unsigned MEM_AW = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [6:0]        base_jumpers,   // A15..A09
  // VMEbus
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [5:0]        vme_am,
  input  logic [23:1]       vme_a,
  input  logic              vme_lword_n,
  input  logic [15:0]       vme_dh_i,       // D31..D16, D32 cycles only
  input  logic [15:0]       vme_d_i,        // D15..D00
  output logic [15:0]       vme_d_o,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  input  logic              vme_iack_n,
  input  logic              vme_iackin_n,
  output logic              vme_iackout_n,
  output logic [7:1]        vme_irq_n,
  // transmit FIFO
  output logic              fifo_push,
  output logic [31:0]       fifo_wdata,
  input  logic              fifo_empty,
  input  logic              fifo_half,
  input  logic              fifo_full,
  // link control and status
  output logic              tx_rst,
  output logic              rx_rst,
  output logic              ptr_clr,
  output logic              cde,
  input  logic [7:0]        pdfp_status,
  input  logic              stat_new,
  input  logic              rx_err,
  // receive memory
  output logic [MEM_AW-1:0] mem_addr,
  input  logic [15:0]       mem_rdata,
  input  logic [MEM_AW-1:0] ptr
);
  typedef enum logic [2:0] {S_IDLE, S_MEM1, S_MEM2, S_ACK, S_NOACK} state_e;
  state_e state;

  logic as_m, as_s, ds_m, ds_s;
  logic feie, fhie, stat, rxev, txeerr;
  logic [7:0] status_q, ivec;
  logic [2:0] ilvl;
  logic [7:0] base;
  logic [15:0] fifo_hi;
  logic irq_pend, fe_cond_q, fh_q;

  // address decoding
  logic short_am, std_am, short_sel, std_sel, ptr_sel, long_ok;
  logic [7:0]  soff;      // short I/O word offset
  logic [17:0] widx;      // word in the standard window
  logic        cycle, iack_mine;

  assign short_am  = (vme_am == 6'h29) || (vme_am == 6'h2D);
  assign std_am    = (vme_am == 6'h39) || (vme_am == 6'h3A) ||
                     (vme_am == 6'h3D) || (vme_am == 6'h3E);
  assign soff      = vme_a[8:1];
  // D32 only for a write to the fifo register
  assign long_ok   = vme_lword_n || (soff == 8'd0 && !vme_write_n);
  assign short_sel = short_am && (vme_a[15:9] == base_jumpers) && (soff <= 8'd5) && long_ok;
  assign widx      = vme_a[18:1];
  assign std_sel   = std_am && base[7] && (vme_a[23:19] == base[4:0]) && vme_lword_n;
  assign ptr_sel   = (widx >= 18'h3_FFF8);
  assign cycle     = !as_s && !ds_s;
  assign iack_mine = !vme_iack_n && !vme_iackin_n && irq_pend &&
                     (ilvl != 3'd0) && (vme_a[3:1] == ilvl);
  assign mem_addr  = widx[MEM_AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_m <= 1'b1; as_s <= 1'b1; ds_m <= 1'b1; ds_s <= 1'b1;
    end else begin
      as_m <= vme_as_n; as_s <= as_m;
      ds_m <= vme_ds_n; ds_s <= ds_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      vme_d_o       <= '0;
      vme_d_oe      <= 1'b0;
      vme_dtack_n   <= 1'b1;
      vme_iackout_n <= 1'b1;
      fifo_push     <= 1'b0;
      fifo_wdata    <= '0;
      fifo_hi       <= '0;
      tx_rst        <= 1'b0;
      rx_rst        <= 1'b0;
      ptr_clr       <= 1'b0;
      feie          <= 1'b0;
      fhie          <= 1'b0;
      cde           <= 1'b0;
      base          <= '0;
      ivec          <= '0;
      ilvl          <= '0;
      stat          <= 1'b0;
      status_q      <= '0;
      rxev          <= 1'b0;
      txeerr        <= 1'b0;
      irq_pend      <= 1'b0;
      fe_cond_q     <= 1'b0;
      fh_q          <= 1'b0;
    end else begin
      fifo_push <= 1'b0;
      tx_rst    <= 1'b0;
      rx_rst    <= 1'b0;
      ptr_clr   <= 1'b0;

      // status from the PDFP and local error flags
      if (stat_new) begin
        status_q <= pdfp_status;
        stat     <= 1'b1;
      end
      if (rx_err) rxev <= 1'b1;

      // interrupt sources
      fe_cond_q <= feie && fifo_empty;
      fh_q      <= fifo_half;
      if ((feie && fifo_empty && !fe_cond_q) || (fhie && (fifo_half != fh_q)))
        irq_pend <= 1'b1;

      case (state)
        S_IDLE: begin
          if (cycle) begin
            if (!vme_iack_n) begin
              if (iack_mine) begin
                vme_d_o     <= {8'h00, ivec};
                vme_d_oe    <= 1'b1;
                vme_dtack_n <= 1'b0;
                irq_pend    <= 1'b0;
                state       <= S_ACK;
              end else begin
                vme_iackout_n <= vme_iackin_n;
                state         <= S_NOACK;
              end
            end else if (short_sel) begin
              state <= S_ACK;
              vme_dtack_n <= 1'b0;
              if (!vme_write_n) begin
                unique case (soff)
                  8'd0: begin
                    if (!vme_lword_n) begin
                      fifo_push  <= 1'b1;
                      fifo_wdata <= {vme_dh_i, vme_d_i};
                      if (fifo_full) txeerr <= 1'b1;
                    end else begin
                      fifo_hi <= vme_d_i;
                    end
                  end
                  8'd1: begin
                    fifo_push  <= 1'b1;
                    fifo_wdata <= {fifo_hi, vme_d_i};
                    if (fifo_full) txeerr <= 1'b1;
                  end
                  8'd2: begin
                    feie <= vme_d_i[0];
                    fhie <= vme_d_i[1];
                    if (vme_d_i[2]) begin
                      tx_rst <= 1'b1;
                      txeerr <= 1'b0;
                    end
                    if (vme_d_i[3]) begin
                      rx_rst <= 1'b1;
                      rxev   <= 1'b0;
                    end
                    ptr_clr <= vme_d_i[4];
                    cde     <= vme_d_i[6];
                  end
                  8'd3: base <= vme_d_i[7:0];
                  8'd4: ivec <= vme_d_i[7:0];
                  8'd5: ilvl <= vme_d_i[2:0];
                  default: ;
                endcase
              end else begin
                vme_d_oe <= 1'b1;
                if (soff == 8'd2) begin
                  vme_d_o <= {2'b00, stat, fifo_full, fifo_half, fifo_empty,
                              txeerr, rxev, status_q};
                  if (!stat_new) stat <= 1'b0;
                end else begin
                  vme_d_o <= '0;
                end
              end
            end else if (std_sel) begin
              if (!vme_write_n) begin
                vme_dtack_n <= 1'b0;
                state       <= S_ACK;
              end else if (ptr_sel) begin
                vme_d_o     <= 16'(ptr);
                vme_d_oe    <= 1'b1;
                vme_dtack_n <= 1'b0;
                state       <= S_ACK;
              end else begin
                state <= S_MEM1;
              end
            end else begin
              state <= S_NOACK;
            end
          end
        end
        S_MEM1: state <= S_MEM2;    // memory address settles, word read
        S_MEM2: begin
          vme_d_o     <= mem_rdata;
          vme_d_oe    <= 1'b1;
          vme_dtack_n <= 1'b0;
          state       <= S_ACK;
        end
        S_ACK, S_NOACK: begin
          if (ds_s) begin
            vme_dtack_n   <= 1'b1;
            vme_d_oe      <= 1'b0;
            vme_iackout_n <= 1'b1;
            state         <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    vme_irq_n = '1;
    if (irq_pend && ilvl != 3'd0) vme_irq_n[ilvl] = 1'b0;
  end

`ifndef SYNTHESIS
  // DTACK* is released only after DS* has gone high
  a_dtack_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (!vme_dtack_n && !ds_s) |=> !vme_dtack_n);
`endif
endmodule
