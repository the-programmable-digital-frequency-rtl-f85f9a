// trigger_table: the PDFP's table of actions for its trigger inputs.
//
// Eight entries of type trig_entry_t, written by command 8 with the entry
// number in T2..T0. Writing entry 0 executes its BCLR/TS action at once and
// also sets the four send-back bits IB, OB, IS and OS, which act only from
// entry 0 (cfg0). Entries 1..6 are armed for the six trigger inputs: each
// rising trigger pulse executes its entry's action. An action is: clear and
// disable the B counter if BCLR is set, otherwise re-enable it; and select
// table TB if TS is set. Entry 7 is stored but never fired, since its use is
// not known. Triggers whose entry was never written do nothing. Triggers that
// arrive together are held pending and executed one per clock, lowest number
// first, after any immediate action. The action appears on act_* one clock
// after the write or trigger pulse. The valid bits, the pending queue and the
// treatment of entry 7 are this design's choices.
module trigger_table (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr,
  input  logic [2:0]            wr_idx,
  input  pdfp_pkg::trig_entry_t wr_entry,
  input  logic [6:1]            trig,
  output logic                  act,
  output logic                  act_bclr,
  output logic                  act_ts,
  output logic [4:0]            act_tb,
  output logic [2:0]            act_src,   // entry that fired
  output pdfp_pkg::trig_entry_t cfg0
);
  import pdfp_pkg::*;

  trig_entry_t entry [8];
  logic [7:0]  valid;
  logic [6:1]  pending, pend_next;
  logic [2:0]  sel;
  logic        sel_ok;

  // lowest pending trigger
  always_comb begin
    pend_next = pending | (trig & valid[6:1]);
    sel    = '0;
    sel_ok = 1'b0;
    for (int k = 6; k >= 1; k--) begin
      if (pend_next[k]) begin
        sel    = 3'(k);
        sel_ok = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      pending  <= '0;
      act      <= 1'b0;
      act_bclr <= 1'b0;
      act_ts   <= 1'b0;
      act_tb   <= '0;
      act_src  <= '0;
      for (int i = 0; i < 8; i++) entry[i] <= '0;
    end else begin
      act <= 1'b0;
      pending <= pend_next;
      if (wr) begin
        entry[wr_idx] <= wr_entry;
        valid[wr_idx] <= 1'b1;
      end
      if (wr && wr_idx == 3'd0) begin
        act      <= 1'b1;
        act_bclr <= wr_entry.bclr;
        act_ts   <= wr_entry.ts;
        act_tb   <= wr_entry.tb;
        act_src  <= 3'd0;
      end else if (sel_ok) begin
        act      <= 1'b1;
        act_bclr <= entry[sel].bclr;
        act_ts   <= entry[sel].ts;
        act_tb   <= entry[sel].tb;
        act_src  <= sel;
        pending[sel] <= 1'b0;
      end
    end
  end

  assign cfg0 = entry[0];
endmodule
