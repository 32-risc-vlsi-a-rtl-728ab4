// spr: the special purpose registers PSR, WIM, Y and TBR, with rollback.
// Each register is held twice: the normal state register, which the
// instructions update, and a backup copy that takes the normal value at the
// end of every cycle, i.e. holds the state as it was one cycle earlier.
// A trap is acted on one cycle after the trapping instruction reached the
// write-back stage, by which time the instruction behind it may have
// updated a register in its execute stage; `rollback` then reloads the
// normal registers from the backup copies, and in the same cycle the trap
// entry is applied on top (traps disabled, previous supervisor bit saved,
// supervisor mode, window pointer decremented, trap type into TBR).
// Updates, all on the rising edge, in order of precedence:
//   rollback/trap_enter > wr_we (WRPSR/WRWIM/WRY/WRTBR) > rett/cwp/icc/y.
// Reset: supervisor mode, traps disabled, window 0, WIM and TBR cleared.
module spr
  import erisc_pkg::*;
#(
  parameter int unsigned NWIN = 8
) (
  input  logic        clk,
  input  logic        rst,
  // execute-stage updates
  input  logic        icc_we,
  input  icc_t        icc_in,
  input  logic        y_we,
  input  logic [31:0] y_in,
  input  logic        wr_we,
  input  spr_sel_e    wr_sel,
  input  logic [31:0] wr_data,
  input  logic        cwp_dec,   // SAVE
  input  logic        cwp_inc,   // RESTORE
  input  logic        rett,      // RETT: traps on, S <= PS, window + 1
  // trap entry
  input  logic        rollback,
  input  logic        trap_enter,
  input  logic [7:0]  trap_tt,
  // state
  output psr_t        psr,
  output logic [NWIN-1:0] wim,
  output logic [31:0] y,
  output logic [31:0] tbr
);
  psr_t            psr_b;
  logic [NWIN-1:0] wim_b;
  logic [31:0]     y_b, tbr_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      psr   <= '{icc: '0, ef: 1'b0, pil: 4'h0, s: 1'b1, ps: 1'b1, et: 1'b0, cwp: 3'd0};
      wim   <= '0;
      y     <= '0;
      tbr   <= '0;
      psr_b <= '{icc: '0, ef: 1'b0, pil: 4'h0, s: 1'b1, ps: 1'b1, et: 1'b0, cwp: 3'd0};
      wim_b <= '0;
      y_b   <= '0;
      tbr_b <= '0;
    end else begin
      psr_b <= psr;
      wim_b <= wim;
      y_b   <= y;
      tbr_b <= tbr;
      if (rollback || trap_enter) begin
        psr_t p;
        p = rollback ? psr_b : psr;
        if (trap_enter) begin
          p.ps  = p.s;
          p.s   = 1'b1;
          p.et  = 1'b0;
          p.cwp = p.cwp - 3'd1;
        end
        psr <= p;
        wim <= rollback ? wim_b : wim;
        y   <= rollback ? y_b   : y;
        tbr <= trap_enter ? {(rollback ? tbr_b[31:12] : tbr[31:12]), trap_tt, 4'h0}
                          : (rollback ? tbr_b : tbr);
      end else if (wr_we) begin
        unique case (wr_sel)
          SPR_Y:   y   <= wr_data;
          SPR_PSR: psr <= psr_unpack(wr_data);
          SPR_WIM: wim <= wr_data[NWIN-1:0];
          default: tbr <= {wr_data[31:12], tbr[11:0]};
        endcase
      end else begin
        psr_t p;
        p = psr;
        if (icc_we)  p.icc = icc_in;
        if (cwp_dec) p.cwp = p.cwp - 3'd1;
        if (cwp_inc) p.cwp = p.cwp + 3'd1;
        if (rett) begin
          p.et  = 1'b1;
          p.s   = p.ps;
          p.cwp = p.cwp + 3'd1;
        end
        psr <= p;
        if (y_we) y <= y_in;
      end
    end
  end
endmodule
