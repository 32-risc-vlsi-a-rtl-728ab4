// tb_spr: special registers. Checks reset values, WRPSR/WRWIM/WRY/WRTBR,
// icc and Y updates, SAVE/RESTORE/RETT window and mode changes, and the
// rollback: an update made in the cycle before a trap is undone and the
// trap entry (ET=0, PS=S, S=1, CWP-1, tt into TBR) applied to the earlier
// state.
module tb_spr;
  import erisc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic icc_we, y_we, wr_we, cd, ci, rett, rb, te; icc_t icc_in; logic [31:0] y_in, wd;
  spr_sel_e sel; logic [7:0] tt; psr_t psr; logic [7:0] wim; logic [31:0] y, tbr;
  spr dut (.clk(clk), .rst(rst), .icc_we(icc_we), .icc_in(icc_in), .y_we(y_we), .y_in(y_in),
    .wr_we(wr_we), .wr_sel(sel), .wr_data(wd), .cwp_dec(cd), .cwp_inc(ci), .rett(rett),
    .rollback(rb), .trap_enter(te), .trap_tt(tt), .psr(psr), .wim(wim), .y(y), .tbr(tbr));
  int checks = 0, failures = 0;
  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  task automatic idle(); icc_we=0; y_we=0; wr_we=0; cd=0; ci=0; rett=0; rb=0; te=0; endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    idle(); sel = SPR_Y; wd = 0; icc_in = '0; y_in = 0; tt = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    chk("reset psr", psr_pack(psr), 32'h0000_00C0);
    wr_we = 1; sel = SPR_PSR; wd = 32'h00F0_1FA3; @(negedge clk);   // icc=F EF PIL=F S ET cwp=3
    chk("wrpsr", psr_pack(psr), 32'h00F0_1FA3);
    sel = SPR_WIM; wd = 32'h0000_0181; @(negedge clk); chk("wrwim", wim, 8'h81);
    sel = SPR_Y; wd = 32'hCAFE_0001; @(negedge clk); chk("wry", y, 32'hCAFE_0001);
    sel = SPR_TBR; wd = 32'h1234_5FFF; @(negedge clk); chk("wrtbr", tbr, 32'h1234_5000);
    idle(); icc_we = 1; icc_in = 4'b0101; y_we = 1; y_in = 32'h7; @(negedge clk);
    chk("icc", psr.icc, 4'b0101); chk("y", y, 7);
    idle(); cd = 1; @(negedge clk); chk("save cwp", psr.cwp, 2);
    idle(); ci = 1; @(negedge clk); chk("restore cwp", psr.cwp, 3);
    // rollback: the icc and window update made just before the trap is undone
    idle(); icc_we = 1; icc_in = 4'b1010; cd = 1; @(negedge clk);
    chk("pre-trap icc", psr.icc, 4'b1010);
    idle(); rb = 1; te = 1; tt = 8'h2A; @(negedge clk);
    chk("rolled icc", psr.icc, 4'b0101);
    chk("trap cwp", psr.cwp, 2);
    chk("trap et/s/ps", {psr.et, psr.s, psr.ps}, 3'b011);
    chk("trap tbr", tbr, 32'h1234_52A0);
    idle(); rett = 1; @(negedge clk);
    chk("rett", {psr.et, psr.s, 5'(psr.cwp)}, {1'b1, 1'b1, 5'd3});
    idle(); @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
