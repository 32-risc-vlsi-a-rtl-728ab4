// tb_exception_unit: interrupt sensing (level above PIL or 15, only with
// traps enabled, only after two stable samples), trap acknowledge one cycle
// after the write-back request with the saved PC pair and the vector
// {TBA, tt, 0}, INTACK for interrupt traps only, and error mode for a trap
// while traps are disabled.
module tb_exception_unit;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] irl, pil; logic et, fpx, itk, ireq, wexc, go, ack, err;
  logic [7:0] itt, wtt, ttt; logic [31:0] wpc, wnpc, tpc, tnpc, vec; logic [19:0] tba;
  exception_unit dut (.clk(clk), .rst(rst), .irl(irl), .pil(pil), .et(et), .fp_exc(fpx),
    .int_taken(itk), .int_req(ireq), .int_tt(itt), .w_exc(wexc), .w_tt(wtt), .w_pc(wpc),
    .w_npc(wnpc), .tba(tba), .trap_go(go), .trap_tt(ttt), .trap_pc(tpc), .trap_npc(tnpc),
    .vector(vec), .intack(ack), .error_mode(err));
  int checks = 0, failures = 0;
  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    irl = 0; pil = 4; et = 1; fpx = 0; itk = 0; wexc = 0; wtt = 0; wpc = 0; wnpc = 0; tba = 20'hABCDE;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    irl = 3; repeat (4) @(negedge clk); chk("irl below pil", ireq, 0);
    irl = 6; @(negedge clk); chk("one sample", ireq, 0);
    @(negedge clk); chk("two samples", ireq, 1); chk("int tt", itt, 8'h16);
    et = 0; #1; chk("masked by ET", ireq, 0); et = 1;
    pil = 15; irl = 15; repeat (2) @(negedge clk); chk("level 15", ireq, 1);
    irl = 0; repeat (2) @(negedge clk); chk("released", ireq, 0);
    // trap request from write-back
    wexc = 1; wtt = 8'h1F; wpc = 32'h100; wnpc = 32'h104; @(negedge clk); wexc = 0;
    chk("trap_go", go, 1); chk("tt", ttt, 8'h1F); chk("pc", tpc, 32'h100); chk("npc", tnpc, 32'h104);
    chk("vector", vec, 32'hABCDE1F0); chk("intack", ack, 1);
    @(negedge clk); chk("one pulse", go, 0); chk("intack pulse", ack, 0);
    wexc = 1; wtt = 8'h07; @(negedge clk); wexc = 0;
    chk("non-interrupt trap", {go, ack}, 2'b10);
    @(negedge clk);
    et = 0; wexc = 1; wtt = 8'h02; @(negedge clk); wexc = 0;
    chk("error mode", {err, go}, 2'b10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
