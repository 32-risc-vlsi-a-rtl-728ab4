// tb_fetch_unit: sequential fetch advances by 4 only when a fetch fires,
// redirect loads the new address (word aligned), and the offset adder and
// next-PC incrementer agree with plain arithmetic, including wrap-around
// and negative displacements.
module tb_fetch_unit;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic fire, redirect; logic [31:0] rpc, dpc, npc, fa, tgt, np4; logic [29:0] disp;
  fetch_unit dut (.clk(clk), .rst(rst), .fire(fire), .redirect(redirect), .redirect_pc(rpc),
    .d_pc(dpc), .disp(disp), .npc(npc), .fa(fa), .target(tgt), .npc_plus4(np4));
  int checks = 0, failures = 0;
  logic [31:0] model;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    fire = 0; redirect = 0; rpc = 0; dpc = 0; npc = 0; disp = 0; model = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      checks++;
      if (fa !== model) begin failures++; if (failures < 10) $display("FAIL fa %h exp %h", fa, model); end
      fire = 1'($urandom); redirect = ($urandom_range(0, 9) == 0); rpc = $urandom;
      dpc = {$urandom} & ~32'h3; npc = {$urandom} & ~32'h3; disp = 30'($urandom);
      if (n % 5 == 0) npc = 32'hFFFF_FFFC;
      #1;
      checks += 2;
      if (tgt !== dpc + {disp, 2'b00}) failures++;
      if (np4 !== npc + 4) failures++;
      @(negedge clk);
      if (redirect) model = rpc & ~32'h3; else if (fire) model = model + 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
