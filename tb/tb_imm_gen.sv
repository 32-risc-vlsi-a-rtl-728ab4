// tb_imm_gen: random instruction words of every format. The expected
// operand-B constant and displacement are worked out here with signed
// shifts (sign extension by arithmetic) and compared with the module.
module tb_imm_gen;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] ir, imm; logic [29:0] disp;
  imm_gen dut (.ir(ir), .imm(imm), .disp(disp));
  int checks = 0, failures = 0;
  int n_sethi = 0, n_call = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int v13, v22;
      logic [31:0] e_imm; logic [29:0] e_disp;
      ir = $urandom;
      if (n % 4 == 0) ir[24:22] = 3'b100;          // make SETHI / Bicc forms common
      if (n % 4 == 1) ir[24:22] = 3'b010;
      #1;
      v13 = int'(ir << 19) >>> 19;
      v22 = int'(ir << 10) >>> 10;
      e_imm  = 32'(v13);
      e_disp = 30'(v22);
      if (ir[31:30] == 2'b00 && ir[24:22] == 3'b100) begin e_imm = ir << 10; n_sethi++; end
      if (ir[31:30] == 2'b01) begin e_disp = ir[29:0]; n_call++; end
      checks += 2;
      if (imm  !== e_imm)  begin failures++; if (failures < 5) $display("FAIL imm  ir=%08h got %08h exp %08h", ir, imm, e_imm); end
      if (disp !== e_disp) begin failures++; if (failures < 5) $display("FAIL disp ir=%08h got %08h exp %08h", ir, disp, e_disp); end
    end
    checks++;
    if (n_sethi == 0 || n_call == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
