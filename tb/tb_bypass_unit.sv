// tb_bypass_unit: every match combination selects the register file, the
// write-back result or (with priority) the execute-stage result.
module tb_bypass_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] ra, rb, er, wr, oa, ob; logic [3:0] mat;
  bypass_unit dut (.rf_a(ra), .rf_b(rb), .mat(mat), .e_result(er), .w_result(wr), .op_a(oa), .op_b(ob));
  int checks = 0, failures = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 200; n++) begin
      ra = $urandom; rb = $urandom; er = $urandom; wr = $urandom; mat = 4'(n); #1;
      checks += 2;
      if (oa !== (mat[0] ? er : mat[1] ? wr : ra)) failures++;
      if (ob !== (mat[2] ? er : mat[3] ? wr : rb)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
