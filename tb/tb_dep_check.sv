// tb_dep_check: random register numbers with forced collisions; the match
// bits must follow equality with the write enables, never for register 0.
module tb_dep_check;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] pa, pb, ew, ww; logic ee, we; logic [3:0] mat;
  dep_check dut (.pa_a(pa), .pa_b(pb), .e_wr(ee), .e_wpa(ew), .w_wr(we), .w_wpa(ww), .mat(mat));
  int checks = 0, failures = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [3:0] e;
      pa = 8'($urandom_range(0, 7)); pb = 8'($urandom_range(0, 7));
      ew = 8'($urandom_range(0, 7)); ww = 8'($urandom_range(0, 7));
      ee = 1'($urandom); we = 1'($urandom); #1;
      e = {we && ww == pb && ww != 0, ee && ew == pb && ew != 0,
           we && ww == pa && ww != 0, ee && ew == pa && ew != 0};
      checks++;
      if (mat !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
