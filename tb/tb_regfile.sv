// tb_regfile: writes every physical register through the write port, then
// reads all 32 architectural registers of every window on both ports and
// compares with a model of the window overlap: %g registers are shared,
// the ins of window w are the outs of window w+1, %g0 reads zero.
module tb_regfile;
  import erisc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] cwp; logic [4:0] rs1, rs2; logic [31:0] ra, rb, wd; logic we; logic [7:0] wpa;
  regfile dut (.clk(clk), .cwp(cwp), .rs1(rs1), .rs2(rs2), .ra(ra), .rb(rb), .we(we), .wpa(wpa), .wd(wd));
  int checks = 0, failures = 0;
  logic [31:0] model [136];
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int phys(int w, int r);      // independent formulation
    if (r < 8) return r;
    if (r < 16) return 8 + (16*w + r - 8) % 128;          // outs
    if (r < 24) return 8 + (16*w + r - 8) % 128;          // locals
    return 8 + (16*((w+1)%8) + r - 24) % 128;             // ins = outs of w+1
  endfunction
  initial begin
    we = 0; cwp = 0; rs1 = 0; rs2 = 0; wpa = 0; wd = 0;
    for (int p = 0; p < 136; p++) begin
      @(negedge clk); we = 1; wpa = 8'(p); wd = $urandom; model[p] = (p == 0) ? 0 : wd;
    end
    @(negedge clk); we = 0;
    for (int w = 0; w < 8; w++)
      for (int r = 0; r < 32; r++) begin
        cwp = 3'(w); rs1 = 5'(r); rs2 = 5'(31 - r); #1;
        checks += 2;
        if (ra !== model[phys(w, r)])      begin failures++; $display("FAIL w%0d r%0d port A", w, r); end
        if (rb !== model[phys(w, 31 - r)]) begin failures++; $display("FAIL w%0d r%0d port B", w, 31-r); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
