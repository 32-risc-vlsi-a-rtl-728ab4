// tb_cycle_counter: loads one-, two-cycle and squashed instructions and the
// trap sequence; the counter must start at R-1, count down once per cycle
// and report the last pseudo-cycle exactly R cycles after the load.
module tb_cycle_counter;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic load, squash, trapseq, last; logic [31:0] ir; logic [1:0] seq;
  cycle_counter dut (.clk(clk), .rst(rst), .load(load), .if_ir(ir), .squash(squash),
                     .trapseq(trapseq), .seq(seq), .last(last));
  int checks = 0, failures = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(logic [31:0] w, bit sq, bit ts, int r);
    @(negedge clk); ir = w; squash = sq; trapseq = ts; load = !ts;
    @(negedge clk); load = 0; trapseq = 0;
    for (int k = 1; k <= r; k++) begin
      checks++;
      if (seq !== 2'(r - k) || last !== (k == r)) begin
        failures++; $display("FAIL ir=%h cycle %0d seq=%0d", w, k, seq);
      end
      if (k < r) @(negedge clk);
    end
  endtask
  initial begin
    load = 0; squash = 0; trapseq = 0; ir = 0;
    repeat (2) @(posedge clk); rst = 0;
    run(alu_r(ADD, 1, 2, 3), 0, 0, 1);
    run(mem_i(LD, 1, 2, 0), 0, 0, 2);
    run(mem_i(STB, 1, 2, 0), 0, 0, 2);
    run(alu_i(JMPL, 0, 31, 8), 0, 0, 2);
    run(alu_r(SAVE, 0, 0, 0), 0, 0, 2);
    run(mem_i(LD, 1, 2, 0), 1, 0, 1);
    run(32'h0, 0, 1, 2);
    run(bicc(BA, 0, 0, 8), 0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
