// tb_prefetch_queue: random push/pop/flush traffic against a queue model;
// checks count and head every cycle, never pushing into a full queue or
// popping an empty one (the pipeline control never does).
module tb_prefetch_queue;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic flush, push, pop, pf, hf; logic [31:0] pir, ppc, hir, hpc; logic [1:0] cnt;
  prefetch_queue dut (.clk(clk), .rst(rst), .flush(flush), .push(push), .push_ir(pir), .push_pc(ppc),
    .push_fault(pf), .pop(pop), .head_ir(hir), .head_pc(hpc), .head_fault(hf), .count(cnt));
  int checks = 0, failures = 0;
  logic [64:0] q [$];
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    flush = 0; push = 0; pop = 0; pir = 0; ppc = 0; pf = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (cnt !== 2'(q.size()) || (q.size() > 0 && {hf, hpc, hir} !== q[0])) begin
        failures++; if (failures < 10) $display("FAIL n=%0d count %0d/%0d", n, cnt, q.size());
      end
      flush = ($urandom_range(0, 19) == 0);
      pop   = (q.size() > 0) && 1'($urandom);
      push  = ((q.size() - int'(pop)) < 2) && 1'($urandom);
      pir = $urandom; ppc = $urandom; pf = 1'($urandom);
      @(posedge clk); #1;
      if (flush) q.delete();
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back({pf, ppc, pir});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
