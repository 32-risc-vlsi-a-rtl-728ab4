// tb_sau: shift/align unit against shift operators and a byte-extraction
// reference (big-endian lanes) for every load size and address.
module tb_sau;
  import erisc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  sau_op_e op; logic [31:0] a, r; logic [4:0] amt; logic [1:0] lo;
  sau dut (.op(op), .a(a), .amt(amt), .ea_lo(lo), .result(r));
  int checks = 0, failures = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 10000; n++) begin
      logic [31:0] e; logic [7:0] by; logic [15:0] hw;
      op = sau_op_e'($urandom_range(0, 7)); a = $urandom; amt = 5'($urandom); lo = 2'($urandom);
      if (op inside {SAU_LDUH, SAU_LDSH}) lo[0] = 1'b0;
      if (op == SAU_LDW) lo = 0;
      #1;
      by = a[8*(3-lo) +: 8]; hw = lo[1] ? a[15:0] : a[31:16];
      case (op)
        SAU_SLL: e = a << amt;  SAU_SRL: e = a >> amt;  SAU_SRA: e = $signed(a) >>> amt;
        SAU_LDUB: e = {24'h0, by}; SAU_LDSB: e = {{24{by[7]}}, by};
        SAU_LDUH: e = {16'h0, hw}; SAU_LDSH: e = {{16{hw[15]}}, hw};
        default: e = a;
      endcase
      checks++;
      if (r !== e) begin failures++; if (failures < 10) $display("FAIL %s a=%h amt=%0d lo=%0d got %h exp %h", op.name(), a, amt, lo, r, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
