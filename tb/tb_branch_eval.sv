// tb_branch_eval: all 16 conditions against a table of the SPARC branch
// conditions, with CC-SET choosing between PSR and ALU codes, and the annul
// rule for the delay slot.
module tb_branch_eval;
  import erisc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0] cond; logic ab, ccs, sel, ann; icc_t p, q;
  branch_eval dut (.cond(cond), .annul_bit(ab), .psr_icc(p), .alu_icc(q), .cc_set(ccs), .br_sel(sel), .annul(ann));
  int checks = 0, failures = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic bit ref_cond(int c, icc_t f);
    case (c)
      0: return 0;  1: return f.z;  2: return f.z || (f.n != f.v);  3: return f.n != f.v;
      4: return f.c || f.z;  5: return f.c;  6: return f.n;  7: return f.v;
      8: return 1;  9: return !f.z; 10: return !(f.z || (f.n != f.v)); 11: return f.n == f.v;
      12: return !(f.c || f.z); 13: return !f.c; 14: return !f.n; default: return !f.v;
    endcase
  endfunction
  initial begin
    for (int n = 0; n < 4000; n++) begin
      bit t;
      cond = 4'(n); p = icc_t'($urandom); q = icc_t'($urandom); ccs = 1'($urandom); ab = 1'($urandom); #1;
      t = ref_cond(cond, ccs ? q : p);
      checks += 2;
      if (sel !== t) failures++;
      if (ann !== (ab && (!t || cond == 8))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
