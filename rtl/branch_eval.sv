// branch_eval: dual branch evaluation circuit.
// EVL1 evaluates the 4-bit branch condition against the condition codes in
// the PSR; EVL2 evaluates it against the codes the ALU is producing in the
// same cycle. CC-SET, raised when the instruction immediately before the
// branch (now in the execute stage) updates the codes, selects EVL2,
// otherwise EVL1 is used, so a branch right after a compare needs no wait.
// The result (br_sel) chooses between the sequential and the target address.
// The annul output tells that the delay-slot instruction is to be squashed
// (annul bit set and branch not taken, or annul bit set on branch-always).
// The same circuit evaluates the condition of the trap-on-condition
// instruction. Combinational.
module branch_eval
  import erisc_pkg::*;
(
  input  logic [3:0] cond,
  input  logic       annul_bit,
  input  icc_t       psr_icc,
  input  icc_t       alu_icc,
  input  logic       cc_set,
  output logic       br_sel,
  output logic       annul
);
  function automatic logic eval(logic [3:0] c, icc_t f);
    logic r;
    unique case (c[2:0])
      3'd0: r = 1'b0;                       // never / always
      3'd1: r = f.z;                        // E  / NE
      3'd2: r = f.z | (f.n ^ f.v);          // LE / G
      3'd3: r = f.n ^ f.v;                  // L  / GE
      3'd4: r = f.c | f.z;                  // LEU/ GU
      3'd5: r = f.c;                        // CS / CC
      3'd6: r = f.n;                        // NEG/ POS
      default: r = f.v;                     // VS / VC
    endcase
    return c[3] ? ~r : r;
  endfunction

  logic evl1, evl2;
  always_comb begin
    evl1   = eval(cond, psr_icc);
    evl2   = eval(cond, alu_icc);
    br_sel = cc_set ? evl2 : evl1;
    annul  = annul_bit && (!br_sel || cond == 4'b1000);
  end
endmodule
