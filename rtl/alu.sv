// alu: the 32-bit arithmetic/logic unit of the execution stage.
// It performs the SPARC integer operations (ADD, ADDX, SUB, SUBX, AND, ANDN,
// OR, ORN, XOR, XNOR, tagged add and subtract) and one step of the
// shift-and-add integer multiply (MULScc), and produces the integer
// condition codes of the result. Adds and subtracts go through a 4-block
// carry-select adder. For the multiply step the first operand is shifted
// right by one with N xor V shifted in, the second operand is used only when
// Y[0] is 1, and y_next is Y shifted right with rs1[0] shifted in.
// PASSA / PASSB forward an operand unchanged (used by pseudo-operations).
// Combinational; result and codes are valid in the same cycle.
module alu
  import erisc_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  icc_t        icc_in,   // current codes (C for ADDX/SUBX, N,V for MULScc)
  input  logic [31:0] y_in,     // Y register, for MULScc
  output logic [31:0] result,
  output icc_t        icc_out,
  output logic        tag_ovf,  // tagged add/sub overflow
  output logic [31:0] y_next
);
  logic [31:0] add_a, add_b;
  logic        add_cin, add_cout, is_sub;
  logic [31:0] sum;

  always_comb begin
    is_sub  = 1'b0;
    add_a   = a;
    add_b   = b;
    add_cin = 1'b0;
    unique case (op)
      ALU_ADDX: add_cin = icc_in.c;
      ALU_SUB, ALU_TSUB: begin is_sub = 1'b1; add_b = ~b; add_cin = 1'b1; end
      ALU_SUBX: begin is_sub = 1'b1; add_b = ~b; add_cin = ~icc_in.c; end
      ALU_MULS: begin
        add_a = {icc_in.n ^ icc_in.v, a[31:1]};
        add_b = y_in[0] ? b : 32'h0;
      end
      default: ;
    endcase
  end

  csel_adder #(.W(32), .NBLK(4)) u_add (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(sum), .cout(add_cout)
  );

  always_comb begin
    logic arith;
    arith   = 1'b0;
    tag_ovf = 1'b0;
    y_next  = y_in;
    unique case (op)
      ALU_ADD, ALU_ADDX, ALU_SUB, ALU_SUBX,
      ALU_TADD, ALU_TSUB:  begin result = sum; arith = 1'b1; end
      ALU_MULS:            begin result = sum; arith = 1'b1; y_next = {a[0], y_in[31:1]}; end
      ALU_AND:   result = a & b;
      ALU_ANDN:  result = a & ~b;
      ALU_OR:    result = a | b;
      ALU_ORN:   result = a | ~b;
      ALU_XOR:   result = a ^ b;
      ALU_XNOR:  result = ~(a ^ b);
      ALU_PASSB: result = b;
      default:   result = a;
    endcase
    icc_out.n = result[31];
    icc_out.z = (result == 32'h0);
    icc_out.v = 1'b0;
    icc_out.c = 1'b0;
    if (arith) begin
      // overflow from the signs of the operands actually added
      icc_out.v = (add_a[31] == add_b[31]) && (result[31] != add_a[31]);
      icc_out.c = is_sub ? ~add_cout : add_cout;
      if (op == ALU_TADD || op == ALU_TSUB) begin
        tag_ovf   = icc_out.v || (a[1:0] != 2'b00) || (b[1:0] != 2'b00);
        icc_out.v = tag_ovf;
      end
    end
  end
endmodule
